// coeff_token and trailing-one sign decoder of the CAVLC decoder.
//
// Cycle 1 (`dec_en`): the coeff_token table, selected by nC (0-1, 2-3, 4-7,
// 8 and up, or -1 for chroma DC), turns the head of the bitstream into
// TotalCoeff, TrailingOnes and the code length. The zero-block detector
// recognises the empty-block codeword of the selected table on its own and
// drives `zero_block`; the code length comes from it for that codeword and
// from the table otherwise. The three bits that follow the codeword are the
// longest possible sign code and are stored in the sign code register.
// Cycle 2: the T1 masking logic keeps as many of those bits as there are
// trailing ones and turns them into the levels +1/-1 (bit 1 = negative),
// ready for the level buffer. Combinational decode, registered signs.
//
// The table lookup per nC class, the zero-block detector and the trailing-one
// sign register with masking follow the source design; the tables are the
// standard H.264 ones and their case-logic form is this design's choice.
module cavlc_coeff_token
  import cavlc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [31:0]       win,
  input  logic signed [5:0] nc,
  input  logic              dec_en,
  output logic [4:0]        total_coeff,
  output logic [1:0]        t1s,
  output logic [4:0]        len_ct,
  output logic              zero_block,
  output logic              code_ok,
  // registered trailing-one levels, valid the cycle after dec_en
  output logic [2:0]        t1_en,
  output logic [2:0]        t1_neg
);

  ct_res_t r;
  logic [4:0] zb_len;
  logic       zb_hit;

  always_comb begin
    if (nc < 0) begin
      r = ct_chroma_dc(win[31:16]);
      zb_hit = (win[31:30] == 2'b01);            zb_len = 5'd2;
    end else if (nc < 2) begin
      r = ct_nc0(win[31:16]);
      zb_hit = win[31];                          zb_len = 5'd1;
    end else if (nc < 4) begin
      r = ct_nc2(win[31:16]);
      zb_hit = (win[31:30] == 2'b11);            zb_len = 5'd2;
    end else if (nc < 8) begin
      r = ct_nc4(win[31:16]);
      zb_hit = (win[31:28] == 4'b1111);          zb_len = 5'd4;
    end else begin
      r = ct_nc8(win[31:16]);
      zb_hit = (win[31:26] == 6'b000011);        zb_len = 5'd6;
    end
  end

  assign zero_block  = zb_hit;
  assign total_coeff = zb_hit ? 5'd0 : r.tc;
  assign t1s         = zb_hit ? 2'd0 : r.t1s;
  assign len_ct      = zb_hit ? zb_len : r.len;
  assign code_ok     = zb_hit || r.ok;

  logic [31:0] after;
  assign after = win << len_ct;

  logic [2:0] sign_q;
  logic [1:0] t1s_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sign_q <= '0; t1s_q <= '0;
    end else if (dec_en) begin
      sign_q <= after[31:29];
      t1s_q  <= t1s;
    end
  end

  // T1 masking: sign bit k belongs to the k-th trailing one when k < T1s
  always_comb begin
    for (int k = 0; k < 3; k++) begin
      t1_en[k]  = (2'(k) < t1s_q);
      t1_neg[k] = t1_en[k] && sign_q[2-k];
    end
  end

endmodule
