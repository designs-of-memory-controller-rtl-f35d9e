// UVLC (Exp-Golomb) decoder.
//
// An Exp-Golomb codeword is N leading zeros, a one and N information bits,
// 2N+1 bits in all, and codes CodeNum = 2^N - 1 + info. The decoder finds N
// with a leading-one detector on the aligned bitstream window, so the code
// length (N<<1)+1 is known at once and the whole element is decoded in one
// cycle with no code table: the code number extractor takes the top 2N+1
// bits of the window, which equal CodeNum+1, and the post-processing unit
// maps CodeNum to the syntax element value:
//   UE  unsigned: CodeNum
//   SE  signed:   (-1)^(k+1) * ceil(k/2)
//   TE  truncated: as UE when the range is above 1, otherwise one bit, inverted
//   ME  mapped: coded_block_pattern through the intra 4x4 or inter table
//   UN  fixed-length unsigned field of `se_bits` bits (u(n)/f(n) syntax)
// The bitstream buffer, accumulator and alignment shifter are bs_shifter.
// Codes of up to 31 bits (CodeNum < 2^15-1) are decoded.
//
// Interface: a request (se_valid, se_kind, se_bits, te_range_gt1) is
// accepted in a cycle when a full window is buffered (se_ready); the result
// appears on res_* in the next cycle, so one element per cycle is sustained.
// Which element to request next is left to the caller; the macroblock syntax
// sequencing that the original design places in this unit's control logic
// is not part of this module.
//
// The leading-one detector, the code-number extractor and the ue/se/te/me
// post-processing follow the source design; the request interface replaces
// the macroblock syntax FSM, which is not included.
module uvlc_decoder (
  input  logic               clk,
  input  logic               rst_n,
  // bitstream in
  input  logic               bs_valid,
  output logic               bs_ready,
  input  logic [31:0]        bs_data,
  // element request
  input  logic               se_valid,
  output logic               se_ready,
  input  logic [2:0]         se_kind,      // 0 UE, 1 SE, 2 TE, 3 ME intra, 4 ME inter, 5 UN
  input  logic [4:0]         se_bits,      // width for UN, 1..16
  input  logic               te_range_gt1, // TE: range x > 1
  // result
  output logic               res_valid,
  output logic signed [31:0] res_value,
  output logic [5:0]         res_len
);

  localparam logic [2:0] K_SE = 3'd1, K_TE = 3'd2, K_MEI = 3'd3, K_MEP = 3'd4, K_UN = 3'd5;

  logic        win_valid;
  logic [31:0] win, bit_pos_unused;
  logic [5:0]  consume;

  bs_shifter u_bs (
    .clk, .rst_n, .in_valid(bs_valid), .in_ready(bs_ready), .in_data(bs_data),
    .win_valid, .win, .consume, .bit_pos(bit_pos_unused)
  );

  // leading-one detector
  logic [3:0] nz;
  always_comb begin
    nz = 4'd15;
    for (int i = 1; i <= 16; i++) if (win[15 + i]) nz = 4'(16 - i);
  end

  // code number extractor: CodeNum+1 is the top 2N+1 bits
  logic [5:0]  eg_len;
  logic [31:0] cnum_p1, code_num;
  assign eg_len   = {1'b0, nz, 1'b0} + 6'd1;
  assign cnum_p1  = win >> (6'd32 - eg_len);
  assign code_num = cnum_p1 - 32'd1;

  // coded_block_pattern mapping, H.264 table for 4:2:0 (intra 4x4 and inter)
  function automatic logic [5:0] cbp_map(logic [5:0] k, logic inter);
    logic [5:0] intra_t [48];
    logic [5:0] inter_t [48];
    intra_t = '{47,31,15,0,23,27,29,30,7,11,13,14,39,43,45,46,16,3,5,10,12,19,21,26,
                28,35,37,42,44,1,2,4,8,17,18,20,24,6,9,22,25,32,33,34,36,40,38,41};
    inter_t = '{0,16,1,2,4,8,32,3,5,10,12,15,47,7,11,13,14,6,9,31,35,37,42,44,
                33,34,36,40,39,43,45,46,17,18,20,24,19,21,26,28,23,27,29,30,22,25,38,41};
    if (k > 6'd47) return 6'd0;
    return inter ? inter_t[k] : intra_t[k];
  endfunction

  logic signed [31:0] val_d;
  logic [5:0]         len_d;
  always_comb begin
    val_d = $signed(code_num);
    len_d = eg_len;
    case (se_kind)
      K_SE:  val_d = code_num[0] ? $signed({1'b0, code_num[31:1]}) + 32'sd1
                                 : -$signed({1'b0, code_num[31:1]});
      K_TE:  if (!te_range_gt1) begin
               val_d = {31'd0, ~win[31]};
               len_d = 6'd1;
             end
      K_MEI: val_d = {26'd0, cbp_map(code_num[5:0] | {6{|code_num[31:6]}}, 1'b0)};
      K_MEP: val_d = {26'd0, cbp_map(code_num[5:0] | {6{|code_num[31:6]}}, 1'b1)};
      K_UN:  begin
               val_d = $signed(win >> (6'd32 - {1'b0, se_bits}));
               len_d = {1'b0, se_bits};
             end
      default: ;     // UE (kind 0): CodeNum as it is
    endcase
  end

  assign se_ready = win_valid;
  assign consume  = (se_valid && win_valid) ? len_d : 6'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0; res_value <= '0; res_len <= '0;
    end else begin
      res_valid <= se_valid && win_valid;
      if (se_valid && win_valid) begin
        res_value <= val_d;
        res_len   <= len_d;
      end
    end
  end

endmodule
