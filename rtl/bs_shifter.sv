// Bitstream shifter for the entropy decoders.
//
// Two 32-bit registers hold the bitstream: R1 holds the older word, R0 the
// next one. A 5-bit accumulator points at the first unread bit of R1, and the
// alignment shifter presents the 32 bits starting there as `win`, with the
// next bit in win[31]. A decoder reads `win` and, in the same cycle, reports
// how many bits it used (`consume`, 0..32). When the accumulator passes the
// end of R1, R0 moves into R1 and a new word is loaded from the input stream
// into R0 in the same cycle. `win_valid` is high when both registers are full,
// i.e. at least 33 bits are buffered, so any code of up to 32 bits can be
// decoded. Words enter most significant bit first through in_valid/in_ready.
// `bit_pos` counts consumed bits since reset (for the caller's bookkeeping).
//
// The two 32-bit registers, the length accumulator and the shifter follow the
// source design; the 32-bit consume limit, the refill handshake and the bit
// position counter are this design's choices.
module bs_shifter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  output logic        win_valid,
  output logic [31:0] win,
  input  logic [5:0]  consume,
  output logic [31:0] bit_pos
);

  logic [31:0] r0_q, r1_q;
  logic        r0_v, r1_v;
  logic [4:0]  acc_q;
  logic [6:0]  acc_sum;
  logic [63:0] both;

  assign win_valid = r0_v && r1_v;
  assign both      = {r1_q, r0_q} << acc_q;
  assign win       = both[63:32];
  assign acc_sum   = 7'(acc_q) + 7'(consume);

  always_comb begin
    if (win_valid && consume != 6'd0)
      in_ready = acc_sum[5];
    else
      in_ready = !r1_v || !r0_v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0_q <= '0; r1_q <= '0; r0_v <= 1'b0; r1_v <= 1'b0; acc_q <= '0; bit_pos <= '0;
    end else if (win_valid && consume != 6'd0) begin
      bit_pos <= bit_pos + 32'(consume);
      acc_q   <= acc_sum[4:0];
      if (acc_sum[5]) begin
        r1_q <= r0_q;
        r0_q <= in_data;
        r0_v <= in_valid;
      end
    end else if (!r1_v) begin
      if (in_valid) begin r1_q <= in_data; r1_v <= 1'b1; end
    end else if (!r0_v) begin
      if (in_valid) begin r0_q <= in_data; r0_v <= 1'b1; end
    end
  end

  a_consume_max: assert property (@(posedge clk) disable iff (!rst_n) consume <= 6'd32);

endmodule
