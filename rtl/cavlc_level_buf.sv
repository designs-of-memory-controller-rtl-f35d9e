// Level buffer of the CAVLC decoder.
//
// Sixteen LEVEL_W-bit registers holding the nonzero levels of the block.
// Levels are written by position in decoding order: the k-th decoded level
// (k = 1 first, the highest-frequency coefficient) goes to entry
// TotalCoeff-k, so entry 0 ends up holding the lowest-frequency coefficient.
// That ordering lets the coefficient merging unit copy the remaining levels
// straight across once no zeros are left. It is a multiple-input buffer: in
// one cycle it takes up to three trailing ones (entries TotalCoeff-1..-3) and
// one decoded level at any entry. `clear` empties it for a new block.
// `buf_fwd` shows the contents including this cycle's writes, so a level can
// be merged in the cycle it is written.
//
// The 16-entry buffer of 10-bit levels follows the source design; the
// write-through path that lets the merge unit read a level in the cycle it is
// written is this design's choice.
module cavlc_level_buf #(
  parameter int unsigned LEVEL_W = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic [4:0]                total_coeff,
  input  logic [2:0]                t1_en,
  input  logic [2:0]                t1_neg,
  input  logic                      lvl_en,
  input  logic [3:0]                lvl_idx,
  input  logic signed [LEVEL_W-1:0] lvl,
  output logic signed [LEVEL_W-1:0] buf_q [16],
  output logic signed [LEVEL_W-1:0] buf_fwd [16]
);

  always_comb begin
    for (int i = 0; i < 16; i++) buf_fwd[i] = clear ? '0 : buf_q[i];
    if (!clear) begin
      for (int k = 0; k < 3; k++)
        if (t1_en[k]) buf_fwd[4'(total_coeff - 5'(k) - 5'd1)] = t1_neg[k] ? -LEVEL_W'(1) : LEVEL_W'(1);
      if (lvl_en) buf_fwd[lvl_idx] = lvl;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) buf_q[i] <= '0;
    end else begin
      for (int i = 0; i < 16; i++) buf_q[i] <= buf_fwd[i];
    end
  end

endmodule
