// Coefficient merging unit of the CAVLC decoder.
//
// Holds the coefficient buffer (16 LEVEL_W-bit entries, in scan order) that
// is the decoder's output. It is cleared to zero at the start of every block,
// so zeros never have to be written: only nonzero levels are placed. In a
// run-decoding cycle the two level selection units pick level buffer entries
// `level_index` and `level_index`-1, and the coefficient enable units work
// out their positions from the previous coefficient's position
// `coeff_index`: pos1 = coeff_index - 1 - run1 and pos2 = pos1 - 1 - run2.
// The second write happens only when two runs were decoded (`run2_en`).
// With `zl_zero` (no zeros left) every entry below `coeff_index` is copied
// from the same entry of the level buffer, which places all remaining levels
// in one cycle. The same port places the first (highest-frequency) level at
// TotalCoeff+TotalZeros-1 by giving coeff_index = TotalCoeff+TotalZeros and
// run1 = 0. `next_index` is the position of the last level placed.
//
// Placing one or two levels per cycle and copying the rest when ZerosLeft
// reaches zero follow the source design; positions use the H.264 rule
// position = previous - 1 - run.
module cavlc_merge #(
  parameter int unsigned LEVEL_W = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic signed [LEVEL_W-1:0] level_buf [16],
  input  logic                      run1_en,
  input  logic                      run2_en,
  input  logic                      zl_zero,
  input  logic [3:0]                run1,
  input  logic [3:0]                run2,
  input  logic [4:0]                coeff_index,
  input  logic [3:0]                level_index,
  output logic [4:0]                next_index,
  output logic signed [LEVEL_W-1:0] coeff [16]
);

  logic [4:0] pos1, pos2;
  logic signed [LEVEL_W-1:0] lv1, lv2;

  assign pos1 = coeff_index - 5'd1 - 5'(run1);
  assign pos2 = pos1 - 5'd1 - 5'(run2);
  assign lv1  = level_buf[level_index];
  assign lv2  = level_buf[level_index - 4'd1];
  assign next_index = run2_en ? pos2 : pos1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 16; p++) coeff[p] <= '0;
    end else if (clear) begin
      for (int p = 0; p < 16; p++) coeff[p] <= '0;
    end else begin
      for (int p = 0; p < 16; p++) begin
        if (run1_en && pos1 == 5'(p))
          coeff[p] <= lv1;
        else if (run1_en && run2_en && pos2 == 5'(p))
          coeff[p] <= lv2;
        else if (zl_zero && 5'(p) < coeff_index)
          coeff[p] <= level_buf[p];
      end
    end
  end

endmodule
