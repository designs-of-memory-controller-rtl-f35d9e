// run_before decoder of the CAVLC decoder, with two-run decoding.
//
// Combinational. The first run is decoded with the table selected by
// ZerosLeft (1..6, or the >6 table whose long codes are a leading-one count,
// runs 7..14). When ZerosLeft <= 6 the table for the second run is already
// known once the first run is known (ZerosLeft - run1), and all run codes
// there are at most 3 bits, so a second run is decoded from the bits that
// follow in the same cycle: `two` is high when the caller allows it
// (`allow2`, at least two coefficients still to place), ZerosLeft <= 6 and
// ZerosLeft - run1 > 0. The second lookup is the same table cascaded on the
// shifted window, which covers exactly the two-run combinations.
//
// Two runs per cycle when ZerosLeft <= 6 follows the source design; the
// cascaded second lookup is this design's choice.
module cavlc_run_before
  import cavlc_pkg::*;
(
  input  logic [31:0] win,
  input  logic [3:0]  zeros_left,
  input  logic        allow2,
  output logic [3:0]  run1,
  output logic [3:0]  run2,
  output logic        two,
  output logic [4:0]  len
);

  rb_res_t r1, r2;
  logic [3:0]  zl2;
  logic [31:0] after;

  always_comb begin
    r1    = rb_lookup(win[31:21], zeros_left);
    zl2   = zeros_left - r1.run;
    after = win << r1.len;
    r2    = rb_lookup(after[31:21], zl2);
    two   = allow2 && (zeros_left <= 4'd6) && (zl2 != 4'd0);
    run1  = r1.run;
    run2  = two ? r2.run : 4'd0;
    len   = 5'(r1.len) + (two ? 5'(r2.len) : 5'd0);
  end

endmodule
