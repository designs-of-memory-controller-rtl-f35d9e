// Address generator of the frame memory controller (one per engine).
//
// On `load` it captures a rectangular request and, with one 11-bit adder per
// axis, works out the end coordinates (x+w-1, y+h-1). From the window bits of
// the start and end points it classifies the request: no break (one SDRAM
// row), a horizontal or a vertical break (two rows, two banks) or both (four
// rows, four banks), and lists the bank/row pairs the request needs in the
// order top-left, top-right, bottom-left, bottom-right. The results are
// registered and valid from the cycle after `load`.
//
// It then steps through the request in raster order of 32-bit words, one word
// per `step`: `addr` is the SDRAM word address of the current word, and the
// flags mark the first and last word of a line and the last word of the
// request. The start word and the end word of each line are the turning points
// kept in registers. `lo_byte`/`hi_byte` give the first and last wanted pixel
// inside the current word, for the data masker.
//
// The mapping follows the document's bit arrangement (see mc_pkg). Requests are
// assumed to lie inside the frame and to be at most 63 pixels in each
// direction, so a request can never need two rows of the same bank.
//
// The 64x32 row window, the checkerboard banks and the one/two/four-row
// classification follow the source design; the exact bit positions and the
// raster word stepping are this design's choices.
module mc_addr_gen
  import mc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  mc_req_t            req,
  input  logic               step,
  // classification (valid after load)
  output logic [1:0]         n_break,     // 0: one row, 1: two rows, 2: four rows
  output logic [3:0]         need_vld,    // TL, TR, BL, BR
  output logic [BANK_W-1:0]  need_bank [4],
  output logic [ROW_W-1:0]   need_row  [4],
  // current word
  output sdram_addr_t        addr,
  output logic               first_in_line,
  output logic               last_in_line,
  output logic               last,
  output logic [1:0]         lo_byte,
  output logic [1:0]         hi_byte
);

  logic [FRAME_W-1:0] frame_q;
  logic [COORD_W-1:0] xs_q, ys_q, xe_q, ye_q;   // start and end (turning points)
  logic [COORD_W-3:0] wx_q;                     // current word column
  logic [COORD_W-1:0] cy_q;                     // current line

  logic [COORD_W-1:0] xe_d, ye_d;
  assign xe_d = req.x + COORD_W'(req.w) - 1'b1;  // horizontal adder
  assign ye_d = req.y + COORD_W'(req.h) - 1'b1;  // vertical adder

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_q <= '0; xs_q <= '0; ys_q <= '0; xe_q <= '0; ye_q <= '0;
      wx_q <= '0; cy_q <= '0;
    end else if (load) begin
      frame_q <= req.frame;
      xs_q <= req.x; ys_q <= req.y; xe_q <= xe_d; ye_q <= ye_d;
      wx_q <= req.x[COORD_W-1:2];
      cy_q <= req.y;
    end else if (step) begin
      if (last_in_line) begin
        wx_q <= xs_q[COORD_W-1:2];
        cy_q <= cy_q + 1'b1;
      end else begin
        wx_q <= wx_q + 1'b1;
      end
    end
  end

  logic hbrk, vbrk;
  assign hbrk = (xs_q[COORD_W-1:6] != xe_q[COORD_W-1:6]);
  assign vbrk = (ys_q[COORD_W-1:5] != ye_q[COORD_W-1:5]);
  assign n_break  = {hbrk & vbrk, hbrk ^ vbrk};
  assign need_vld = {hbrk & vbrk, vbrk, hbrk, 1'b1};

  always_comb begin
    need_bank[0] = map_bank(xs_q, ys_q); need_row[0] = map_row(frame_q, xs_q, ys_q);
    need_bank[1] = map_bank(xe_q, ys_q); need_row[1] = map_row(frame_q, xe_q, ys_q);
    need_bank[2] = map_bank(xs_q, ye_q); need_row[2] = map_row(frame_q, xs_q, ye_q);
    need_bank[3] = map_bank(xe_q, ye_q); need_row[3] = map_row(frame_q, xe_q, ye_q);
  end

  logic [COORD_W-1:0] cx;
  assign cx = {wx_q, 2'b00};
  assign addr.bank = map_bank(cx, cy_q);
  assign addr.row  = map_row(frame_q, cx, cy_q);
  assign addr.col  = map_col(cx, cy_q);
  assign first_in_line = (wx_q == xs_q[COORD_W-1:2]);
  assign last_in_line  = (wx_q == xe_q[COORD_W-1:2]);
  assign last          = last_in_line && (cy_q == ye_q);
  assign lo_byte = first_in_line ? xs_q[1:0] : 2'd0;
  assign hi_byte = last_in_line  ? xe_q[1:0] : 2'd3;

endmodule
