// Motion-compensation scheduler of the frame memory controller.
//
// Takes one luma partition request (integer reference position of its
// top-left pixel, width and height in 4x4 blocks, and whether the horizontal
// and vertical motion-vector components are fractional) and turns it into
// memory requests. With `zscan` set it issues one request per 4x4 block, in
// the z-scan order of the 16 blocks of a macroblock (index i: x block =
// {i[2],i[0]}, y block = {i[3],i[1]}), skipping blocks outside the partition;
// each covers 4 pixels, or 9 when the six-tap interpolation needs 2 pixels
// before and 3 after. With `zscan` clear it issues the whole partition as one
// request (width 4*w4, plus 5 when fractional). One request per cycle through
// valid/ready; `in_ready` is high only when the scheduler is idle.
//
// Issuing 4x4 blocks in z-scan order follows the source design; the 9x9
// fractional window and the whole-partition mode are this design's choices.
module mc_zscan_sched
  import mc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [FRAME_W-1:0] in_frame,
  input  logic [COORD_W-1:0] in_x,
  input  logic [COORD_W-1:0] in_y,
  input  logic [2:0]         in_w4,     // 1, 2 or 4
  input  logic [2:0]         in_h4,
  input  logic               in_fx,
  input  logic               in_fy,
  input  logic               in_zscan,
  output logic               out_valid,
  input  logic               out_ready,
  output mc_req_t            out_req,
  output logic [3:0]         out_blk
);

  logic               active_q, zscan_q, fx_q, fy_q;
  logic [FRAME_W-1:0] frame_q;
  logic [COORD_W-1:0] x_q, y_q;
  logic [2:0]         w4_q, h4_q;
  logic [4:0]         idx_q;        // next z-scan index, 16 = done

  logic [2:0] bx, by;
  logic       in_part;
  assign bx = {1'b0, idx_q[2], idx_q[0]};
  assign by = {1'b0, idx_q[3], idx_q[1]};
  assign in_part = (bx < w4_q) && (by < h4_q) && !idx_q[4];

  assign in_ready  = !active_q;
  assign out_valid = active_q && (zscan_q ? in_part : 1'b1);
  assign out_blk   = zscan_q ? idx_q[3:0] : 4'd0;

  always_comb begin
    out_req.frame = frame_q;
    if (zscan_q) begin
      out_req.x = x_q + COORD_W'({bx, 2'b00}) - (fx_q ? COORD_W'(2) : '0);
      out_req.y = y_q + COORD_W'({by, 2'b00}) - (fy_q ? COORD_W'(2) : '0);
      out_req.w = fx_q ? LEN_W'(9) : LEN_W'(4);
      out_req.h = fy_q ? LEN_W'(9) : LEN_W'(4);
    end else begin
      out_req.x = x_q - (fx_q ? COORD_W'(2) : '0);
      out_req.y = y_q - (fy_q ? COORD_W'(2) : '0);
      out_req.w = LEN_W'({w4_q, 2'b00}) + (fx_q ? LEN_W'(5) : '0);
      out_req.h = LEN_W'({h4_q, 2'b00}) + (fy_q ? LEN_W'(5) : '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0; zscan_q <= 1'b0; fx_q <= 1'b0; fy_q <= 1'b0;
      frame_q <= '0; x_q <= '0; y_q <= '0; w4_q <= '0; h4_q <= '0; idx_q <= '0;
    end else if (!active_q) begin
      if (in_valid) begin
        active_q <= 1'b1; zscan_q <= in_zscan; fx_q <= in_fx; fy_q <= in_fy;
        frame_q <= in_frame; x_q <= in_x; y_q <= in_y; w4_q <= in_w4; h4_q <= in_h4;
        idx_q <= '0;
      end
    end else if (!zscan_q) begin
      if (out_ready) active_q <= 1'b0;
    end else if (!in_part || out_ready) begin
      if (idx_q == 5'd15 || idx_q[4]) active_q <= 1'b0;
      idx_q <= idx_q + 1'b1;
    end
  end

endmodule
