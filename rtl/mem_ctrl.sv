// Data-mapping-aware frame memory controller for an H.264 decoder.
//
// Motion compensation reads reference pixels through the z-scan scheduler
// and the read engine; reconstructed pixels are written through the write
// engine; the arbiter places the two engines on two SDRAM channels used as
// ping-pong frame stores (reference frame on one, current frame on the
// other) and exchanges them on `frame_swap`. From the swap pulse until the
// exchange, `mc_ready` is low; the exchange happens once the scheduler is
// empty and both engines have precharged their channel.
//
// Both engines use the 64x32-pixel row window mapping with a checkerboard
// bank arrangement, so a request of up to 63x63 pixels touches at most four
// rows, all in different banks, opened with bank-interleaved activates. Rows
// stay open between requests and a request whose rows are all open skips
// precharge and activation. Accesses are single words (burst length 1).
//
// Ports: partition read requests (valid/ready) and aligned read data with a
// pixel count; rectangular write requests (valid/ready) and write data words
// (valid/ready, raster order); per channel SDRAM command pins and data bus
// (split into out/oe/in). Row hit and miss pulses are brought out for
// statistics.
//
// Lint notes: the scheduler's z-scan block index (sq_blk) is not needed by
// the read engine, and the write engine's read-data outputs (wr_rd_*) are
// constant because it never issues READ; both are left unconnected on
// purpose. The rst_n warning (used both synchronously and asynchronously)
// comes from the `disable iff (!rst_n)` of the simulation assertions in
// mc_ctrl and bs_shifter; all flip-flops use it as an asynchronous reset.
//
// The architecture (scheduler, read and write engines, arbiter, two channels)
// follows the source design; the chroma data arrangement and the display port
// of the source design are not included.
module mem_ctrl
  import mc_pkg::*;
#(
  parameter int unsigned CL    = 2,
  parameter int unsigned T_RCD = 2,
  parameter int unsigned T_RP  = 2,
  parameter int unsigned T_RRD = 2,
  parameter int unsigned T_RAS = 5,
  parameter int unsigned T_WR  = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // motion-compensation read port
  input  logic               mc_valid,
  output logic               mc_ready,
  input  logic [FRAME_W-1:0] mc_frame,
  input  logic [COORD_W-1:0] mc_x,
  input  logic [COORD_W-1:0] mc_y,
  input  logic [2:0]         mc_w4,
  input  logic [2:0]         mc_h4,
  input  logic               mc_fx,
  input  logic               mc_fy,
  input  logic               mc_zscan,
  output logic               rd_valid,
  output logic [DATA_W-1:0]  rd_data,
  output logic [2:0]         rd_n_pix,
  output logic               rd_eol,
  output logic               rd_last,
  // reconstructed-frame write port
  input  logic               wq_valid,
  output logic               wq_ready,
  input  mc_req_t            wq_req,
  input  logic               wd_valid,
  output logic               wd_ready,
  input  logic [DATA_W-1:0]  wd_data,
  // frame control
  input  logic               frame_swap,
  output logic               ref_ch,
  // SDRAM channels
  output sdram_pins_t        ch_pins   [2],
  output logic [DATA_W-1:0]  ch_dq_out [2],
  output logic               ch_dq_oe  [2],
  input  logic [DATA_W-1:0]  ch_dq_in  [2],
  // statistics
  output logic               rd_hit,
  output logic               rd_miss,
  output logic               wr_hit,
  output logic               wr_miss,
  output logic               busy
);

  logic        sq_valid, sq_ready;
  mc_req_t     sq_req;
  logic [3:0]  sq_blk;

  // new partitions wait while a channel swap is pending; the swap waits for
  // the scheduler to empty, so requests stay on the side of the swap they
  // were issued on
  logic close_req, sched_ready, rd_closed, wr_closed;
  assign mc_ready = sched_ready && !close_req;

  mc_zscan_sched u_sched (
    .clk, .rst_n, .in_valid(mc_valid && !close_req), .in_ready(sched_ready), .in_frame(mc_frame),
    .in_x(mc_x), .in_y(mc_y), .in_w4(mc_w4), .in_h4(mc_h4), .in_fx(mc_fx), .in_fy(mc_fy),
    .in_zscan(mc_zscan), .out_valid(sq_valid), .out_ready(sq_ready), .out_req(sq_req),
    .out_blk(sq_blk)
  );

  sdram_pins_t       rd_pins, wr_pins;
  logic [DATA_W-1:0] rd_dq_in, rd_dq_out_unused, wr_dq_out;
  logic              rd_dq_oe_unused, wr_dq_oe;
  logic              rd_busy, wr_busy, rd_wr_ready_unused;
  logic              wr_rd_valid, wr_rd_eol, wr_rd_last;
  logic [DATA_W-1:0] wr_rd_data;
  logic [2:0]        wr_rd_n_pix;

  mc_engine #(
    .IS_WRITE(1'b0), .CL(CL), .T_RCD(T_RCD), .T_RP(T_RP), .T_RRD(T_RRD), .T_RAS(T_RAS), .T_WR(T_WR)
  ) u_rd (
    .clk, .rst_n, .req_valid(sq_valid), .req_ready(sq_ready), .req(sq_req),
    .wr_valid(1'b0), .wr_ready(rd_wr_ready_unused), .wr_data('0),
    .pins(rd_pins), .dq_out(rd_dq_out_unused), .dq_oe(rd_dq_oe_unused), .dq_in(rd_dq_in),
    .rd_valid, .rd_data, .rd_n_pix, .rd_eol, .rd_last,
    .close_req(close_req && sched_ready), .closed(rd_closed),
    .busy(rd_busy), .hit_pulse(rd_hit), .miss_pulse(rd_miss)
  );

  mc_engine #(
    .IS_WRITE(1'b1), .CL(CL), .T_RCD(T_RCD), .T_RP(T_RP), .T_RRD(T_RRD), .T_RAS(T_RAS), .T_WR(T_WR)
  ) u_wr (
    .clk, .rst_n, .req_valid(wq_valid), .req_ready(wq_ready), .req(wq_req),
    .wr_valid(wd_valid), .wr_ready(wd_ready), .wr_data(wd_data),
    .pins(wr_pins), .dq_out(wr_dq_out), .dq_oe(wr_dq_oe), .dq_in('0),
    .rd_valid(wr_rd_valid), .rd_data(wr_rd_data), .rd_n_pix(wr_rd_n_pix),
    .rd_eol(wr_rd_eol), .rd_last(wr_rd_last),
    .close_req, .closed(wr_closed),
    .busy(wr_busy), .hit_pulse(wr_hit), .miss_pulse(wr_miss)
  );

  mc_arbiter u_arb (
    .clk, .rst_n, .swap(frame_swap), .rd_closed(rd_closed && sched_ready), .wr_closed, .close_req,
    .ref_ch, .rd_pins, .rd_dq_in, .wr_pins, .wr_dq_out, .wr_dq_oe,
    .ch_pins, .ch_dq_out, .ch_dq_oe, .ch_dq_in
  );

  assign busy = rd_busy || wr_busy || !sched_ready || close_req;

endmodule
