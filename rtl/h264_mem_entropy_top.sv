// Top level: the two key modules of an H.264/AVC decoder side by side.
//
// * mem_ctrl: the data-mapping-aware frame memory controller, with its
//   motion-compensation read port, reconstructed-frame write port and two
//   SDRAM channels (ping-pong reference/current frame stores).
// * uvlc_decoder: Exp-Golomb decoder for the header and macroblock syntax.
// * cavlc_decoder: residual block decoder.
// The entropy decoders each take their own bitstream port, so the caller
// decides which one parses which part of the slice data. All ports are those
// of the three blocks, brought out unchanged; everything runs on one clock.
// Lint reports rst_n as used both synchronously and asynchronously; the
// synchronous use is only the `disable iff` of simulation assertions.
//
// The three units are those of the source design; placing them side by side
// with all ports brought out is this design's choice.
module h264_mem_entropy_top
  import mc_pkg::*;
#(
  parameter int unsigned LEVEL_W = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // ---- memory controller ----
  input  logic                      mc_valid,
  output logic                      mc_ready,
  input  logic [FRAME_W-1:0]        mc_frame,
  input  logic [COORD_W-1:0]        mc_x,
  input  logic [COORD_W-1:0]        mc_y,
  input  logic [2:0]                mc_w4,
  input  logic [2:0]                mc_h4,
  input  logic                      mc_fx,
  input  logic                      mc_fy,
  input  logic                      mc_zscan,
  output logic                      rd_valid,
  output logic [DATA_W-1:0]         rd_data,
  output logic [2:0]                rd_n_pix,
  output logic                      rd_eol,
  output logic                      rd_last,
  input  logic                      wq_valid,
  output logic                      wq_ready,
  input  mc_req_t                   wq_req,
  input  logic                      wd_valid,
  output logic                      wd_ready,
  input  logic [DATA_W-1:0]         wd_data,
  input  logic                      frame_swap,
  output logic                      ref_ch,
  output sdram_pins_t               ch_pins   [2],
  output logic [DATA_W-1:0]         ch_dq_out [2],
  output logic                      ch_dq_oe  [2],
  input  logic [DATA_W-1:0]         ch_dq_in  [2],
  output logic                      rd_hit,
  output logic                      rd_miss,
  output logic                      wr_hit,
  output logic                      wr_miss,
  output logic                      mc_busy,
  // ---- UVLC decoder ----
  input  logic                      ue_bs_valid,
  output logic                      ue_bs_ready,
  input  logic [31:0]               ue_bs_data,
  input  logic                      se_valid,
  output logic                      se_ready,
  input  logic [2:0]                se_kind,
  input  logic [4:0]                se_bits,
  input  logic                      te_range_gt1,
  output logic                      se_res_valid,
  output logic signed [31:0]        se_res_value,
  output logic [5:0]                se_res_len,
  // ---- CAVLC decoder ----
  input  logic                      cv_bs_valid,
  output logic                      cv_bs_ready,
  input  logic [31:0]               cv_bs_data,
  input  logic                      cv_start,
  input  logic signed [5:0]         cv_nc,
  input  logic [4:0]                cv_max_coeff,
  output logic                      cv_ready,
  output logic                      cv_done,
  output logic                      cv_zero_block,
  output logic [4:0]                cv_total_coeff,
  output logic [7:0]                cv_cycles,
  output logic signed [LEVEL_W-1:0] cv_coeff [16],
  output logic [31:0]               cv_bit_pos
);

  mem_ctrl u_mem (
    .clk, .rst_n, .mc_valid, .mc_ready, .mc_frame, .mc_x, .mc_y, .mc_w4, .mc_h4,
    .mc_fx, .mc_fy, .mc_zscan, .rd_valid, .rd_data, .rd_n_pix, .rd_eol, .rd_last,
    .wq_valid, .wq_ready, .wq_req, .wd_valid, .wd_ready, .wd_data,
    .frame_swap, .ref_ch, .ch_pins, .ch_dq_out, .ch_dq_oe, .ch_dq_in,
    .rd_hit, .rd_miss, .wr_hit, .wr_miss, .busy(mc_busy)
  );

  uvlc_decoder u_uvlc (
    .clk, .rst_n, .bs_valid(ue_bs_valid), .bs_ready(ue_bs_ready), .bs_data(ue_bs_data),
    .se_valid, .se_ready, .se_kind, .se_bits, .te_range_gt1,
    .res_valid(se_res_valid), .res_value(se_res_value), .res_len(se_res_len)
  );

  cavlc_decoder #(.LEVEL_W(LEVEL_W)) u_cavlc (
    .clk, .rst_n, .bs_valid(cv_bs_valid), .bs_ready(cv_bs_ready), .bs_data(cv_bs_data),
    .start(cv_start), .nc(cv_nc), .max_coeff(cv_max_coeff), .ready(cv_ready),
    .done(cv_done), .zero_block(cv_zero_block), .total_coeff(cv_total_coeff),
    .cycles(cv_cycles), .coeff(cv_coeff), .bit_pos(cv_bit_pos)
  );

endmodule
