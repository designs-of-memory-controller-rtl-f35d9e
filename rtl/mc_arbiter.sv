// Arbiter of the frame memory controller.
//
// The controller works with two SDRAM channels used as ping-pong frame
// stores: one holds the reference frame being read for motion compensation,
// the other receives the frame being decoded. The arbiter connects the read
// engine's commands and read data to the reference channel and the write
// engine's commands and write data to the other channel. `swap` (at the end
// of a frame) exchanges the roles. It is held pending and raises `close_req`;
// the swap takes effect only when both engines report `closed` (idle, all
// banks precharged, no read data in flight), so no access is cut and each
// engine's open-row table stays true for the channel it drives next. The unconnected side of a
// channel never exists: each channel is always driven by exactly one engine.
//
// Two ping-pong channels for the reference and current frames follow the
// source design; the close-before-swap handshake is this design's choice.
module mc_arbiter
  import mc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               swap,
  input  logic               rd_closed,
  input  logic               wr_closed,
  output logic               close_req,    // swap requested, engines must close
  output logic               ref_ch,       // channel holding the reference frame
  // read engine
  input  sdram_pins_t        rd_pins,
  output logic [DATA_W-1:0]  rd_dq_in,
  // write engine
  input  sdram_pins_t        wr_pins,
  input  logic [DATA_W-1:0]  wr_dq_out,
  input  logic               wr_dq_oe,
  // the two channels
  output sdram_pins_t        ch_pins   [2],
  output logic [DATA_W-1:0]  ch_dq_out [2],
  output logic               ch_dq_oe  [2],
  input  logic [DATA_W-1:0]  ch_dq_in  [2]
);

  logic swap_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_ch    <= 1'b0;
      swap_pend <= 1'b0;
    end else if ((swap || swap_pend) && rd_closed && wr_closed) begin
      ref_ch    <= ~ref_ch;
      swap_pend <= 1'b0;
    end else if (swap) begin
      swap_pend <= 1'b1;
    end
  end

  assign close_req = swap || swap_pend;

  always_comb begin
    if (!ref_ch) begin
      ch_pins[0] = rd_pins;  ch_dq_out[0] = '0;        ch_dq_oe[0] = 1'b0;
      ch_pins[1] = wr_pins;  ch_dq_out[1] = wr_dq_out; ch_dq_oe[1] = wr_dq_oe;
      rd_dq_in   = ch_dq_in[0];
    end else begin
      ch_pins[1] = rd_pins;  ch_dq_out[1] = '0;        ch_dq_oe[1] = 1'b0;
      ch_pins[0] = wr_pins;  ch_dq_out[0] = wr_dq_out; ch_dq_oe[0] = wr_dq_oe;
      rd_dq_in   = ch_dq_in[1];
    end
  end

endmodule
