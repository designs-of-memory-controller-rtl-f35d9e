// One access engine of the frame memory controller: address generator,
// detection unit, control FSM and command generator for one SDRAM channel.
//
// The read engine (IS_WRITE=0) also contains the tag pipeline that follows
// each READ through the CAS latency and the data masker that aligns the
// returning words. The write engine (IS_WRITE=1) takes one 32-bit data word
// per WRITE through a valid/ready pair. The document's write address and
// command generators are duplicates of the read ones; both engines are this
// module with a different IS_WRITE.
//
// Read timing: a READ chosen in cycle c is on the pins in cycle c+1, its data
// is sampled from `dq_in` at the end of cycle c+1+CL and leaves the masker two
// cycles later.
//
// The unit split follows the source design; the tag pipeline that tracks read
// data through the CAS latency is this design's choice.
module mc_engine
  import mc_pkg::*;
#(
  parameter bit          IS_WRITE = 1'b0,
  parameter int unsigned CL    = 2,
  parameter int unsigned T_RCD = 2,
  parameter int unsigned T_RP  = 2,
  parameter int unsigned T_RRD = 2,
  parameter int unsigned T_RAS = 5,
  parameter int unsigned T_WR  = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid,
  output logic               req_ready,
  input  mc_req_t            req,
  // write data (write engine)
  input  logic               wr_valid,
  output logic               wr_ready,
  input  logic [DATA_W-1:0]  wr_data,
  // SDRAM channel
  output sdram_pins_t        pins,
  output logic [DATA_W-1:0]  dq_out,
  output logic               dq_oe,
  input  logic [DATA_W-1:0]  dq_in,
  // read data (read engine)
  output logic               rd_valid,
  output logic [DATA_W-1:0]  rd_data,
  output logic [2:0]         rd_n_pix,
  output logic               rd_eol,
  output logic               rd_last,
  // status
  input  logic               close_req,
  output logic               closed,
  output logic               busy,
  output logic               hit_pulse,
  output logic               miss_pulse
);

  logic               ag_load, ag_step;
  logic [1:0]         n_break;
  logic [3:0]         need_vld, is_open, bank_open;
  logic [BANK_W-1:0]  need_bank [4];
  logic [ROW_W-1:0]   need_row  [4];
  sdram_addr_t        addr;
  logic               first_in_line, last_in_line, last, all_open;
  logic [1:0]         lo_byte, hi_byte;
  sdram_cmd_t         cmd;
  logic               ctrl_closed;

  mc_addr_gen u_ag (
    .clk, .rst_n, .load(ag_load), .req, .step(ag_step),
    .n_break, .need_vld, .need_bank, .need_row,
    .addr, .first_in_line, .last_in_line, .last, .lo_byte, .hi_byte
  );

  mc_detect u_det (
    .clk, .rst_n, .need_vld, .need_bank, .need_row, .issued(cmd),
    .is_open, .all_open, .bank_open
  );

  mc_ctrl #(
    .IS_WRITE(IS_WRITE), .T_RCD(T_RCD), .T_RP(T_RP), .T_RRD(T_RRD), .T_RAS(T_RAS), .T_WR(T_WR)
  ) u_ctrl (
    .clk, .rst_n, .req_valid, .req_ready, .ag_load, .ag_step,
    .need_vld, .need_bank, .need_row, .addr, .last,
    .is_open, .all_open, .bank_open,
    .wr_valid(IS_WRITE ? wr_valid : 1'b1),
    .close_req, .closed(ctrl_closed),
    .cmd, .busy, .hit_pulse, .miss_pulse
  );

  mc_cmd_gen u_cmd (
    .clk, .rst_n, .cmd, .wdata(wr_data), .pins, .dq_out, .dq_oe
  );

  assign wr_ready = IS_WRITE && (cmd.op == OP_WRITE);

  // read tags follow each READ through the command register and CAS latency
  typedef struct packed {
    logic       v;
    logic [1:0] lo;
    logic [1:0] hi;
    logic       eol;
    logic       last;
  } rd_tag_t;

  rd_tag_t tag_pipe [CL+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= CL; i++) tag_pipe[i] <= '0;
    end else begin
      tag_pipe[0] <= '{v: (cmd.op == OP_READ), lo: lo_byte, hi: hi_byte,
                       eol: last_in_line, last: last};
      for (int i = 1; i <= CL; i++) tag_pipe[i] <= tag_pipe[i-1];
    end
  end

  // closed only when no read data is still on its way back from the SDRAM
  always_comb begin
    closed = ctrl_closed;
    for (int i = 0; i <= CL; i++) if (tag_pipe[i].v) closed = 1'b0;
  end

  mc_data_masker u_mask (
    .clk, .rst_n,
    .in_valid(tag_pipe[CL].v), .in_data(dq_in), .in_lo(tag_pipe[CL].lo),
    .in_hi(tag_pipe[CL].hi), .in_eol(tag_pipe[CL].eol), .in_last(tag_pipe[CL].last),
    .out_valid(rd_valid), .out_data(rd_data), .out_n_pix(rd_n_pix),
    .out_eol(rd_eol), .out_last(rd_last)
  );

endmodule
