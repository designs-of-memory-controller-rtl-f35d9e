// Total control FSM of one access engine of the frame memory controller.
//
// For each request it takes the address generator's classification and the
// detection unit's verdict:
//   * all needed rows already open (row hit): go straight to the data phase,
//     only the CAS latency is paid;
//   * otherwise (row miss): one precharge-all, then one activate per needed
//     row (1, 2 or 4), in the order top-left, top-right, bottom-left,
//     bottom-right.
// Rows are left open when a request ends; precharging is deferred to the next
// miss. In the data phase one READ (or WRITE) with burst length 1 is issued per
// word in raster order. Activates have priority; any cycle in which an
// activate must wait for tRRD/tRP is filled with an access to a bank that is
// already open and past tRCD. With the default timings this gives the command
// sequences ACT NOP READ..., ACT NOP ACT READ..., ACT NOP ACT READ ACT READ ACT
// READ... for one, two and four rows, and PRE NOP ACT NOP READ... on a miss.
//
// While `close_req` is high no new request is taken; once idle the FSM
// precharges all banks and raises `closed` when tRP has passed. The arbiter
// uses this before it exchanges the two SDRAM channels, so that the open-row
// table of each engine always describes the channel it drives.
//
// Timing parameters are in clock cycles. Their defaults are the MT48LC8M32B2P
// minimum times (tRCD 20 ns, tRP 20 ns, tRRD 14 ns, tRAS 42 ns, tWR 14 ns)
// rounded up at a 10 ns clock, which is the cycle spacing the document's
// command-sequence figures show. The next request is accepted in the cycle its
// predecessor issues its last access, so back-to-back requests leave no gap.
// A write engine (IS_WRITE=1) issues WRITE only while `wr_valid` is high and
// pops one data word per WRITE.
//
// Precharge-all, skipping activation on a row hit, bank-interleaved activates
// and burst length 1 follow the source design; deferring the precharge to the
// next miss and the cycle-count timing parameters are this design's choices.
module mc_ctrl
  import mc_pkg::*;
#(
  parameter bit          IS_WRITE = 1'b0,
  parameter int unsigned T_RCD = 2,
  parameter int unsigned T_RP  = 2,
  parameter int unsigned T_RRD = 2,
  parameter int unsigned T_RAS = 5,
  parameter int unsigned T_WR  = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // request handshake
  input  logic               req_valid,
  output logic               req_ready,
  // address generator
  output logic               ag_load,
  output logic               ag_step,
  input  logic [3:0]         need_vld,
  input  logic [BANK_W-1:0]  need_bank [4],
  input  logic [ROW_W-1:0]   need_row  [4],
  input  sdram_addr_t        addr,
  input  logic               last,
  // detection unit
  input  logic [3:0]         is_open,
  input  logic               all_open,
  input  logic [3:0]         bank_open,
  // write data available (tie high for a read engine)
  input  logic               wr_valid,
  // close request: stop taking requests, precharge all banks, report closed
  input  logic               close_req,
  output logic               closed,
  // operation issued this cycle
  output sdram_cmd_t         cmd,
  output logic               busy,
  output logic               hit_pulse,
  output logic               miss_pulse
);

  typedef enum logic [1:0] {S_IDLE, S_DECIDE, S_PRE, S_RUN} state_e;
  state_e state, state_d;

  localparam int unsigned AGE_MAX = 15;
  logic [3:0] act_age [4];
  logic [3:0] rrd_age, rp_age, wr_age;

  logic       rrd_ok, rp_ok, pre_ok;
  logic [3:0] act_pend;
  logic [1:0] act_sel;
  logic       acc_ok;

  assign rrd_ok = (rrd_age >= 4'(T_RRD));
  assign rp_ok  = (rp_age  >= 4'(T_RP));

  always_comb begin
    pre_ok = (wr_age >= 4'(T_WR));
    for (int b = 0; b < 4; b++)
      if (bank_open[b] && act_age[b] < 4'(T_RAS)) pre_ok = 1'b0;
  end

  // rows still to activate, and the first of them in TL, TR, BL, BR order
  assign act_pend = need_vld & ~is_open;
  always_comb begin
    act_sel = 2'd0;
    for (int i = 3; i >= 0; i--) if (act_pend[i]) act_sel = 2'(i);
  end

  assign acc_ok = bank_open[addr.bank] && (act_age[addr.bank] >= 4'(T_RCD)) &&
                  (!IS_WRITE || wr_valid);

  logic run_cycle;
  always_comb begin
    state_d    = state;
    cmd        = '{op: OP_NOP, bank: '0, row: '0, col: '0};
    req_ready  = 1'b0;
    ag_load    = 1'b0;
    ag_step    = 1'b0;
    hit_pulse  = 1'b0;
    miss_pulse = 1'b0;
    run_cycle  = 1'b0;
    case (state)
      S_IDLE: begin
        req_ready = !close_req;
        if (close_req) begin
          if (bank_open != 4'b0 && pre_ok) cmd.op = OP_PREALL;
        end else if (req_valid) begin
          ag_load = 1'b1;
          state_d = S_DECIDE;
        end
      end
      S_DECIDE: begin
        if (all_open) begin
          hit_pulse = 1'b1;
          run_cycle = 1'b1;
          state_d   = S_RUN;
        end else begin
          miss_pulse = 1'b1;
          if (bank_open == 4'b0) begin
            run_cycle = 1'b1;
            state_d   = S_RUN;
          end else if (pre_ok) begin
            cmd.op  = OP_PREALL;
            state_d = S_RUN;
          end else begin
            state_d = S_PRE;
          end
        end
      end
      S_PRE: begin
        if (pre_ok) begin
          cmd.op  = OP_PREALL;
          state_d = S_RUN;
        end
      end
      S_RUN: run_cycle = 1'b1;
      default: state_d = S_IDLE;
    endcase

    if (run_cycle) begin
      if (act_pend != 4'b0 && rrd_ok && rp_ok) begin
        cmd.op   = OP_ACT;
        cmd.bank = need_bank[act_sel];
        cmd.row  = need_row[act_sel];
      end else if (acc_ok) begin
        cmd.op   = IS_WRITE ? OP_WRITE : OP_READ;
        cmd.bank = addr.bank;
        cmd.row  = addr.row;
        cmd.col  = addr.col;
        ag_step  = 1'b1;
        if (last) begin
          req_ready = !close_req;
          if (req_valid && !close_req) begin
            ag_load = 1'b1;
            state_d = S_DECIDE;
          end else begin
            state_d = S_IDLE;
          end
        end
      end
    end
  end

  function automatic logic [3:0] age_next(logic [3:0] a);
    return (a == 4'(AGE_MAX)) ? a : a + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      rrd_age <= 4'(AGE_MAX);
      rp_age  <= 4'(AGE_MAX);
      wr_age  <= 4'(AGE_MAX);
      for (int b = 0; b < 4; b++) act_age[b] <= 4'(AGE_MAX);
    end else begin
      state   <= state_d;
      rrd_age <= (cmd.op == OP_ACT)    ? 4'd1 : age_next(rrd_age);
      rp_age  <= (cmd.op == OP_PREALL) ? 4'd1 : age_next(rp_age);
      wr_age  <= (cmd.op == OP_WRITE)  ? 4'd1 : age_next(wr_age);
      for (int b = 0; b < 4; b++)
        act_age[b] <= (cmd.op == OP_ACT && cmd.bank == 2'(b)) ? 4'd1 : age_next(act_age[b]);
    end
  end

  assign busy = (state != S_IDLE);
  // closed once idle with every bank precharged and tRP elapsed, so another
  // engine may take over this channel and activate at once
  assign closed = (state == S_IDLE) && (bank_open == 4'b0) && rp_ok;

  // an access may only go to an open bank past tRCD
  a_acc_open: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd.op == OP_READ || cmd.op == OP_WRITE) |-> (bank_open[cmd.bank] && act_age[cmd.bank] >= 4'(T_RCD)));
  // activates are spaced by tRRD and follow precharge by tRP
  a_act_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd.op == OP_ACT) |-> (rrd_ok && rp_ok && !bank_open[cmd.bank]));

endmodule
