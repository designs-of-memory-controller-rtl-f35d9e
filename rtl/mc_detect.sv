// Detection unit of the frame memory controller.
//
// Keeps, for each of the four SDRAM banks, whether a row is open and which.
// Given the bank/row pairs a new request needs (from the address generator)
// it reports `all_open` when every one of them is already open, so the
// control FSM can skip precharge and activation (the inter-request
// optimisation), and a per-pair `is_open` mask. The table is updated from the
// operations the control FSM issues: a precharge-all closes every bank and an
// activate opens one row. Combinational lookup, registered table; after reset
// all banks are closed.
//
// Checking that all rows of a request are open follows the source design; the
// per-bank table kept from the issued commands is this design's choice.
module mc_detect
  import mc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [3:0]         need_vld,
  input  logic [BANK_W-1:0]  need_bank [4],
  input  logic [ROW_W-1:0]   need_row  [4],
  input  sdram_cmd_t         issued,
  output logic [3:0]         is_open,
  output logic               all_open,
  output logic [3:0]         bank_open
);

  logic [ROW_W-1:0] open_row [4];
  logic [3:0]       open_vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_vld <= '0;
      for (int b = 0; b < 4; b++) open_row[b] <= '0;
    end else begin
      case (issued.op)
        OP_PREALL: open_vld <= '0;
        OP_ACT: begin
          open_vld[issued.bank] <= 1'b1;
          open_row[issued.bank] <= issued.row;
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < 4; i++)
      is_open[i] = open_vld[need_bank[i]] && (open_row[need_bank[i]] == need_row[i]);
    all_open = &(is_open | ~need_vld);
  end

  assign bank_open = open_vld;

endmodule
