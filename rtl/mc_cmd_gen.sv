// Command generator of the frame memory controller.
//
// Translates the operation chosen by the control FSM into SDRAM command pins
// and registers them, together with the write data, so that the pins change
// only on the clock edge. Encoding (cs_n, ras_n, cas_n, we_n): NOP 0111,
// ACTIVE 0011 with the row on the address bus, READ 0101 and WRITE 0100 with
// the column on A[8:0] and A10 low (no auto precharge: the controller closes
// rows itself), PRECHARGE 0010 with A10 high (all banks). Burst length 1 is
// assumed to be programmed in the mode register. One cycle of latency from
// `cmd` to the pins; `dq_oe` is high in the cycle a WRITE is on the pins.
//
// Translating operations into SDRAM commands follows the source design;
// registering the pins is this design's choice.
module mc_cmd_gen
  import mc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  sdram_cmd_t         cmd,
  input  logic [DATA_W-1:0]  wdata,
  output sdram_pins_t        pins,
  output logic [DATA_W-1:0]  dq_out,
  output logic               dq_oe
);

  sdram_pins_t p_d;

  always_comb begin
    p_d = '{cs_n: 1'b0, ras_n: 1'b1, cas_n: 1'b1, we_n: 1'b1, ba: cmd.bank, a: '0};
    case (cmd.op)
      OP_ACT:    begin p_d.ras_n = 1'b0; p_d.a = cmd.row; end
      OP_READ:   begin p_d.cas_n = 1'b0; p_d.a = ROW_W'(cmd.col); end
      OP_WRITE:  begin p_d.cas_n = 1'b0; p_d.we_n = 1'b0; p_d.a = ROW_W'(cmd.col); end
      OP_PREALL: begin p_d.ras_n = 1'b0; p_d.we_n = 1'b0; p_d.a[10] = 1'b1; p_d.ba = '0; end
      default:   ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pins   <= '{cs_n: 1'b1, ras_n: 1'b1, cas_n: 1'b1, we_n: 1'b1, ba: '0, a: '0};
      dq_out <= '0;
      dq_oe  <= 1'b0;
    end else begin
      pins   <= p_d;
      dq_out <= wdata;
      dq_oe  <= (cmd.op == OP_WRITE);
    end
  end

endmodule
