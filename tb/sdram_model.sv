// Behavioural model of one SDR SDRAM channel (4 banks x 4096 rows x 512
// columns x 32 bits, the organisation of the MT48LC8M32B2P), for simulation
// only; not synthesizable logic.
//
// It decodes the command pins at each rising edge, keeps one open row per
// bank and returns READ data CL cycles after the command (burst length 1).
// Storage is sparse: a word never written reads as a fixed hash of
// (SEED, bank, row, column), so testbenches can predict every pixel without
// loading the memory. It checks the timing rules it is given (tRCD, tRP,
// tRRD, tRAS, tWR in cycles), that accesses go to an open row and that an
// activate goes to a closed bank, and counts every breach in `violations`.
// Commands seen are counted for the testbench. The pins are ignored while
// rst_n is low, since the controller's pin registers are not yet reset then.
//
// The device organisation and timing rules are those of the MT48LC8M32B2P
// used by the source design; the model itself is a test aid.
module sdram_model
  import mc_pkg::*;
#(
  parameter int unsigned CL    = 2,
  parameter int unsigned T_RCD = 2,
  parameter int unsigned T_RP  = 2,
  parameter int unsigned T_RRD = 2,
  parameter int unsigned T_RAS = 5,
  parameter int unsigned T_WR  = 2,
  parameter int unsigned SEED  = 1
) (
  input  logic               clk,
  input  logic               rst_n,       // bus ignored while the controller is in reset
  input  sdram_pins_t        pins,
  input  logic [DATA_W-1:0]  dq_in,
  input  logic               dq_oe,
  output logic [DATA_W-1:0]  dq_out
);

  logic [DATA_W-1:0] mem [int];
  logic              open_v [4];
  logic [ROW_W-1:0]  open_r [4];
  longint            t_act [4];
  longint            t_lastact = -100, t_pre = -100, t_wr = -100, now = 0;
  int                violations = 0, n_act = 0, n_pre = 0, n_rd = 0, n_wr = 0, n_nop = 0;
  logic [DATA_W-1:0] pipe [CL];

  function automatic logic [DATA_W-1:0] hash(int b, int r, int c);
    int unsigned h;
    h = SEED * 32'h9E3779B1 ^ (b * 32'h85EBCA77) ^ (r * 32'hC2B2AE3D) ^ (c * 32'h27D4EB2F);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    return h ^ (h >> 13);
  endfunction

  function automatic logic [DATA_W-1:0] read_word(int b, int r, int c);
    int key;
    key = (b << 21) | (r << 9) | c;
    if (mem.exists(key)) return mem[key];
    return hash(b, r, c);
  endfunction

  function automatic void violate(string why);
    violations++;
    if (violations <= 5) $display("SDRAM seed %0d cycle %0d: %s", SEED, now, why);
  endfunction

  initial begin
    for (int b = 0; b < 4; b++) begin open_v[b] = 1'b0; open_r[b] = '0; t_act[b] = -100; end
    for (int i = 0; i < CL; i++) pipe[i] = '0;
  end

  assign dq_out = pipe[CL-1];

  always @(posedge clk) begin
    logic [DATA_W-1:0] rd;
    logic              is_rd;
    int                b;
    now++;
    b = int'(pins.ba);
    is_rd = 1'b0;
    rd = '0;
    if (rst_n && !pins.cs_n) begin
      case ({pins.ras_n, pins.cas_n, pins.we_n})
        3'b111: n_nop++;
        3'b000: ;      // mode register load (pins at power-up)
        3'b011: begin  // ACTIVE
          n_act++;
          if (open_v[b]) violate("ACT to open bank");
          if (now - t_lastact < T_RRD) violate("tRRD");
          if (now - t_pre < T_RP) violate("tRP");
          open_v[b] = 1'b1; open_r[b] = pins.a; t_act[b] = now; t_lastact = now;
        end
        3'b101: begin  // READ
          n_rd++;
          if (!open_v[b] || now - t_act[b] < T_RCD) violate("READ to closed bank or tRCD");
          if (pins.a[10]) violate("auto precharge");  // auto precharge is not expected
          rd = read_word(b, int'(open_r[b]), int'(pins.a[8:0]));
          is_rd = 1'b1;
        end
        3'b100: begin  // WRITE
          n_wr++;
          if (!open_v[b] || now - t_act[b] < T_RCD || !dq_oe) violate("WRITE to closed bank, tRCD or no data");
          mem[(b << 21) | (int'(open_r[b]) << 9) | int'(pins.a[8:0])] = dq_in;
          t_wr = now;
        end
        3'b010: begin  // PRECHARGE (all when A10)
          n_pre++;
          if (now - t_wr < T_WR) violate("tWR");
          for (int k = 0; k < 4; k++)
            if (pins.a[10] || k == b) begin
              if (open_v[k] && now - t_act[k] < T_RAS) violate("tRAS");
              open_v[k] = 1'b0;
            end
          t_pre = now;
        end
        default: violate("unknown command");
      endcase
    end
    for (int i = CL - 1; i > 0; i--) pipe[i] <= pipe[i-1];
    pipe[0] <= is_rd ? rd : '0;
  end

endmodule
