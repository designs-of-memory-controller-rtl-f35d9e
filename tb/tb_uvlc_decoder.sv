// Self-checking testbench for uvlc_decoder.
//
// A reference Exp-Golomb encoder turns a random list of syntax elements
// (ue, se, te with range 1 and above, me for intra and inter
// coded_block_pattern, u(n) fields) into one bitstream, fed as 32-bit words.
// The decoder is asked for the same list, one request per cycle when it is
// ready; each result must carry the right value and code length and appear
// exactly one cycle after the request is taken. A fixed prefix checks the
// textbook codes 1 -> 0, 010 -> 1, 011 -> 2, 00100 -> 3 and the signed
// mapping 010 -> +1, 011 -> -1. Long codes up to 31 bits are included.
//
// The code tables for me are the H.264 coded_block_pattern tables.
module tb_uvlc_decoder;

  localparam int N_ELEM = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               bs_valid, bs_ready, se_valid, se_ready, te_range_gt1, res_valid;
  logic [31:0]        bs_data;
  logic [2:0]         se_kind;
  logic [4:0]         se_bits;
  logic signed [31:0] res_value;
  logic [5:0]         res_len;

  uvlc_decoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // H.264 coded_block_pattern mapping, codeNum -> cbp (4:2:0)
  int intra_t [48] = '{47,31,15,0,23,27,29,30,7,11,13,14,39,43,45,46,16,3,5,10,12,19,21,26,
                       28,35,37,42,44,1,2,4,8,17,18,20,24,6,9,22,25,32,33,34,36,40,38,41};
  int inter_t [48] = '{0,16,1,2,4,8,32,3,5,10,12,15,47,7,11,13,14,6,9,31,35,37,42,44,
                       33,34,36,40,39,43,45,46,17,18,20,24,19,21,26,28,23,27,29,30,22,25,38,41};

  bit bits [$];
  function automatic void put(longint unsigned v, int n);
    for (int i = n - 1; i >= 0; i--) bits.push_back(bit'((v >> i) & 1));
  endfunction
  function automatic int put_ue(int unsigned k);
    int n;
    n = 0;
    while ((longint'(k) + 1) >> (n + 1) != 0) n++;
    put(0, n);
    put(longint'(k) + 1, n + 1);
    return 2 * n + 1;
  endfunction

  typedef struct { int kind, nbits, gt1, value, len; } elem_t;
  elem_t elems [$];

  function automatic void add(int kind, int value, int nbits, int gt1);
    elem_t e;
    e.kind = kind; e.value = value; e.nbits = nbits; e.gt1 = gt1;
    case (kind)
      0: e.len = put_ue(value);
      1: e.len = put_ue(value > 0 ? 2 * value - 1 : -2 * value);
      2: if (gt1) e.len = put_ue(value); else begin put(value == 0 ? 1 : 0, 1); e.len = 1; end
      3, 4: begin
        int k;
        k = 0;
        for (int i = 0; i < 48; i++) if ((kind == 3 ? intra_t[i] : inter_t[i]) == value) k = i;
        e.len = put_ue(k);
      end
      default: begin put(value, nbits); e.len = nbits; end
    endcase
    elems.push_back(e);
  endfunction

  int n_kind [6];

  initial begin
    for (int i = 0; i < 6; i++) n_kind[i] = 0;
    add(0, 0, 0, 0); add(0, 1, 0, 0); add(0, 2, 0, 0); add(0, 3, 0, 0);
    add(1, 1, 0, 0); add(1, -1, 0, 0);
    add(0, 32'h7FFD, 0, 0); add(1, -16383, 0, 0);
    for (int n = 0; n < N_ELEM; n++) begin
      int kind, r;
      kind = $urandom_range(0, 5);
      r = $urandom_range(0, 3);
      case (kind)
        0: add(0, r == 0 ? $urandom_range(0, 32'h7FFD) : $urandom_range(0, 1 << (4 * r)), 0, 0);
        1: add(1, $urandom_range(0, 1 << (3 * r + 1)) - (1 << (3 * r)), 0, 0);
        2: begin
          int g;
          g = $urandom_range(0, 1);
          add(2, g ? $urandom_range(0, 30) : $urandom_range(0, 1), 0, g);
        end
        3: add(3, intra_t[$urandom_range(0, 47)], 0, 0);
        4: add(4, inter_t[$urandom_range(0, 47)], 0, 0);
        default: begin
          int nb;
          nb = $urandom_range(1, 16);
          add(5, $urandom_range(0, (1 << nb) - 1), nb, 0);
        end
      endcase
    end
    repeat (64) bits.push_back(1'b0);
  end

  // bitstream feeder
  int widx = 0;
  function automatic logic [31:0] word_at(int w);
    logic [31:0] d;
    for (int i = 0; i < 32; i++) d[31-i] = (w * 32 + i < bits.size()) ? bits[w * 32 + i] : 1'b0;
    return d;
  endfunction
  assign bs_valid = rst_n;
  always @(posedge clk) begin
    if (!rst_n) begin
      widx <= 1; bs_data <= word_at(0);
    end else if (bs_ready) begin
      bs_data <= word_at(widx);
      widx <= widx + 1;
    end
  end

  int n_res = 0, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    se_valid = 1'b0; se_kind = '0; se_bits = '0; te_range_gt1 = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (elems.size() == N_ELEM + 8);
    @(negedge clk);
    for (int i = 0; i < elems.size(); i++) begin
      bit r;
      se_valid = 1'b1; se_kind = 3'(elems[i].kind); se_bits = 5'(elems[i].nbits);
      te_range_gt1 = elems[i].gt1[0];
      forever begin
        #1 r = se_ready;
        @(posedge clk);
        if (r) break;
        @(negedge clk);
        check(!res_valid, "no result without a request");
      end
      // the result registered at the accepting edge must be on res_* now
      @(negedge clk);
      check(res_valid, "result one cycle after the request");
      check(res_value == elems[i].value && int'(res_len) == elems[i].len,
            $sformatf("elem %0d kind %0d: got %0d/%0d exp %0d/%0d", i, elems[i].kind,
                      res_value, res_len, elems[i].value, elems[i].len));
      if (res_valid) begin n_kind[elems[i].kind]++; n_res++; end
    end
    se_valid = 1'b0;
    repeat (5) @(posedge clk);
    check(n_res == elems.size(), "all elements decoded");
    for (int k = 0; k < 6; k++) check(n_kind[k] > 0, $sformatf("mechanism: kind %0d decoded", k));
    $display("decoded %0d elements, ue %0d se %0d te %0d me-intra %0d me-inter %0d u(n) %0d, %0d cycles",
             n_res, n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_kind[4], n_kind[5], cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
