// Self-checking testbench for cavlc_decoder.
//
// A reference CAVLC encoder (standard level/suffixLength rules, code tables
// from cavlc_enc_pkg) turns random coefficient blocks into one continuous
// bitstream; the decoder must return every block's coefficients, consume
// exactly the encoded number of bits, and take the number of cycles the
// decoding flow predicts (one for coeff_token, one per level or one when
// there is none, one for total_zeros, then one per one or two runs, plus one
// copy cycle when ZerosLeft runs out first). A known textbook block
// (0,3,0,1,-1,-1,0,1 -> 000010001110010111101101) is decoded first. Blocks
// cover nC classes 0-1, 2-3, 4-7, >=8 and chroma DC, 16/15/4 coefficients,
// empty blocks, escape-coded levels, and the critical all-nonzero case.
//
// The expected cycle counts follow the decoding flow of the design, which
// follows the source design except for the trailing-one write noted in
// cavlc_decoder.
module tb_cavlc_decoder;
  import cavlc_enc_pkg::*;

  localparam int N_BLOCKS = 400;
  localparam int LEVEL_W  = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        bs_valid, bs_ready, start, ready, done, zero_block;
  logic [31:0] bs_data, bit_pos;
  logic signed [5:0] nc;
  logic [4:0]  max_coeff, total_coeff;
  logic [7:0]  cycles;
  logic signed [LEVEL_W-1:0] coeff [16];

  cavlc_decoder #(.LEVEL_W(LEVEL_W)) dut (.*);

  int checks = 0, failures = 0;
  bit bits[$];
  int blk_nc[N_BLOCKS+1], blk_max[N_BLOCKS+1], blk_bits[N_BLOCKS+1], blk_cyc[N_BLOCKS+1];
  int blk_coef[N_BLOCKS+1][16];
  int n_zero = 0, n_escape = 0, n_two = 0, n_copy = 0, n_full = 0, n_dc = 0;

  function automatic void put(int len, int code);
    for (int i = len - 1; i >= 0; i--) bits.push_back(code[i]);
  endfunction

  // Encode one block; returns the cycle count the decoding flow should take.
  function automatic int encode(int c[16], int ncv, int maxc);
    int pos[16], lv[16];
    int tc = 0, t1s = 0, tz, sl, lc, cyc, zl, remain, i;
    vlc_t v;
    for (int p = maxc - 1; p >= 0; p--) if (c[p] != 0) begin pos[tc] = p; lv[tc] = c[p]; tc++; end
    for (i = 0; i < tc && i < 3; i++) if (lv[i] == 1 || lv[i] == -1) t1s++; else break;
    if (ncv < 0) v = enc_ct_cdc(tc, t1s);
    else if (ncv < 2) v = enc_ct_nc0(tc, t1s);
    else if (ncv < 4) v = enc_ct_nc2(tc, t1s);
    else if (ncv < 8) v = enc_ct_nc4(tc, t1s);
    else v = (tc == 0) ? '{len: 5'd6, code: 16'd3} : '{len: 5'd6, code: 16'(((tc - 1) << 2) | t1s)};
    put(v.len, v.code);
    if (tc == 0) return 1;
    for (i = 0; i < t1s; i++) put(1, lv[i] < 0);
    sl = (tc > 10 && t1s < 3) ? 1 : 0;
    for (i = t1s; i < tc; i++) begin
      lc = (lv[i] > 0) ? 2 * lv[i] - 2 : -2 * lv[i] - 1;
      if (i == t1s && t1s < 3) lc -= 2;
      if (sl == 0) begin
        if (lc < 14) put(lc + 1, 1);
        else if (lc < 30) begin put(15, 1); put(4, lc - 14); end
        else begin put(16, 1); put(12, lc - 30); n_escape++; end
      end else begin
        if (lc < (15 << sl)) begin put((lc >> sl) + 1, 1); put(sl, lc & ((1 << sl) - 1)); end
        else begin put(16, 1); put(12, lc - (15 << sl)); n_escape++; end
      end
      if (sl == 0) sl = 1;
      if (((lv[i] < 0) ? -lv[i] : lv[i]) > (3 << (sl - 1)) && sl < 6) sl++;
    end
    cyc = 1 + ((tc == t1s) ? 1 : (tc - t1s) + 1);
    tz = pos[0] + 1 - tc;
    if (tc < maxc) begin v = enc_tz(tc, tz, ncv < 0); put(v.len, v.code); end
    else n_full++;
    zl = tz; remain = tc - 1; i = 0;
    while (remain > 0) begin
      int r1, r2;
      cyc++;
      if (zl == 0) begin n_copy++; break; end
      r1 = pos[i] - pos[i+1] - 1;
      v = enc_rb(zl, r1); put(v.len, v.code); zl -= r1; i++; remain--;
      if (zl > 0 && (zl + r1) <= 6 && remain > 0) begin
        r2 = pos[i] - pos[i+1] - 1;
        v = enc_rb(zl, r2); put(v.len, v.code); zl -= r2; i++; remain--; n_two++;
      end
    end
    return cyc;
  endfunction

  int nblk = 0;
  initial begin
    int c[16], maxc, ncv, kind, dens, p;
    // textbook block, nC = 0
    c = '{0, 3, 0, 1, -1, -1, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0};
    blk_nc[0] = 0; blk_max[0] = 16; blk_coef[0] = c;
    blk_cyc[0] = encode(c, 0, 16); blk_bits[0] = bits.size(); nblk = 1;
    begin
      string s, e;
      s = ""; foreach (bits[k]) s = {s, bits[k] ? "1" : "0"};
      e = "000010001110010111101101";
      checks++; if (s != e) begin failures++; $display("FAIL reference encoding %s", s); end
    end
    for (int b = 1; b <= N_BLOCKS; b++) begin
      kind = $urandom_range(0, 9);
      if (kind == 0) begin ncv = -1; maxc = 4; n_dc++; end
      else begin
        maxc = ($urandom_range(0, 3) == 0) ? 15 : 16;
        case ($urandom_range(0, 3)) 0: ncv = $urandom_range(0, 1); 1: ncv = $urandom_range(2, 3);
                                    2: ncv = $urandom_range(4, 7); default: ncv = $urandom_range(8, 16); endcase
      end
      dens = $urandom_range(0, 10);
      for (int k = 0; k < 16; k++) begin
        c[k] = 0;
        if (k < maxc && $urandom_range(0, 9) < dens) begin
          p = $urandom_range(0, 99);
          c[k] = (p < 50) ? 1 : (p < 80) ? $urandom_range(2, 6) : (p < 95) ? $urandom_range(7, 60) : $urandom_range(61, 500);
          if ($urandom_range(0, 1)) c[k] = -c[k];
        end
      end
      if (b == 5) begin  // critical case: all nonzero except the first
        maxc = 16; ncv = 0; for (int k = 0; k < 16; k++) c[k] = (k == 0) ? 0 : 2 + k;
      end
      blk_nc[b] = ncv; blk_max[b] = maxc; blk_coef[b] = c;
      blk_cyc[b] = encode(c, ncv, maxc); blk_bits[b] = bits.size();
      if (blk_cyc[b] == 1) n_zero++;
      nblk++;
    end
    for (int k = 0; k < 64; k++) bits.push_back(1'b0);
  end

  // bitstream feeder: word widx of the bit queue, MSB first
  int widx = 0;
  function automatic logic [31:0] word_at(int w);
    logic [31:0] d;
    for (int k = 0; k < 32; k++) d[31-k] = (32*w + k < bits.size()) ? bits[32*w + k] : 1'b0;
    return d;
  endfunction
  assign bs_valid = 1'b1;
  always @(posedge clk) begin
    if (!rst_n) begin
      widx <= 0; bs_data <= word_at(0);
    end else if (bs_ready) begin
      widx <= widx + 1; bs_data <= word_at(widx + 1);
    end else begin
      bs_data <= word_at(widx);
    end
  end

  initial begin
    start = 1'b0; nc = '0; max_coeff = 5'd16;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int b = 0; b < nblk; b++) begin
      while (!ready) @(posedge clk);
      #1 start = 1'b1; nc = 6'(blk_nc[b]); max_coeff = 5'(blk_max[b]);
      @(posedge clk); #1 start = 1'b0;
      while (!done) @(posedge clk);
      #1;
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (int'(coeff[k]) != blk_coef[b][k]) begin
          failures++;
          if (failures < 20) $display("FAIL block %0d coeff %0d: got %0d want %0d", b, k, coeff[k], blk_coef[b][k]);
        end
      end
      checks++;
      if (int'(bit_pos) != blk_bits[b]) begin failures++; $display("FAIL block %0d bit_pos %0d want %0d", b, bit_pos, blk_bits[b]); end
      checks++;
      if (int'(cycles) != blk_cyc[b]) begin failures++; if (failures < 20) $display("FAIL block %0d cycles %0d want %0d", b, cycles, blk_cyc[b]); end
      checks++;
      if (zero_block != (blk_cyc[b] == 1)) begin failures++; $display("FAIL block %0d zero_block", b); end
      if (b == 5) $display("critical block (15 nonzero, one leading zero): %0d cycles", cycles);
      @(posedge clk);
    end
    $display("mechanisms: zero_blocks=%0d escapes=%0d two_run_cycles=%0d copy_rest=%0d full_blocks=%0d chroma_dc=%0d",
             n_zero, n_escape, n_two, n_copy, n_full, n_dc);
    checks++; if (n_zero == 0 || n_escape == 0 || n_two == 0 || n_copy == 0 || n_full == 0 || n_dc == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
