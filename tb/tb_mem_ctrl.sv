// Self-checking testbench for mem_ctrl with two behavioural SDRAM channels.
//
// Phase 1 (directed, reference channel 0 after reset) checks the command
// sequences and cycle counts of single partition reads: the first access
// with all banks closed (ACT NOP READ..., L+2 cycles from the activate to the
// last READ), a row hit (L READs back to back, no activate or precharge) and
// row misses with open banks touching one, two and four rows, which must take
// L+4, L+5 and L+7 cycles from the precharge to the last READ - the
// document's counts, with its closing precharge moved to the front.
// Phase 2 writes macroblocks into the other channel, swaps the channels and
// reads the macroblocks back. Phase 3 runs random partition reads (z-scan or
// whole partition, integer or fractional motion vectors) while random
// macroblock writes run concurrently, with swaps in between. Every returned
// pixel is compared with a prediction made from this testbench's own copy of
// the address mapping and the SDRAM model's fill pattern; the SDRAM models
// must report no timing or protocol violation. Each mechanism (hit, miss,
// one/two/four-row requests, swap, write, z-scan, fractional) must occur.
//
// The L+4, L+5 and L+7 counts are those of the source design.
module tb_mem_ctrl;
  import mc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               mc_valid, mc_ready, mc_fx, mc_fy, mc_zscan;
  logic [FRAME_W-1:0] mc_frame;
  logic [COORD_W-1:0] mc_x, mc_y;
  logic [2:0]         mc_w4, mc_h4;
  logic               rd_valid, rd_eol, rd_last;
  logic [DATA_W-1:0]  rd_data;
  logic [2:0]         rd_n_pix;
  logic               wq_valid, wq_ready, wd_valid, wd_ready;
  mc_req_t            wq_req;
  logic [DATA_W-1:0]  wd_data;
  logic               frame_swap, ref_ch;
  sdram_pins_t        ch_pins   [2];
  logic [DATA_W-1:0]  ch_dq_out [2];
  logic               ch_dq_oe  [2];
  logic [DATA_W-1:0]  ch_dq_in  [2];
  logic               rd_hit, rd_miss, wr_hit, wr_miss, busy;

  mem_ctrl dut (.*);

  sdram_model #(.SEED(11)) u_ch0 (.clk, .rst_n, .pins(ch_pins[0]), .dq_in(ch_dq_out[0]),
                                  .dq_oe(ch_dq_oe[0]), .dq_out(ch_dq_in[0]));
  sdram_model #(.SEED(22)) u_ch1 (.clk, .rst_n, .pins(ch_pins[1]), .dq_in(ch_dq_out[1]),
                                  .dq_oe(ch_dq_oe[1]), .dq_out(ch_dq_in[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- reference model of the frame store ----------------
  function automatic int m_bank(int x, int y); return ((y >> 5) & 1) * 2 + ((x >> 6) & 1); endfunction
  function automatic int m_row(int f, int x, int y); return (f << 9) | (((y >> 6) & 31) << 4) | ((x >> 7) & 15); endfunction
  function automatic int m_col(int x, int y); return (((x >> 2) & 15) << 5) | (y & 31); endfunction

  function automatic logic [31:0] fill(int seed, int b, int r, int c);
    int unsigned h;
    h = seed * 32'h9E3779B1 ^ (b * 32'h85EBCA77) ^ (r * 32'hC2B2AE3D) ^ (c * 32'h27D4EB2F);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    return h ^ (h >> 13);
  endfunction

  logic [7:0] written [2][int];   // pixels written through the write port
  function automatic int pkey(int f, int x, int y); return (f << 22) | (x << 11) | y; endfunction

  function automatic logic [7:0] pixel(int ch, int f, int x, int y);
    logic [31:0] w;
    if (written[ch].exists(pkey(f, x, y))) return written[ch][pkey(f, x, y)];
    w = fill(ch == 0 ? 11 : 22, m_bank(x, y), m_row(f, x, y), m_col(x, y));
    return w[8*(x & 3) +: 8];
  endfunction

  // ---------------- expected read stream ----------------
  typedef struct { int ch, f, x, y, w, h; } sub_t;
  sub_t exp_q [$];
  int   n_case [5];
  int   n_zscan = 0, n_frac = 0, n_sub = 0;

  function automatic int n_rows(int x, int y, int w, int h);
    int bx, by;
    bx = ((x >> 6) != ((x + w - 1) >> 6)) ? 2 : 1;
    by = ((y >> 5) != ((y + h - 1) >> 5)) ? 2 : 1;
    return bx * by;
  endfunction

  function automatic int n_words(int x, int w, int h);
    return h * (((x + w - 1) >> 2) - (x >> 2) + 1);
  endfunction

  // queue the sub-requests the scheduler must produce for a partition
  function automatic void expect_part(int ch, int f, int x, int y, int w4, int h4,
                                      bit fx, bit fy, bit zs);
    sub_t s;
    s.ch = ch; s.f = f;
    if (zs) begin
      for (int i = 0; i < 16; i++) begin
        int bx, by;
        bx = ((i >> 2) & 1) * 2 + (i & 1);
        by = ((i >> 3) & 1) * 2 + ((i >> 1) & 1);
        if (bx < w4 && by < h4) begin
          s.x = x + 4 * bx - (fx ? 2 : 0); s.y = y + 4 * by - (fy ? 2 : 0);
          s.w = fx ? 9 : 4; s.h = fy ? 9 : 4;
          exp_q.push_back(s);
          n_case[n_rows(s.x, s.y, s.w, s.h)]++;
        end
      end
    end else begin
      s.x = x - (fx ? 2 : 0); s.y = y - (fy ? 2 : 0);
      s.w = 4 * w4 + (fx ? 5 : 0); s.h = 4 * h4 + (fy ? 5 : 0);
      exp_q.push_back(s);
      n_case[n_rows(s.x, s.y, s.w, s.h)]++;
    end
  endfunction

  // read data checker: walk the expected sub-requests pixel by pixel
  int cur_px = 0, cur_line = 0, n_pix_ok = 0;
  always @(posedge clk) begin
    if (rst_n && rd_valid) begin
      if (exp_q.size() == 0) begin
        check(1'b0, "read data with no request outstanding");
      end else begin
        sub_t s;
        s = exp_q[0];
        for (int k = 0; k < int'(rd_n_pix); k++) begin
          logic [7:0] e;
          e = pixel(s.ch, s.f, s.x + cur_px, s.y + cur_line);
          check(rd_data[8*k +: 8] == e,
                $sformatf("pixel ch%0d f%0d (%0d,%0d) got %02h exp %02h", s.ch, s.f,
                          s.x + cur_px, s.y + cur_line, rd_data[8*k +: 8], e));
          if (rd_data[8*k +: 8] == e) n_pix_ok++;
          cur_px++;
        end
        check(rd_eol == (cur_px >= s.w), "end-of-line flag");
        if (cur_px >= s.w) begin
          check(cur_px == s.w, "pixels per line");
          cur_px = 0; cur_line++;
        end
        check(rd_last == (cur_line == s.h), "last flag");
        if (rd_last || cur_line >= s.h) begin
          void'(exp_q.pop_front());
          cur_px = 0; cur_line = 0; n_sub++;
        end
      end
    end
  end

  // command monitor on the reference channel
  int cyc = 0, t_first = -1, t_last_rd = -1, c_act = 0, c_pre = 0, c_rd = 0, c_wr_ref = 0;
  always @(posedge clk) begin
    sdram_pins_t p;
    cyc++;
    p = ch_pins[ref_ch];
    if (rst_n && !p.cs_n) begin
      case ({p.ras_n, p.cas_n, p.we_n})
        3'b011: begin c_act++; if (t_first < 0) t_first = cyc; end
        3'b010: begin c_pre++; if (t_first < 0) t_first = cyc; end
        3'b101: begin c_rd++;  if (t_first < 0) t_first = cyc; t_last_rd = cyc; end
        3'b100: c_wr_ref++;
        default: ;
      endcase
    end
  end

  int n_hit = 0, n_miss = 0, n_whit = 0, n_wmiss = 0, n_swap = 0, n_wr_mb = 0;
  always @(posedge clk) if (rst_n) begin
    n_hit += int'(rd_hit); n_miss += int'(rd_miss);
    n_whit += int'(wr_hit); n_wmiss += int'(wr_miss);
  end

  // ---------------- stimulus ----------------
  task automatic send_part(int f, int x, int y, int w4, int h4, bit fx, bit fy, bit zs);
    expect_part(int'(ref_ch), f, x, y, w4, h4, fx, fy, zs);
    if (zs) n_zscan++;
    if (fx || fy) n_frac++;
    @(negedge clk);
    mc_valid = 1'b1; mc_frame = FRAME_W'(f); mc_x = COORD_W'(x); mc_y = COORD_W'(y);
    mc_w4 = 3'(w4); mc_h4 = 3'(h4); mc_fx = fx; mc_fy = fy; mc_zscan = zs;
    forever begin
      bit r;
      #1 r = mc_ready;
      @(posedge clk);
      if (r) break;
      @(negedge clk);
    end
    @(negedge clk);
    mc_valid = 1'b0;
  endtask

  task automatic wait_idle();
    repeat (2) @(posedge clk);
    while (busy || exp_q.size() != 0) @(posedge clk);
    repeat (8) @(posedge clk);
  endtask

  // one directed read, returns command span on the reference channel
  task automatic timed_read(int f, int x, int y, int w4, int h4, bit fx, bit fy,
                            output int span, output int acts, output int pres, output int L);
    wait_idle();
    t_first = -1; t_last_rd = -1; c_act = 0; c_pre = 0; c_rd = 0;
    send_part(f, x, y, w4, h4, fx, fy, 1'b0);
    wait_idle();
    span = t_last_rd - t_first + 1;
    acts = c_act; pres = c_pre;
    L = n_words(x - (fx ? 2 : 0), 4 * w4 + (fx ? 5 : 0), 4 * h4 + (fy ? 5 : 0));
    check(c_rd == L, $sformatf("READ count %0d exp %0d", c_rd, L));
  endtask

  // macroblock write feeder (runs in its own process)
  typedef struct { int f, x, y; logic [7:0] px [256]; } mb_t;
  mb_t wr_q [$];
  int  wr_pending = 0;

  task automatic queue_mb(int f, int x, int y);
    mb_t m;
    m.f = f; m.x = x; m.y = y;
    for (int i = 0; i < 256; i++) m.px[i] = 8'($urandom);
    // the frame store contents are known as soon as the write is queued:
    // the write engine completes before any swap makes this channel readable
    for (int i = 0; i < 256; i++) written[1 - int'(ref_ch)][pkey(f, x + i % 16, y + i / 16)] = m.px[i];
    wr_q.push_back(m);
    wr_pending++;
  endtask

  initial begin
    wq_valid = 1'b0; wd_valid = 1'b0; wq_req = '0; wd_data = '0;
    forever begin
      @(negedge clk);
      if (wr_q.size() != 0) begin
        mb_t m;
        m = wr_q.pop_front();
        wq_valid = 1'b1;
        wq_req = '{frame: FRAME_W'(m.f), x: COORD_W'(m.x), y: COORD_W'(m.y), w: LEN_W'(16), h: LEN_W'(16)};
        forever begin
          bit r;
          #1 r = wq_ready;
          @(posedge clk);
          if (r) break;
          @(negedge clk);
        end
        @(negedge clk);
        wq_valid = 1'b0;
        for (int wi = 0; wi < 64; wi++) begin
          if ($urandom_range(0, 7) == 0) begin
            wd_valid = 1'b0;
            @(negedge clk);
          end
          wd_valid = 1'b1;
          wd_data = {m.px[(wi / 4) * 16 + (wi % 4) * 4 + 3], m.px[(wi / 4) * 16 + (wi % 4) * 4 + 2],
                     m.px[(wi / 4) * 16 + (wi % 4) * 4 + 1], m.px[(wi / 4) * 16 + (wi % 4) * 4]};
          forever begin
            bit r;
            #1 r = wd_ready;
            @(posedge clk);
            if (r) break;
            @(negedge clk);
          end
          @(negedge clk);
        end
        wd_valid = 1'b0;
        wr_pending--;
        n_wr_mb++;
      end
    end
  end

  task automatic do_swap();
    logic old;
    old = ref_ch;
    while (wr_pending != 0) @(posedge clk);
    @(negedge clk);
    frame_swap = 1'b1;
    @(negedge clk);
    frame_swap = 1'b0;
    while (ref_ch == old) @(posedge clk);
    n_swap++;
  endtask

  int span, acts, pres, L;

  initial begin
    mc_valid = 1'b0; mc_frame = '0; mc_x = '0; mc_y = '0; mc_w4 = '0; mc_h4 = '0;
    mc_fx = 1'b0; mc_fy = 1'b0; mc_zscan = 1'b0; frame_swap = 1'b0;
    for (int i = 0; i < 5; i++) n_case[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // ---- phase 1: command sequences and cycle counts ----
    timed_read(0, 8, 8, 2, 2, 0, 0, span, acts, pres, L);           // closed banks, one row
    check(acts == 1 && pres == 0, "first access: one ACT, no PRE");
    check(span == L + 2, $sformatf("first access span %0d exp L+2=%0d", span, L + 2));
    timed_read(0, 12, 4, 2, 2, 0, 0, span, acts, pres, L);          // same row: hit
    check(acts == 0 && pres == 0, "row hit: no ACT or PRE");
    check(span == L, $sformatf("row hit span %0d exp L=%0d", span, L));
    timed_read(1, 20, 6, 2, 2, 1, 1, span, acts, pres, L);          // case 1 miss
    check(acts == 1 && pres == 1, "case 1: PRE + one ACT");
    check(span == L + 4, $sformatf("case 1 span %0d exp L+4=%0d", span, L + 4));
    timed_read(2, 60, 8, 2, 2, 1, 1, span, acts, pres, L);          // case 2 (horizontal)
    check(acts == 2 && pres == 1, "case 2: PRE + two ACT");
    check(span == L + 5, $sformatf("case 2 span %0d exp L+5=%0d", span, L + 5));
    timed_read(3, 40, 24, 2, 2, 1, 1, span, acts, pres, L);         // case 2 (vertical)
    check(acts == 2 && pres == 1, "case 2v: PRE + two ACT");
    check(span == L + 5, $sformatf("case 2v span %0d exp L+5=%0d", span, L + 5));
    timed_read(4, 58, 26, 4, 4, 1, 1, span, acts, pres, L);         // case 3: four rows
    check(acts == 4 && pres == 1, "case 4: PRE + four ACT");
    check(span == L + 7, $sformatf("case 4 span %0d exp L+7=%0d", span, L + 7));
    timed_read(4, 60, 28, 4, 4, 0, 0, span, acts, pres, L);         // same four rows: hit
    check(acts == 0 && pres == 0 && span == L, "four-row hit");
    check(u_ch0.violations == 0 && u_ch1.violations == 0, "no SDRAM violations after phase 1");

    // ---- phase 2: write macroblocks, swap, read them back ----
    for (int m = 0; m < 6; m++) queue_mb(m % 2, 48 + 16 * m, 16 + 16 * (m % 3));
    do_swap();
    for (int m = 0; m < 6; m++) send_part(m % 2, 48 + 16 * m, 16 + 16 * (m % 3), 4, 4, 0, 0, 1'b0);
    for (int m = 0; m < 6; m++) send_part(m % 2, 50 + 16 * m, 18 + 16 * (m % 3), 2, 2, 1, 1, 1'b1);
    wait_idle();

    // ---- phase 3: random reads with concurrent writes and swaps ----
    for (int n = 0; n < 300; n++) begin
      int f, x, y, w4, h4;
      if (n % 100 == 99) begin
        wait_idle();
        do_swap();
      end
      if ($urandom_range(0, 3) == 0) begin
        // two horizontally adjacent macroblocks: the second is a row hit
        // unless the pair straddles a 64-pixel window edge
        int wf, wx, wy;
        wf = $urandom_range(0, 7); wx = 16 * $urandom_range(0, 20); wy = 16 * $urandom_range(0, 20);
        queue_mb(wf, wx, wy);
        queue_mb(wf, wx + 16, wy);
      end
      f  = $urandom_range(0, 1);
      x  = $urandom_range(2, 200);
      y  = $urandom_range(2, 150);
      w4 = 1 << $urandom_range(0, 2);
      h4 = 1 << $urandom_range(0, 2);
      send_part(f, x, y, w4, h4, 1'($urandom), 1'($urandom), 1'($urandom));
    end
    wait_idle();
    while (wr_pending != 0) @(posedge clk);
    wait_idle();

    check(exp_q.size() == 0, "all requests answered");
    check(u_ch0.violations == 0, $sformatf("channel 0 violations %0d", u_ch0.violations));
    check(u_ch1.violations == 0, $sformatf("channel 1 violations %0d", u_ch1.violations));
    check(n_hit > 0,  "mechanism: read row hit");
    check(n_miss > 0, "mechanism: read row miss");
    check(n_whit > 0 && n_wmiss > 0, "mechanism: write hit and miss");
    check(n_case[1] > 0, "mechanism: one-row request");
    check(n_case[2] > 0, "mechanism: two-row request");
    check(n_case[4] > 0, "mechanism: four-row request");
    check(n_swap >= 3, "mechanism: channel swap");
    check(n_wr_mb > 0 && written[0].size() > 0 && written[1].size() > 0, "mechanism: writes to both channels");
    check(n_zscan > 0 && n_frac > 0, "mechanism: z-scan and fractional requests");
    $display("sub-requests %0d, pixels ok %0d, hits %0d misses %0d, write hits %0d misses %0d, rows 1/2/4: %0d/%0d/%0d, swaps %0d, MB writes %0d",
             n_sub, n_pix_ok, n_hit, n_miss, n_whit, n_wmiss, n_case[1], n_case[2], n_case[4], n_swap, n_wr_mb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
