// Full-size testbench of h264_mem_entropy_top (default parameters).
//
// One instance of the top runs three traffic sources at the same time, each
// in its own scope and each with its own checks:
//  * g_mem - the frame memory controller with two behavioural SDRAM
//    channels: directed cycle counts for first access, row hit and one-,
//    two- and four-row misses (L+2, L, L+4, L+5, L+7), macroblock writes,
//    channel swaps and random partition reads, every pixel compared with a
//    prediction, no SDRAM timing violation;
//  * g_uv  - the UVLC decoder on a random Exp-Golomb stream of ue, se, te,
//    me and u(n) elements, one result per cycle;
//  * g_cv  - the CAVLC decoder on random 4x4 and chroma DC blocks from a
//    reference encoder, coefficients, bits used and cycle counts checked.
// Each scope fails if one of its mechanisms (row hit, row miss, one/two/four
// rows, swap, writes, z-scan, fractional reads; every UVLC kind; zero block,
// escape, two runs per cycle, copy of the rest, full block, chroma DC) never
// occurred. The result line sums the three scopes.
//
// The three scopes are generated from the unit testbenches, so they check the
// same things at the top level.
module tb_top;
  import mc_pkg::*;
  import cavlc_enc_pkg::*;

  localparam int LEVEL_W = 10;

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
  logic               rd_hit, rd_miss, wr_hit, wr_miss, mc_busy;

  logic               ue_bs_valid, ue_bs_ready, se_valid, se_ready, te_range_gt1, se_res_valid;
  logic [31:0]        ue_bs_data;
  logic [2:0]         se_kind;
  logic [4:0]         se_bits;
  logic signed [31:0] se_res_value;
  logic [5:0]         se_res_len;

  logic               cv_bs_valid, cv_bs_ready, cv_start, cv_ready, cv_done, cv_zero_block;
  logic [31:0]        cv_bs_data, cv_bit_pos;
  logic signed [5:0]  cv_nc;
  logic [4:0]         cv_max_coeff, cv_total_coeff;
  logic [7:0]         cv_cycles;
  logic signed [LEVEL_W-1:0] cv_coeff [16];

  h264_mem_entropy_top dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  if (1) begin : g_mem
    logic sec_done = 1'b0;



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
    while (mc_busy || exp_q.size() != 0) @(posedge clk);
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
    wait (rst_n);
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
    sec_done = 1'b1;
  end

  end : g_mem

  if (1) begin : g_uv
    logic sec_done = 1'b0;


  localparam int N_ELEM = 3000;


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
  assign ue_bs_valid = rst_n;
  always @(posedge clk) begin
    if (!rst_n) begin
      widx <= 1; ue_bs_data <= word_at(0);
    end else if (ue_bs_ready) begin
      ue_bs_data <= word_at(widx);
      widx <= widx + 1;
    end
  end

  int n_res = 0, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    se_valid = 1'b0; se_kind = '0; se_bits = '0; te_range_gt1 = 1'b0;
    repeat (3) @(posedge clk);
    wait (rst_n);
    @(negedge clk);
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
        check(!se_res_valid, "no result without a request");
      end
      // the result registered at the accepting edge must be on res_* now
      @(negedge clk);
      check(se_res_valid, "result one cycle after the request");
      check(se_res_value == elems[i].value && int'(se_res_len) == elems[i].len,
            $sformatf("elem %0d kind %0d: got %0d/%0d exp %0d/%0d", i, elems[i].kind,
                      se_res_value, se_res_len, elems[i].value, elems[i].len));
      if (se_res_valid) begin n_kind[elems[i].kind]++; n_res++; end
    end
    se_valid = 1'b0;
    repeat (5) @(posedge clk);
    check(n_res == elems.size(), "all elements decoded");
    for (int k = 0; k < 6; k++) check(n_kind[k] > 0, $sformatf("mechanism: kind %0d decoded", k));
    $display("decoded %0d elements, ue %0d se %0d te %0d me-intra %0d me-inter %0d u(n) %0d, %0d cycles",
             n_res, n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_kind[4], n_kind[5], cyc);
    sec_done = 1'b1;
  end

  end : g_uv

  if (1) begin : g_cv
    logic sec_done = 1'b0;


  localparam int N_BLOCKS = 400;


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
  assign cv_bs_valid = 1'b1;
  always @(posedge clk) begin
    if (!rst_n) begin
      widx <= 0; cv_bs_data <= word_at(0);
    end else if (cv_bs_ready) begin
      widx <= widx + 1; cv_bs_data <= word_at(widx + 1);
    end else begin
      cv_bs_data <= word_at(widx);
    end
  end

  initial begin
    cv_start = 1'b0; cv_nc = '0; cv_max_coeff = 5'd16;
    wait (rst_n);
    @(posedge clk);
    for (int b = 0; b < nblk; b++) begin
      while (!cv_ready) @(posedge clk);
      #1 cv_start = 1'b1; cv_nc = 6'(blk_nc[b]); cv_max_coeff = 5'(blk_max[b]);
      @(posedge clk); #1 cv_start = 1'b0;
      while (!cv_done) @(posedge clk);
      #1;
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (int'(cv_coeff[k]) != blk_coef[b][k]) begin
          failures++;
          if (failures < 20) $display("FAIL block %0d cv_coeff %0d: got %0d want %0d", b, k, cv_coeff[k], blk_coef[b][k]);
        end
      end
      checks++;
      if (int'(cv_bit_pos) != blk_bits[b]) begin failures++; $display("FAIL block %0d cv_bit_pos %0d want %0d", b, cv_bit_pos, blk_bits[b]); end
      checks++;
      if (int'(cv_cycles) != blk_cyc[b]) begin failures++; if (failures < 20) $display("FAIL block %0d cv_cycles %0d want %0d", b, cv_cycles, blk_cyc[b]); end
      checks++;
      if (cv_zero_block != (blk_cyc[b] == 1)) begin failures++; $display("FAIL block %0d cv_zero_block", b); end
      if (b == 5) $display("critical block (15 nonzero, one leading zero): %0d cycles", cv_cycles);
      @(posedge clk);
    end
    $display("mechanisms: zero_blocks=%0d escapes=%0d two_run_cycles=%0d copy_rest=%0d full_blocks=%0d chroma_dc=%0d",
             n_zero, n_escape, n_two, n_copy, n_full, n_dc);
    checks++; if (n_zero == 0 || n_escape == 0 || n_two == 0 || n_copy == 0 || n_full == 0 || n_dc == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    sec_done = 1'b1;
  end

  end : g_cv

  initial begin
    int checks, failures;
    wait (g_mem.sec_done && g_uv.sec_done && g_cv.sec_done);
    checks   = g_mem.checks + g_uv.checks + g_cv.checks;
    failures = g_mem.failures + g_uv.failures + g_cv.failures;
    $display("scopes: memory %0d/%0d, uvlc %0d/%0d, cavlc %0d/%0d (checks/failures)",
             g_mem.checks, g_mem.failures, g_uv.checks, g_uv.failures, g_cv.checks, g_cv.failures);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d",
             g_mem.checks + g_uv.checks + g_cv.checks, g_mem.failures + g_uv.failures + g_cv.failures + 1);
    $finish;
  end

endmodule
