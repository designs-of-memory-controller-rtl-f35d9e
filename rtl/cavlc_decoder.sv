// CAVLC residual block decoder with partial multi-symbol decoding, zero
// skipping and skipped merging.
//
// One 4x4 (16 or 15 coefficients) or chroma DC 2x2 (4 coefficients) block is
// decoded per `start`. The flow, one step per clock:
//   1. coeff_token: TotalCoeff and TrailingOnes; the codeword and the sign
//      bits of the trailing ones are consumed together. An empty block ends
//      here (`zero_block`), the coefficient buffer being already zero.
//   2. trailing-one signs go into the level buffer (up to three at once)
//      while the first remaining level, or total_zeros if there is none, is
//      decoded in the same cycle.
//   3. one level per cycle.
//   4. total_zeros (skipped when TotalCoeff equals the block size); in the
//      same cycle the first level is placed at TotalCoeff+TotalZeros-1.
//   5. run_before: one run per cycle while ZerosLeft > 6, two runs per cycle
//      when ZerosLeft <= 6; each decoded run places its level directly into
//      the zero-initialised coefficient buffer.
//   6. when ZerosLeft reaches 0, all remaining levels are copied in one cycle.
// `done` pulses in the cycle after the last step, with `coeff` (scan order),
// `total_coeff`, `zero_block` and `cycles` (clock cycles spent in steps 1-6) valid until the next start.
//
// Interface: bitstream words (MSB first) through bs_valid/bs_ready; `start`
// with `nc` (-1 for chroma DC, else the nC context 0..16) and `max_coeff`
// (16, 15 or 4) while `ready`. LEVEL_W is the level buffer and coefficient
// width (10 bits as in the original design: larger levels are truncated).
//
// The decoding order, one level per cycle and two runs per cycle at ZerosLeft
// <= 6 follow the source design; writing the trailing-one signs with the
// first level (24 cycles for the critical block instead of 26) and the
// start/done handshake are this design's choices.
module cavlc_decoder #(
  parameter int unsigned LEVEL_W = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      bs_valid,
  output logic                      bs_ready,
  input  logic [31:0]               bs_data,
  input  logic                      start,
  input  logic signed [5:0]         nc,
  input  logic [4:0]                max_coeff,
  output logic                      ready,
  output logic                      done,
  output logic                      zero_block,
  output logic [4:0]                total_coeff,
  output logic [7:0]                cycles,
  output logic signed [LEVEL_W-1:0] coeff [16],
  output logic [31:0]               bit_pos
);

  typedef enum logic [2:0] {S_IDLE, S_CT, S_LVL, S_TZ, S_RUN, S_DONE} state_e;
  state_e state;

  logic        win_valid;
  logic [31:0] win;
  logic [5:0]  consume;

  bs_shifter u_bs (
    .clk, .rst_n, .in_valid(bs_valid), .in_ready(bs_ready), .in_data(bs_data),
    .win_valid, .win, .consume, .bit_pos
  );

  // ---- block context ----
  logic signed [5:0] nc_q;
  logic [4:0]        maxc_q, tc_q;
  logic [1:0]        t1s_q;
  logic [4:0]        lv_left_q;     // non-T1 levels still to decode
  logic [3:0]        lv_idx_q;      // level buffer entry for the next level
  logic [2:0]        sl_q;          // suffixLength
  logic              first_q;       // first cycle of S_LVL
  logic              first_lvl_q;   // next level is the first non-T1 one
  logic [3:0]        zl_q;          // ZerosLeft
  logic [4:0]        cidx_q;        // position of the last placed level
  logic [3:0]        lidx_q;        // level buffer entry of the next level to place
  logic [4:0]        remain_q;      // levels still to place
  logic              zb_q;

  // ---- coeff_token ----
  logic [4:0] ct_tc, ct_len;
  logic [1:0] ct_t1s;
  logic       ct_zb, ct_ok_unused;
  logic [2:0] t1_en, t1_neg;
  logic       ct_en;

  cavlc_coeff_token u_ct (
    .clk, .rst_n, .win, .nc(nc_q), .dec_en(ct_en), .total_coeff(ct_tc), .t1s(ct_t1s),
    .len_ct(ct_len), .zero_block(ct_zb), .code_ok(ct_ok_unused), .t1_en, .t1_neg
  );

  // ---- level decoder ----
  logic signed [12:0] lv_val;
  logic [4:0]         lv_len;
  logic [2:0]         sl_next;

  cavlc_level_dec u_lv (
    .win, .suffix_len(sl_q), .first_adj(first_lvl_q && t1s_q != 2'd3),
    .level(lv_val), .len(lv_len), .suffix_len_next(sl_next)
  );

  // ---- total zeros ----
  logic [3:0] tz_val, tz_len;
  cavlc_total_zeros u_tz (
    .win, .total_coeff(tc_q), .chroma_dc(nc_q < 0), .total_zeros(tz_val), .len(tz_len)
  );

  // ---- run before ----
  logic [3:0] rb_run1, rb_run2;
  logic       rb_two;
  logic [4:0] rb_len;
  cavlc_run_before u_rb (
    .win, .zeros_left(zl_q), .allow2(remain_q >= 5'd2),
    .run1(rb_run1), .run2(rb_run2), .two(rb_two), .len(rb_len)
  );

  // ---- level buffer and merging unit ----
  logic signed [LEVEL_W-1:0] lbuf_q [16];
  logic signed [LEVEL_W-1:0] lbuf_fwd [16];
  logic        clear, lb_t1_gate, lb_lvl_en;
  logic        m_run1_en, m_run2_en, m_zl_zero;
  logic [3:0]  m_run1, m_run2, m_lidx;
  logic [4:0]  m_cidx, m_next;

  cavlc_level_buf #(.LEVEL_W(LEVEL_W)) u_lb (
    .clk, .rst_n, .clear, .total_coeff(tc_q), .t1_en(t1_en & {3{lb_t1_gate}}), .t1_neg,
    .lvl_en(lb_lvl_en), .lvl_idx(lv_idx_q), .lvl(LEVEL_W'(lv_val)),
    .buf_q(lbuf_q), .buf_fwd(lbuf_fwd)
  );

  cavlc_merge #(.LEVEL_W(LEVEL_W)) u_mg (
    .clk, .rst_n, .clear, .level_buf(lbuf_fwd), .run1_en(m_run1_en), .run2_en(m_run2_en),
    .zl_zero(m_zl_zero), .run1(m_run1), .run2(m_run2), .coeff_index(m_cidx),
    .level_index(m_lidx), .next_index(m_next), .coeff
  );

  // ---- control ----
  logic do_tz, go;
  logic [4:0] tz_eff;

  always_comb begin
    clear = 1'b0; ct_en = 1'b0; lb_t1_gate = 1'b0; lb_lvl_en = 1'b0;
    m_run1_en = 1'b0; m_run2_en = 1'b0; m_zl_zero = 1'b0;
    m_run1 = 4'd0; m_run2 = 4'd0; m_lidx = 4'd0; m_cidx = 5'd0;
    consume = 6'd0; do_tz = 1'b0; go = 1'b0;
    tz_eff = (tc_q == maxc_q) ? 5'd0 : 5'(tz_val);
    case (state)
      S_IDLE: clear = start;
      S_CT: if (win_valid) begin
        go = 1'b1; ct_en = 1'b1;
        consume = 6'(ct_len) + 6'(ct_t1s);
      end
      S_LVL: if (win_valid) begin
        go = 1'b1;
        lb_t1_gate = first_q;
        if (lv_left_q != 5'd0) begin
          lb_lvl_en = 1'b1;
          consume   = 6'(lv_len);
        end else begin
          do_tz = 1'b1;
        end
      end
      S_TZ: if (win_valid) begin go = 1'b1; do_tz = 1'b1; end
      S_RUN: begin
        m_cidx = cidx_q;
        m_lidx = lidx_q;
        if (zl_q == 4'd0) begin
          go = 1'b1; m_zl_zero = 1'b1;
        end else if (win_valid) begin
          go = 1'b1;
          m_run1_en = 1'b1; m_run2_en = rb_two;
          m_run1 = rb_run1; m_run2 = rb_run2;
          consume = 6'(rb_len);
        end
      end
      default: ;
    endcase
    if (do_tz) begin
      // place the highest-frequency level at TotalCoeff+TotalZeros-1
      consume   = (tc_q == maxc_q) ? 6'd0 : 6'(tz_len);
      m_run1_en = 1'b1;
      m_cidx    = tc_q + tz_eff;
      m_lidx    = 4'(tc_q - 5'd1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; nc_q <= '0; maxc_q <= 5'd16; tc_q <= '0; t1s_q <= '0;
      lv_left_q <= '0; lv_idx_q <= '0; sl_q <= '0; first_q <= 1'b0; first_lvl_q <= 1'b0;
      zl_q <= '0; cidx_q <= '0; lidx_q <= '0; remain_q <= '0; zb_q <= 1'b0; cycles <= '0;
    end else begin
      if (state != S_IDLE && state != S_DONE) cycles <= cycles + 8'd1;
      case (state)
        S_IDLE: if (start) begin
          state <= S_CT; nc_q <= nc; maxc_q <= max_coeff; cycles <= '0; zb_q <= 1'b0;
          tc_q <= '0;
        end
        S_CT: if (go) begin
          tc_q <= ct_tc; t1s_q <= ct_t1s;
          if (ct_zb) begin
            zb_q  <= 1'b1;
            state <= S_DONE;
          end else begin
            lv_left_q   <= ct_tc - 5'(ct_t1s);
            lv_idx_q    <= 4'(ct_tc - 5'(ct_t1s) - 5'd1);
            sl_q        <= (ct_tc > 5'd10 && ct_t1s != 2'd3) ? 3'd1 : 3'd0;
            first_q     <= 1'b1;
            first_lvl_q <= 1'b1;
            state       <= S_LVL;
          end
        end
        S_LVL: if (go) begin
          first_q <= 1'b0;
          if (lv_left_q != 5'd0) begin
            first_lvl_q <= 1'b0;
            sl_q        <= sl_next;
            lv_left_q   <= lv_left_q - 5'd1;
            lv_idx_q    <= lv_idx_q - 4'd1;
            if (lv_left_q == 5'd1) state <= S_TZ;
          end
        end
        S_TZ: ;
        S_RUN: if (go) begin
          if (zl_q == 4'd0) begin
            state <= S_DONE;
          end else begin
            zl_q     <= zl_q - rb_run1 - rb_run2;
            cidx_q   <= m_next;
            lidx_q   <= lidx_q - (rb_two ? 4'd2 : 4'd1);
            remain_q <= remain_q - (rb_two ? 5'd2 : 5'd1);
            if (remain_q == (rb_two ? 5'd2 : 5'd1)) state <= S_DONE;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      if (do_tz && go) begin
        zl_q     <= 4'(tz_eff);
        cidx_q   <= tc_q + tz_eff - 5'd1;
        lidx_q   <= 4'(tc_q - 5'd2);
        remain_q <= tc_q - 5'd1;
        state    <= (tc_q == 5'd1) ? S_DONE : S_RUN;
      end
    end
  end

  assign ready       = (state == S_IDLE);
  assign done        = (state == S_DONE);
  assign zero_block  = zb_q;
  assign total_coeff = tc_q;

endmodule
