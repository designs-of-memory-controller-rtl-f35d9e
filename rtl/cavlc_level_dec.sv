// Level decoder of the CAVLC decoder.
//
// Combinational. A leading-one detector gives level_prefix (0..15) and with
// it the suffix size: suffixLength, except 4 bits for prefix 14 when
// suffixLength is 0 and 12 bits for the escape prefix 15 (a 28-bit codeword
// at most). levelCode = (prefix << suffixLength) + suffix, plus 15 for the
// escape at suffixLength 0, plus 2 for the first level after fewer than three
// trailing ones; even codes are positive, odd ones negative. The decoder also
// returns the adapted suffixLength for the next level (set to 1 after the
// first level, raised while |level| > 3 << (suffixLength-1), up to 6).
// Prefixes of 16 and above (extended profiles) are not decoded.
//
// The prefix/suffix structure and the escape at prefix 15 follow the source
// design and the H.264 rules; the single-cycle combinational form is this
// design's choice.
module cavlc_level_dec (
  input  logic [31:0]        win,
  input  logic [2:0]         suffix_len,
  input  logic               first_adj,      // first non-T1 level and T1s < 3
  output logic signed [12:0] level,
  output logic [4:0]         len,
  output logic [2:0]         suffix_len_next
);

  logic [3:0]  prefix;
  logic [3:0]  ssize;
  logic [11:0] suffix;
  logic [31:0] after;
  logic [13:0] lcode;
  logic [12:0] mag;

  always_comb begin
    prefix = 4'd15;
    for (int i = 1; i <= 16; i++) if (win[15 + i]) prefix = 4'(16 - i);
    if (prefix == 4'd14 && suffix_len == 3'd0)      ssize = 4'd4;
    else if (prefix == 4'd15)                       ssize = 4'd12;
    else                                            ssize = {1'b0, suffix_len};
    after  = win << (5'(prefix) + 5'd1);
    suffix = (ssize == 4'd0) ? 12'd0 : 12'(after[31:20] >> (4'd12 - ssize));
    lcode  = (14'(prefix) << suffix_len) + 14'(suffix);
    if (prefix == 4'd15 && suffix_len == 3'd0) lcode = lcode + 14'd15;
    if (first_adj) lcode = lcode + 14'd2;
    mag   = 13'((lcode + 14'd2) >> 1);
    level = lcode[0] ? -$signed(13'((lcode + 14'd1) >> 1)) : $signed(mag);
    len   = 5'(prefix) + 5'd1 + 5'(ssize);
    suffix_len_next = (suffix_len == 3'd0) ? 3'd1 : suffix_len;
    if (suffix_len_next < 3'd6 &&
        ((level < 0) ? 13'(-level) : 13'(level)) > (13'd3 << (suffix_len_next - 3'd1)))
      suffix_len_next = suffix_len_next + 3'd1;
  end

endmodule
