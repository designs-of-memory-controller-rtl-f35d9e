// Shared types and variable-length code tables of the CAVLC decoder.
//
// The code tables are those of the H.264 standard (coeff_token for the four
// nC ranges and for chroma DC, total_zeros for 4x4 and chroma DC 2x2 blocks,
// run_before). Each table function takes the left-aligned head of the
// bitstream window (bit 15, 8 or 10 is the next bit) and returns the decoded
// symbol and the code length; it is a set of parallel masked compares, i.e. a
// combinational table. The 8<=nC table is a 6-bit fixed-length code
// {TotalCoeff-1, TrailingOnes} with 000011 for an empty block.
//
// The code tables are the standard H.264 tables; storing them as case
// functions is this design's choice.
package cavlc_pkg;

  typedef struct packed {
    logic [4:0] tc;     // TotalCoeff 0..16
    logic [1:0] t1s;    // TrailingOnes 0..3
    logic [4:0] len;    // code length
    logic       ok;     // a code matched
  } ct_res_t;

  typedef struct packed {
    logic [3:0] tz;     // TotalZeros 0..15
    logic [3:0] len;
  } tz_res_t;

  typedef struct packed {
    logic [3:0] run;    // run_before 0..14
    logic [3:0] len;
  } rb_res_t;

  function automatic ct_res_t ct_nc0(logic [15:0] w);
    ct_res_t r;
    r = '{tc: 5'd0, t1s: 2'd0, len: 5'd0, ok: 1'b0};
    if (w[15 -: 1] == 1'b1) r = '{tc: 5'd0, t1s: 2'd0, len: 5'd1, ok: 1'b1};
    if (w[15 -: 6] == 6'b000101) r = '{tc: 5'd1, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 2] == 2'b01) r = '{tc: 5'd1, t1s: 2'd1, len: 5'd2, ok: 1'b1};
    if (w[15 -: 8] == 8'b00000111) r = '{tc: 5'd2, t1s: 2'd0, len: 5'd8, ok: 1'b1};
    if (w[15 -: 6] == 6'b000100) r = '{tc: 5'd2, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 3] == 3'b001) r = '{tc: 5'd2, t1s: 2'd2, len: 5'd3, ok: 1'b1};
    if (w[15 -: 9] == 9'b000000111) r = '{tc: 5'd3, t1s: 2'd0, len: 5'd9, ok: 1'b1};
    if (w[15 -: 8] == 8'b00000110) r = '{tc: 5'd3, t1s: 2'd1, len: 5'd8, ok: 1'b1};
    if (w[15 -: 7] == 7'b0000101) r = '{tc: 5'd3, t1s: 2'd2, len: 5'd7, ok: 1'b1};
    if (w[15 -: 5] == 5'b00011) r = '{tc: 5'd3, t1s: 2'd3, len: 5'd5, ok: 1'b1};
    if (w[15 -: 10] == 10'b0000000111) r = '{tc: 5'd4, t1s: 2'd0, len: 5'd10, ok: 1'b1};
    if (w[15 -: 9] == 9'b000000110) r = '{tc: 5'd4, t1s: 2'd1, len: 5'd9, ok: 1'b1};
    if (w[15 -: 8] == 8'b00000101) r = '{tc: 5'd4, t1s: 2'd2, len: 5'd8, ok: 1'b1};
    if (w[15 -: 6] == 6'b000011) r = '{tc: 5'd4, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 11] == 11'b00000000111) r = '{tc: 5'd5, t1s: 2'd0, len: 5'd11, ok: 1'b1};
    if (w[15 -: 10] == 10'b0000000110) r = '{tc: 5'd5, t1s: 2'd1, len: 5'd10, ok: 1'b1};
    if (w[15 -: 9] == 9'b000000101) r = '{tc: 5'd5, t1s: 2'd2, len: 5'd9, ok: 1'b1};
    if (w[15 -: 7] == 7'b0000100) r = '{tc: 5'd5, t1s: 2'd3, len: 5'd7, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000001111) r = '{tc: 5'd6, t1s: 2'd0, len: 5'd13, ok: 1'b1};
    if (w[15 -: 11] == 11'b00000000110) r = '{tc: 5'd6, t1s: 2'd1, len: 5'd11, ok: 1'b1};
    if (w[15 -: 10] == 10'b0000000101) r = '{tc: 5'd6, t1s: 2'd2, len: 5'd10, ok: 1'b1};
    if (w[15 -: 8] == 8'b00000100) r = '{tc: 5'd6, t1s: 2'd3, len: 5'd8, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000001011) r = '{tc: 5'd7, t1s: 2'd0, len: 5'd13, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000001110) r = '{tc: 5'd7, t1s: 2'd1, len: 5'd13, ok: 1'b1};
    if (w[15 -: 11] == 11'b00000000101) r = '{tc: 5'd7, t1s: 2'd2, len: 5'd11, ok: 1'b1};
    if (w[15 -: 9] == 9'b000000100) r = '{tc: 5'd7, t1s: 2'd3, len: 5'd9, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000001000) r = '{tc: 5'd8, t1s: 2'd0, len: 5'd13, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000001010) r = '{tc: 5'd8, t1s: 2'd1, len: 5'd13, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000001101) r = '{tc: 5'd8, t1s: 2'd2, len: 5'd13, ok: 1'b1};
    if (w[15 -: 10] == 10'b0000000100) r = '{tc: 5'd8, t1s: 2'd3, len: 5'd10, ok: 1'b1};
    if (w[15 -: 14] == 14'b00000000001111) r = '{tc: 5'd9, t1s: 2'd0, len: 5'd14, ok: 1'b1};
    if (w[15 -: 14] == 14'b00000000001110) r = '{tc: 5'd9, t1s: 2'd1, len: 5'd14, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000001001) r = '{tc: 5'd9, t1s: 2'd2, len: 5'd13, ok: 1'b1};
    if (w[15 -: 11] == 11'b00000000100) r = '{tc: 5'd9, t1s: 2'd3, len: 5'd11, ok: 1'b1};
    if (w[15 -: 14] == 14'b00000000001011) r = '{tc: 5'd10, t1s: 2'd0, len: 5'd14, ok: 1'b1};
    if (w[15 -: 14] == 14'b00000000001010) r = '{tc: 5'd10, t1s: 2'd1, len: 5'd14, ok: 1'b1};
    if (w[15 -: 14] == 14'b00000000001101) r = '{tc: 5'd10, t1s: 2'd2, len: 5'd14, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000001100) r = '{tc: 5'd10, t1s: 2'd3, len: 5'd13, ok: 1'b1};
    if (w[15 -: 15] == 15'b000000000001111) r = '{tc: 5'd11, t1s: 2'd0, len: 5'd15, ok: 1'b1};
    if (w[15 -: 15] == 15'b000000000001110) r = '{tc: 5'd11, t1s: 2'd1, len: 5'd15, ok: 1'b1};
    if (w[15 -: 14] == 14'b00000000001001) r = '{tc: 5'd11, t1s: 2'd2, len: 5'd14, ok: 1'b1};
    if (w[15 -: 14] == 14'b00000000001100) r = '{tc: 5'd11, t1s: 2'd3, len: 5'd14, ok: 1'b1};
    if (w[15 -: 15] == 15'b000000000001011) r = '{tc: 5'd12, t1s: 2'd0, len: 5'd15, ok: 1'b1};
    if (w[15 -: 15] == 15'b000000000001010) r = '{tc: 5'd12, t1s: 2'd1, len: 5'd15, ok: 1'b1};
    if (w[15 -: 15] == 15'b000000000001101) r = '{tc: 5'd12, t1s: 2'd2, len: 5'd15, ok: 1'b1};
    if (w[15 -: 14] == 14'b00000000001000) r = '{tc: 5'd12, t1s: 2'd3, len: 5'd14, ok: 1'b1};
    if (w[15 -: 16] == 16'b0000000000001111) r = '{tc: 5'd13, t1s: 2'd0, len: 5'd16, ok: 1'b1};
    if (w[15 -: 15] == 15'b000000000000001) r = '{tc: 5'd13, t1s: 2'd1, len: 5'd15, ok: 1'b1};
    if (w[15 -: 15] == 15'b000000000001001) r = '{tc: 5'd13, t1s: 2'd2, len: 5'd15, ok: 1'b1};
    if (w[15 -: 15] == 15'b000000000001100) r = '{tc: 5'd13, t1s: 2'd3, len: 5'd15, ok: 1'b1};
    if (w[15 -: 16] == 16'b0000000000001011) r = '{tc: 5'd14, t1s: 2'd0, len: 5'd16, ok: 1'b1};
    if (w[15 -: 16] == 16'b0000000000001110) r = '{tc: 5'd14, t1s: 2'd1, len: 5'd16, ok: 1'b1};
    if (w[15 -: 16] == 16'b0000000000001101) r = '{tc: 5'd14, t1s: 2'd2, len: 5'd16, ok: 1'b1};
    if (w[15 -: 15] == 15'b000000000001000) r = '{tc: 5'd14, t1s: 2'd3, len: 5'd15, ok: 1'b1};
    if (w[15 -: 16] == 16'b0000000000000111) r = '{tc: 5'd15, t1s: 2'd0, len: 5'd16, ok: 1'b1};
    if (w[15 -: 16] == 16'b0000000000001010) r = '{tc: 5'd15, t1s: 2'd1, len: 5'd16, ok: 1'b1};
    if (w[15 -: 16] == 16'b0000000000001001) r = '{tc: 5'd15, t1s: 2'd2, len: 5'd16, ok: 1'b1};
    if (w[15 -: 16] == 16'b0000000000001100) r = '{tc: 5'd15, t1s: 2'd3, len: 5'd16, ok: 1'b1};
    if (w[15 -: 16] == 16'b0000000000000100) r = '{tc: 5'd16, t1s: 2'd0, len: 5'd16, ok: 1'b1};
    if (w[15 -: 16] == 16'b0000000000000110) r = '{tc: 5'd16, t1s: 2'd1, len: 5'd16, ok: 1'b1};
    if (w[15 -: 16] == 16'b0000000000000101) r = '{tc: 5'd16, t1s: 2'd2, len: 5'd16, ok: 1'b1};
    if (w[15 -: 16] == 16'b0000000000001000) r = '{tc: 5'd16, t1s: 2'd3, len: 5'd16, ok: 1'b1};
    return r;
  endfunction

  function automatic ct_res_t ct_nc2(logic [15:0] w);
    ct_res_t r;
    r = '{tc: 5'd0, t1s: 2'd0, len: 5'd0, ok: 1'b0};
    if (w[15 -: 2] == 2'b11) r = '{tc: 5'd0, t1s: 2'd0, len: 5'd2, ok: 1'b1};
    if (w[15 -: 6] == 6'b001011) r = '{tc: 5'd1, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 2] == 2'b10) r = '{tc: 5'd1, t1s: 2'd1, len: 5'd2, ok: 1'b1};
    if (w[15 -: 6] == 6'b000111) r = '{tc: 5'd2, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 5] == 5'b00111) r = '{tc: 5'd2, t1s: 2'd1, len: 5'd5, ok: 1'b1};
    if (w[15 -: 3] == 3'b011) r = '{tc: 5'd2, t1s: 2'd2, len: 5'd3, ok: 1'b1};
    if (w[15 -: 7] == 7'b0000111) r = '{tc: 5'd3, t1s: 2'd0, len: 5'd7, ok: 1'b1};
    if (w[15 -: 6] == 6'b001010) r = '{tc: 5'd3, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b001001) r = '{tc: 5'd3, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 4] == 4'b0101) r = '{tc: 5'd3, t1s: 2'd3, len: 5'd4, ok: 1'b1};
    if (w[15 -: 8] == 8'b00000111) r = '{tc: 5'd4, t1s: 2'd0, len: 5'd8, ok: 1'b1};
    if (w[15 -: 6] == 6'b000110) r = '{tc: 5'd4, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b000101) r = '{tc: 5'd4, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 4] == 4'b0100) r = '{tc: 5'd4, t1s: 2'd3, len: 5'd4, ok: 1'b1};
    if (w[15 -: 8] == 8'b00000100) r = '{tc: 5'd5, t1s: 2'd0, len: 5'd8, ok: 1'b1};
    if (w[15 -: 7] == 7'b0000110) r = '{tc: 5'd5, t1s: 2'd1, len: 5'd7, ok: 1'b1};
    if (w[15 -: 7] == 7'b0000101) r = '{tc: 5'd5, t1s: 2'd2, len: 5'd7, ok: 1'b1};
    if (w[15 -: 5] == 5'b00110) r = '{tc: 5'd5, t1s: 2'd3, len: 5'd5, ok: 1'b1};
    if (w[15 -: 9] == 9'b000000111) r = '{tc: 5'd6, t1s: 2'd0, len: 5'd9, ok: 1'b1};
    if (w[15 -: 8] == 8'b00000110) r = '{tc: 5'd6, t1s: 2'd1, len: 5'd8, ok: 1'b1};
    if (w[15 -: 8] == 8'b00000101) r = '{tc: 5'd6, t1s: 2'd2, len: 5'd8, ok: 1'b1};
    if (w[15 -: 6] == 6'b001000) r = '{tc: 5'd6, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 11] == 11'b00000001111) r = '{tc: 5'd7, t1s: 2'd0, len: 5'd11, ok: 1'b1};
    if (w[15 -: 9] == 9'b000000110) r = '{tc: 5'd7, t1s: 2'd1, len: 5'd9, ok: 1'b1};
    if (w[15 -: 9] == 9'b000000101) r = '{tc: 5'd7, t1s: 2'd2, len: 5'd9, ok: 1'b1};
    if (w[15 -: 6] == 6'b000100) r = '{tc: 5'd7, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 11] == 11'b00000001011) r = '{tc: 5'd8, t1s: 2'd0, len: 5'd11, ok: 1'b1};
    if (w[15 -: 11] == 11'b00000001110) r = '{tc: 5'd8, t1s: 2'd1, len: 5'd11, ok: 1'b1};
    if (w[15 -: 11] == 11'b00000001101) r = '{tc: 5'd8, t1s: 2'd2, len: 5'd11, ok: 1'b1};
    if (w[15 -: 7] == 7'b0000100) r = '{tc: 5'd8, t1s: 2'd3, len: 5'd7, ok: 1'b1};
    if (w[15 -: 12] == 12'b000000001111) r = '{tc: 5'd9, t1s: 2'd0, len: 5'd12, ok: 1'b1};
    if (w[15 -: 11] == 11'b00000001010) r = '{tc: 5'd9, t1s: 2'd1, len: 5'd11, ok: 1'b1};
    if (w[15 -: 11] == 11'b00000001001) r = '{tc: 5'd9, t1s: 2'd2, len: 5'd11, ok: 1'b1};
    if (w[15 -: 9] == 9'b000000100) r = '{tc: 5'd9, t1s: 2'd3, len: 5'd9, ok: 1'b1};
    if (w[15 -: 12] == 12'b000000001011) r = '{tc: 5'd10, t1s: 2'd0, len: 5'd12, ok: 1'b1};
    if (w[15 -: 12] == 12'b000000001110) r = '{tc: 5'd10, t1s: 2'd1, len: 5'd12, ok: 1'b1};
    if (w[15 -: 12] == 12'b000000001101) r = '{tc: 5'd10, t1s: 2'd2, len: 5'd12, ok: 1'b1};
    if (w[15 -: 11] == 11'b00000001100) r = '{tc: 5'd10, t1s: 2'd3, len: 5'd11, ok: 1'b1};
    if (w[15 -: 12] == 12'b000000001000) r = '{tc: 5'd11, t1s: 2'd0, len: 5'd12, ok: 1'b1};
    if (w[15 -: 12] == 12'b000000001010) r = '{tc: 5'd11, t1s: 2'd1, len: 5'd12, ok: 1'b1};
    if (w[15 -: 12] == 12'b000000001001) r = '{tc: 5'd11, t1s: 2'd2, len: 5'd12, ok: 1'b1};
    if (w[15 -: 11] == 11'b00000001000) r = '{tc: 5'd11, t1s: 2'd3, len: 5'd11, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000001111) r = '{tc: 5'd12, t1s: 2'd0, len: 5'd13, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000001110) r = '{tc: 5'd12, t1s: 2'd1, len: 5'd13, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000001101) r = '{tc: 5'd12, t1s: 2'd2, len: 5'd13, ok: 1'b1};
    if (w[15 -: 12] == 12'b000000001100) r = '{tc: 5'd12, t1s: 2'd3, len: 5'd12, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000001011) r = '{tc: 5'd13, t1s: 2'd0, len: 5'd13, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000001010) r = '{tc: 5'd13, t1s: 2'd1, len: 5'd13, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000001001) r = '{tc: 5'd13, t1s: 2'd2, len: 5'd13, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000001100) r = '{tc: 5'd13, t1s: 2'd3, len: 5'd13, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000000111) r = '{tc: 5'd14, t1s: 2'd0, len: 5'd13, ok: 1'b1};
    if (w[15 -: 14] == 14'b00000000001011) r = '{tc: 5'd14, t1s: 2'd1, len: 5'd14, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000000110) r = '{tc: 5'd14, t1s: 2'd2, len: 5'd13, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000001000) r = '{tc: 5'd14, t1s: 2'd3, len: 5'd13, ok: 1'b1};
    if (w[15 -: 14] == 14'b00000000001001) r = '{tc: 5'd15, t1s: 2'd0, len: 5'd14, ok: 1'b1};
    if (w[15 -: 14] == 14'b00000000001000) r = '{tc: 5'd15, t1s: 2'd1, len: 5'd14, ok: 1'b1};
    if (w[15 -: 14] == 14'b00000000001010) r = '{tc: 5'd15, t1s: 2'd2, len: 5'd14, ok: 1'b1};
    if (w[15 -: 13] == 13'b0000000000001) r = '{tc: 5'd15, t1s: 2'd3, len: 5'd13, ok: 1'b1};
    if (w[15 -: 14] == 14'b00000000000111) r = '{tc: 5'd16, t1s: 2'd0, len: 5'd14, ok: 1'b1};
    if (w[15 -: 14] == 14'b00000000000110) r = '{tc: 5'd16, t1s: 2'd1, len: 5'd14, ok: 1'b1};
    if (w[15 -: 14] == 14'b00000000000101) r = '{tc: 5'd16, t1s: 2'd2, len: 5'd14, ok: 1'b1};
    if (w[15 -: 14] == 14'b00000000000100) r = '{tc: 5'd16, t1s: 2'd3, len: 5'd14, ok: 1'b1};
    return r;
  endfunction

  function automatic ct_res_t ct_nc4(logic [15:0] w);
    ct_res_t r;
    r = '{tc: 5'd0, t1s: 2'd0, len: 5'd0, ok: 1'b0};
    if (w[15 -: 4] == 4'b1111) r = '{tc: 5'd0, t1s: 2'd0, len: 5'd4, ok: 1'b1};
    if (w[15 -: 6] == 6'b001111) r = '{tc: 5'd1, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 4] == 4'b1110) r = '{tc: 5'd1, t1s: 2'd1, len: 5'd4, ok: 1'b1};
    if (w[15 -: 6] == 6'b001011) r = '{tc: 5'd2, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 5] == 5'b01111) r = '{tc: 5'd2, t1s: 2'd1, len: 5'd5, ok: 1'b1};
    if (w[15 -: 4] == 4'b1101) r = '{tc: 5'd2, t1s: 2'd2, len: 5'd4, ok: 1'b1};
    if (w[15 -: 6] == 6'b001000) r = '{tc: 5'd3, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 5] == 5'b01100) r = '{tc: 5'd3, t1s: 2'd1, len: 5'd5, ok: 1'b1};
    if (w[15 -: 5] == 5'b01110) r = '{tc: 5'd3, t1s: 2'd2, len: 5'd5, ok: 1'b1};
    if (w[15 -: 4] == 4'b1100) r = '{tc: 5'd3, t1s: 2'd3, len: 5'd4, ok: 1'b1};
    if (w[15 -: 7] == 7'b0001111) r = '{tc: 5'd4, t1s: 2'd0, len: 5'd7, ok: 1'b1};
    if (w[15 -: 5] == 5'b01010) r = '{tc: 5'd4, t1s: 2'd1, len: 5'd5, ok: 1'b1};
    if (w[15 -: 5] == 5'b01011) r = '{tc: 5'd4, t1s: 2'd2, len: 5'd5, ok: 1'b1};
    if (w[15 -: 4] == 4'b1011) r = '{tc: 5'd4, t1s: 2'd3, len: 5'd4, ok: 1'b1};
    if (w[15 -: 7] == 7'b0001011) r = '{tc: 5'd5, t1s: 2'd0, len: 5'd7, ok: 1'b1};
    if (w[15 -: 5] == 5'b01000) r = '{tc: 5'd5, t1s: 2'd1, len: 5'd5, ok: 1'b1};
    if (w[15 -: 5] == 5'b01001) r = '{tc: 5'd5, t1s: 2'd2, len: 5'd5, ok: 1'b1};
    if (w[15 -: 4] == 4'b1010) r = '{tc: 5'd5, t1s: 2'd3, len: 5'd4, ok: 1'b1};
    if (w[15 -: 7] == 7'b0001001) r = '{tc: 5'd6, t1s: 2'd0, len: 5'd7, ok: 1'b1};
    if (w[15 -: 6] == 6'b001110) r = '{tc: 5'd6, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b001101) r = '{tc: 5'd6, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 4] == 4'b1001) r = '{tc: 5'd6, t1s: 2'd3, len: 5'd4, ok: 1'b1};
    if (w[15 -: 7] == 7'b0001000) r = '{tc: 5'd7, t1s: 2'd0, len: 5'd7, ok: 1'b1};
    if (w[15 -: 6] == 6'b001010) r = '{tc: 5'd7, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b001001) r = '{tc: 5'd7, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 4] == 4'b1000) r = '{tc: 5'd7, t1s: 2'd3, len: 5'd4, ok: 1'b1};
    if (w[15 -: 8] == 8'b00001111) r = '{tc: 5'd8, t1s: 2'd0, len: 5'd8, ok: 1'b1};
    if (w[15 -: 7] == 7'b0001110) r = '{tc: 5'd8, t1s: 2'd1, len: 5'd7, ok: 1'b1};
    if (w[15 -: 7] == 7'b0001101) r = '{tc: 5'd8, t1s: 2'd2, len: 5'd7, ok: 1'b1};
    if (w[15 -: 5] == 5'b01101) r = '{tc: 5'd8, t1s: 2'd3, len: 5'd5, ok: 1'b1};
    if (w[15 -: 8] == 8'b00001011) r = '{tc: 5'd9, t1s: 2'd0, len: 5'd8, ok: 1'b1};
    if (w[15 -: 8] == 8'b00001110) r = '{tc: 5'd9, t1s: 2'd1, len: 5'd8, ok: 1'b1};
    if (w[15 -: 7] == 7'b0001010) r = '{tc: 5'd9, t1s: 2'd2, len: 5'd7, ok: 1'b1};
    if (w[15 -: 6] == 6'b001100) r = '{tc: 5'd9, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 9] == 9'b000001111) r = '{tc: 5'd10, t1s: 2'd0, len: 5'd9, ok: 1'b1};
    if (w[15 -: 8] == 8'b00001010) r = '{tc: 5'd10, t1s: 2'd1, len: 5'd8, ok: 1'b1};
    if (w[15 -: 8] == 8'b00001101) r = '{tc: 5'd10, t1s: 2'd2, len: 5'd8, ok: 1'b1};
    if (w[15 -: 7] == 7'b0001100) r = '{tc: 5'd10, t1s: 2'd3, len: 5'd7, ok: 1'b1};
    if (w[15 -: 9] == 9'b000001011) r = '{tc: 5'd11, t1s: 2'd0, len: 5'd9, ok: 1'b1};
    if (w[15 -: 9] == 9'b000001110) r = '{tc: 5'd11, t1s: 2'd1, len: 5'd9, ok: 1'b1};
    if (w[15 -: 8] == 8'b00001001) r = '{tc: 5'd11, t1s: 2'd2, len: 5'd8, ok: 1'b1};
    if (w[15 -: 8] == 8'b00001100) r = '{tc: 5'd11, t1s: 2'd3, len: 5'd8, ok: 1'b1};
    if (w[15 -: 9] == 9'b000001000) r = '{tc: 5'd12, t1s: 2'd0, len: 5'd9, ok: 1'b1};
    if (w[15 -: 9] == 9'b000001010) r = '{tc: 5'd12, t1s: 2'd1, len: 5'd9, ok: 1'b1};
    if (w[15 -: 9] == 9'b000001101) r = '{tc: 5'd12, t1s: 2'd2, len: 5'd9, ok: 1'b1};
    if (w[15 -: 8] == 8'b00001000) r = '{tc: 5'd12, t1s: 2'd3, len: 5'd8, ok: 1'b1};
    if (w[15 -: 10] == 10'b0000001101) r = '{tc: 5'd13, t1s: 2'd0, len: 5'd10, ok: 1'b1};
    if (w[15 -: 9] == 9'b000000111) r = '{tc: 5'd13, t1s: 2'd1, len: 5'd9, ok: 1'b1};
    if (w[15 -: 9] == 9'b000001001) r = '{tc: 5'd13, t1s: 2'd2, len: 5'd9, ok: 1'b1};
    if (w[15 -: 9] == 9'b000001100) r = '{tc: 5'd13, t1s: 2'd3, len: 5'd9, ok: 1'b1};
    if (w[15 -: 10] == 10'b0000001001) r = '{tc: 5'd14, t1s: 2'd0, len: 5'd10, ok: 1'b1};
    if (w[15 -: 10] == 10'b0000001100) r = '{tc: 5'd14, t1s: 2'd1, len: 5'd10, ok: 1'b1};
    if (w[15 -: 10] == 10'b0000001011) r = '{tc: 5'd14, t1s: 2'd2, len: 5'd10, ok: 1'b1};
    if (w[15 -: 10] == 10'b0000001010) r = '{tc: 5'd14, t1s: 2'd3, len: 5'd10, ok: 1'b1};
    if (w[15 -: 10] == 10'b0000000101) r = '{tc: 5'd15, t1s: 2'd0, len: 5'd10, ok: 1'b1};
    if (w[15 -: 10] == 10'b0000001000) r = '{tc: 5'd15, t1s: 2'd1, len: 5'd10, ok: 1'b1};
    if (w[15 -: 10] == 10'b0000000111) r = '{tc: 5'd15, t1s: 2'd2, len: 5'd10, ok: 1'b1};
    if (w[15 -: 10] == 10'b0000000110) r = '{tc: 5'd15, t1s: 2'd3, len: 5'd10, ok: 1'b1};
    if (w[15 -: 10] == 10'b0000000001) r = '{tc: 5'd16, t1s: 2'd0, len: 5'd10, ok: 1'b1};
    if (w[15 -: 10] == 10'b0000000100) r = '{tc: 5'd16, t1s: 2'd1, len: 5'd10, ok: 1'b1};
    if (w[15 -: 10] == 10'b0000000011) r = '{tc: 5'd16, t1s: 2'd2, len: 5'd10, ok: 1'b1};
    if (w[15 -: 10] == 10'b0000000010) r = '{tc: 5'd16, t1s: 2'd3, len: 5'd10, ok: 1'b1};
    return r;
  endfunction

  function automatic ct_res_t ct_nc8(logic [15:0] w);
    ct_res_t r;
    r = '{tc: 5'd0, t1s: 2'd0, len: 5'd0, ok: 1'b0};
    if (w[15 -: 6] == 6'b000011) r = '{tc: 5'd0, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b000000) r = '{tc: 5'd1, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b000001) r = '{tc: 5'd1, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b000100) r = '{tc: 5'd2, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b000101) r = '{tc: 5'd2, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b000110) r = '{tc: 5'd2, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b001000) r = '{tc: 5'd3, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b001001) r = '{tc: 5'd3, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b001010) r = '{tc: 5'd3, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b001011) r = '{tc: 5'd3, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b001100) r = '{tc: 5'd4, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b001101) r = '{tc: 5'd4, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b001110) r = '{tc: 5'd4, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b001111) r = '{tc: 5'd4, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b010000) r = '{tc: 5'd5, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b010001) r = '{tc: 5'd5, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b010010) r = '{tc: 5'd5, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b010011) r = '{tc: 5'd5, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b010100) r = '{tc: 5'd6, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b010101) r = '{tc: 5'd6, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b010110) r = '{tc: 5'd6, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b010111) r = '{tc: 5'd6, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b011000) r = '{tc: 5'd7, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b011001) r = '{tc: 5'd7, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b011010) r = '{tc: 5'd7, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b011011) r = '{tc: 5'd7, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b011100) r = '{tc: 5'd8, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b011101) r = '{tc: 5'd8, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b011110) r = '{tc: 5'd8, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b011111) r = '{tc: 5'd8, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b100000) r = '{tc: 5'd9, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b100001) r = '{tc: 5'd9, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b100010) r = '{tc: 5'd9, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b100011) r = '{tc: 5'd9, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b100100) r = '{tc: 5'd10, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b100101) r = '{tc: 5'd10, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b100110) r = '{tc: 5'd10, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b100111) r = '{tc: 5'd10, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b101000) r = '{tc: 5'd11, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b101001) r = '{tc: 5'd11, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b101010) r = '{tc: 5'd11, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b101011) r = '{tc: 5'd11, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b101100) r = '{tc: 5'd12, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b101101) r = '{tc: 5'd12, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b101110) r = '{tc: 5'd12, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b101111) r = '{tc: 5'd12, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b110000) r = '{tc: 5'd13, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b110001) r = '{tc: 5'd13, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b110010) r = '{tc: 5'd13, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b110011) r = '{tc: 5'd13, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b110100) r = '{tc: 5'd14, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b110101) r = '{tc: 5'd14, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b110110) r = '{tc: 5'd14, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b110111) r = '{tc: 5'd14, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b111000) r = '{tc: 5'd15, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b111001) r = '{tc: 5'd15, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b111010) r = '{tc: 5'd15, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b111011) r = '{tc: 5'd15, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b111100) r = '{tc: 5'd16, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b111101) r = '{tc: 5'd16, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b111110) r = '{tc: 5'd16, t1s: 2'd2, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b111111) r = '{tc: 5'd16, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    return r;
  endfunction

  function automatic ct_res_t ct_chroma_dc(logic [15:0] w);
    ct_res_t r;
    r = '{tc: 5'd0, t1s: 2'd0, len: 5'd0, ok: 1'b0};
    if (w[15 -: 2] == 2'b01) r = '{tc: 5'd0, t1s: 2'd0, len: 5'd2, ok: 1'b1};
    if (w[15 -: 6] == 6'b000111) r = '{tc: 5'd1, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 1] == 1'b1) r = '{tc: 5'd1, t1s: 2'd1, len: 5'd1, ok: 1'b1};
    if (w[15 -: 6] == 6'b000100) r = '{tc: 5'd2, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b000110) r = '{tc: 5'd2, t1s: 2'd1, len: 5'd6, ok: 1'b1};
    if (w[15 -: 3] == 3'b001) r = '{tc: 5'd2, t1s: 2'd2, len: 5'd3, ok: 1'b1};
    if (w[15 -: 6] == 6'b000011) r = '{tc: 5'd3, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 7] == 7'b0000011) r = '{tc: 5'd3, t1s: 2'd1, len: 5'd7, ok: 1'b1};
    if (w[15 -: 7] == 7'b0000010) r = '{tc: 5'd3, t1s: 2'd2, len: 5'd7, ok: 1'b1};
    if (w[15 -: 6] == 6'b000101) r = '{tc: 5'd3, t1s: 2'd3, len: 5'd6, ok: 1'b1};
    if (w[15 -: 6] == 6'b000010) r = '{tc: 5'd4, t1s: 2'd0, len: 5'd6, ok: 1'b1};
    if (w[15 -: 8] == 8'b00000011) r = '{tc: 5'd4, t1s: 2'd1, len: 5'd8, ok: 1'b1};
    if (w[15 -: 8] == 8'b00000010) r = '{tc: 5'd4, t1s: 2'd2, len: 5'd8, ok: 1'b1};
    if (w[15 -: 7] == 7'b0000000) r = '{tc: 5'd4, t1s: 2'd3, len: 5'd7, ok: 1'b1};
    return r;
  endfunction

  function automatic tz_res_t tz_lookup(logic [8:0] w, logic [4:0] tc, logic chroma_dc);
    tz_res_t r;
    r = '{tz: 4'd0, len: 4'd0};
    if (chroma_dc) begin
      case (tc)
        5'd1: begin
          if (w[8 -: 1] == 1'b1) r = '{tz: 4'd0, len: 4'd1};
          if (w[8 -: 2] == 2'b01) r = '{tz: 4'd1, len: 4'd2};
          if (w[8 -: 3] == 3'b001) r = '{tz: 4'd2, len: 4'd3};
          if (w[8 -: 3] == 3'b000) r = '{tz: 4'd3, len: 4'd3};
        end
        5'd2: begin
          if (w[8 -: 1] == 1'b1) r = '{tz: 4'd0, len: 4'd1};
          if (w[8 -: 2] == 2'b01) r = '{tz: 4'd1, len: 4'd2};
          if (w[8 -: 2] == 2'b00) r = '{tz: 4'd2, len: 4'd2};
        end
        5'd3: begin
          if (w[8 -: 1] == 1'b1) r = '{tz: 4'd0, len: 4'd1};
          if (w[8 -: 1] == 1'b0) r = '{tz: 4'd1, len: 4'd1};
        end
        default: ;
      endcase
    end else begin
      case (tc)
        5'd1: begin
          if (w[8 -: 1] == 1'b1) r = '{tz: 4'd0, len: 4'd1};
          if (w[8 -: 3] == 3'b011) r = '{tz: 4'd1, len: 4'd3};
          if (w[8 -: 3] == 3'b010) r = '{tz: 4'd2, len: 4'd3};
          if (w[8 -: 4] == 4'b0011) r = '{tz: 4'd3, len: 4'd4};
          if (w[8 -: 4] == 4'b0010) r = '{tz: 4'd4, len: 4'd4};
          if (w[8 -: 5] == 5'b00011) r = '{tz: 4'd5, len: 4'd5};
          if (w[8 -: 5] == 5'b00010) r = '{tz: 4'd6, len: 4'd5};
          if (w[8 -: 6] == 6'b000011) r = '{tz: 4'd7, len: 4'd6};
          if (w[8 -: 6] == 6'b000010) r = '{tz: 4'd8, len: 4'd6};
          if (w[8 -: 7] == 7'b0000011) r = '{tz: 4'd9, len: 4'd7};
          if (w[8 -: 7] == 7'b0000010) r = '{tz: 4'd10, len: 4'd7};
          if (w[8 -: 8] == 8'b00000011) r = '{tz: 4'd11, len: 4'd8};
          if (w[8 -: 8] == 8'b00000010) r = '{tz: 4'd12, len: 4'd8};
          if (w[8 -: 9] == 9'b000000011) r = '{tz: 4'd13, len: 4'd9};
          if (w[8 -: 9] == 9'b000000010) r = '{tz: 4'd14, len: 4'd9};
          if (w[8 -: 9] == 9'b000000001) r = '{tz: 4'd15, len: 4'd9};
        end
        5'd2: begin
          if (w[8 -: 3] == 3'b111) r = '{tz: 4'd0, len: 4'd3};
          if (w[8 -: 3] == 3'b110) r = '{tz: 4'd1, len: 4'd3};
          if (w[8 -: 3] == 3'b101) r = '{tz: 4'd2, len: 4'd3};
          if (w[8 -: 3] == 3'b100) r = '{tz: 4'd3, len: 4'd3};
          if (w[8 -: 3] == 3'b011) r = '{tz: 4'd4, len: 4'd3};
          if (w[8 -: 4] == 4'b0101) r = '{tz: 4'd5, len: 4'd4};
          if (w[8 -: 4] == 4'b0100) r = '{tz: 4'd6, len: 4'd4};
          if (w[8 -: 4] == 4'b0011) r = '{tz: 4'd7, len: 4'd4};
          if (w[8 -: 4] == 4'b0010) r = '{tz: 4'd8, len: 4'd4};
          if (w[8 -: 5] == 5'b00011) r = '{tz: 4'd9, len: 4'd5};
          if (w[8 -: 5] == 5'b00010) r = '{tz: 4'd10, len: 4'd5};
          if (w[8 -: 6] == 6'b000011) r = '{tz: 4'd11, len: 4'd6};
          if (w[8 -: 6] == 6'b000010) r = '{tz: 4'd12, len: 4'd6};
          if (w[8 -: 6] == 6'b000001) r = '{tz: 4'd13, len: 4'd6};
          if (w[8 -: 6] == 6'b000000) r = '{tz: 4'd14, len: 4'd6};
        end
        5'd3: begin
          if (w[8 -: 4] == 4'b0101) r = '{tz: 4'd0, len: 4'd4};
          if (w[8 -: 3] == 3'b111) r = '{tz: 4'd1, len: 4'd3};
          if (w[8 -: 3] == 3'b110) r = '{tz: 4'd2, len: 4'd3};
          if (w[8 -: 3] == 3'b101) r = '{tz: 4'd3, len: 4'd3};
          if (w[8 -: 4] == 4'b0100) r = '{tz: 4'd4, len: 4'd4};
          if (w[8 -: 4] == 4'b0011) r = '{tz: 4'd5, len: 4'd4};
          if (w[8 -: 3] == 3'b100) r = '{tz: 4'd6, len: 4'd3};
          if (w[8 -: 3] == 3'b011) r = '{tz: 4'd7, len: 4'd3};
          if (w[8 -: 4] == 4'b0010) r = '{tz: 4'd8, len: 4'd4};
          if (w[8 -: 5] == 5'b00011) r = '{tz: 4'd9, len: 4'd5};
          if (w[8 -: 5] == 5'b00010) r = '{tz: 4'd10, len: 4'd5};
          if (w[8 -: 6] == 6'b000001) r = '{tz: 4'd11, len: 4'd6};
          if (w[8 -: 5] == 5'b00001) r = '{tz: 4'd12, len: 4'd5};
          if (w[8 -: 6] == 6'b000000) r = '{tz: 4'd13, len: 4'd6};
        end
        5'd4: begin
          if (w[8 -: 5] == 5'b00011) r = '{tz: 4'd0, len: 4'd5};
          if (w[8 -: 3] == 3'b111) r = '{tz: 4'd1, len: 4'd3};
          if (w[8 -: 4] == 4'b0101) r = '{tz: 4'd2, len: 4'd4};
          if (w[8 -: 4] == 4'b0100) r = '{tz: 4'd3, len: 4'd4};
          if (w[8 -: 3] == 3'b110) r = '{tz: 4'd4, len: 4'd3};
          if (w[8 -: 3] == 3'b101) r = '{tz: 4'd5, len: 4'd3};
          if (w[8 -: 3] == 3'b100) r = '{tz: 4'd6, len: 4'd3};
          if (w[8 -: 4] == 4'b0011) r = '{tz: 4'd7, len: 4'd4};
          if (w[8 -: 3] == 3'b011) r = '{tz: 4'd8, len: 4'd3};
          if (w[8 -: 4] == 4'b0010) r = '{tz: 4'd9, len: 4'd4};
          if (w[8 -: 5] == 5'b00010) r = '{tz: 4'd10, len: 4'd5};
          if (w[8 -: 5] == 5'b00001) r = '{tz: 4'd11, len: 4'd5};
          if (w[8 -: 5] == 5'b00000) r = '{tz: 4'd12, len: 4'd5};
        end
        5'd5: begin
          if (w[8 -: 4] == 4'b0101) r = '{tz: 4'd0, len: 4'd4};
          if (w[8 -: 4] == 4'b0100) r = '{tz: 4'd1, len: 4'd4};
          if (w[8 -: 4] == 4'b0011) r = '{tz: 4'd2, len: 4'd4};
          if (w[8 -: 3] == 3'b111) r = '{tz: 4'd3, len: 4'd3};
          if (w[8 -: 3] == 3'b110) r = '{tz: 4'd4, len: 4'd3};
          if (w[8 -: 3] == 3'b101) r = '{tz: 4'd5, len: 4'd3};
          if (w[8 -: 3] == 3'b100) r = '{tz: 4'd6, len: 4'd3};
          if (w[8 -: 3] == 3'b011) r = '{tz: 4'd7, len: 4'd3};
          if (w[8 -: 4] == 4'b0010) r = '{tz: 4'd8, len: 4'd4};
          if (w[8 -: 5] == 5'b00001) r = '{tz: 4'd9, len: 4'd5};
          if (w[8 -: 4] == 4'b0001) r = '{tz: 4'd10, len: 4'd4};
          if (w[8 -: 5] == 5'b00000) r = '{tz: 4'd11, len: 4'd5};
        end
        5'd6: begin
          if (w[8 -: 6] == 6'b000001) r = '{tz: 4'd0, len: 4'd6};
          if (w[8 -: 5] == 5'b00001) r = '{tz: 4'd1, len: 4'd5};
          if (w[8 -: 3] == 3'b111) r = '{tz: 4'd2, len: 4'd3};
          if (w[8 -: 3] == 3'b110) r = '{tz: 4'd3, len: 4'd3};
          if (w[8 -: 3] == 3'b101) r = '{tz: 4'd4, len: 4'd3};
          if (w[8 -: 3] == 3'b100) r = '{tz: 4'd5, len: 4'd3};
          if (w[8 -: 3] == 3'b011) r = '{tz: 4'd6, len: 4'd3};
          if (w[8 -: 3] == 3'b010) r = '{tz: 4'd7, len: 4'd3};
          if (w[8 -: 4] == 4'b0001) r = '{tz: 4'd8, len: 4'd4};
          if (w[8 -: 3] == 3'b001) r = '{tz: 4'd9, len: 4'd3};
          if (w[8 -: 6] == 6'b000000) r = '{tz: 4'd10, len: 4'd6};
        end
        5'd7: begin
          if (w[8 -: 6] == 6'b000001) r = '{tz: 4'd0, len: 4'd6};
          if (w[8 -: 5] == 5'b00001) r = '{tz: 4'd1, len: 4'd5};
          if (w[8 -: 3] == 3'b101) r = '{tz: 4'd2, len: 4'd3};
          if (w[8 -: 3] == 3'b100) r = '{tz: 4'd3, len: 4'd3};
          if (w[8 -: 3] == 3'b011) r = '{tz: 4'd4, len: 4'd3};
          if (w[8 -: 2] == 2'b11) r = '{tz: 4'd5, len: 4'd2};
          if (w[8 -: 3] == 3'b010) r = '{tz: 4'd6, len: 4'd3};
          if (w[8 -: 4] == 4'b0001) r = '{tz: 4'd7, len: 4'd4};
          if (w[8 -: 3] == 3'b001) r = '{tz: 4'd8, len: 4'd3};
          if (w[8 -: 6] == 6'b000000) r = '{tz: 4'd9, len: 4'd6};
        end
        5'd8: begin
          if (w[8 -: 6] == 6'b000001) r = '{tz: 4'd0, len: 4'd6};
          if (w[8 -: 4] == 4'b0001) r = '{tz: 4'd1, len: 4'd4};
          if (w[8 -: 5] == 5'b00001) r = '{tz: 4'd2, len: 4'd5};
          if (w[8 -: 3] == 3'b011) r = '{tz: 4'd3, len: 4'd3};
          if (w[8 -: 2] == 2'b11) r = '{tz: 4'd4, len: 4'd2};
          if (w[8 -: 2] == 2'b10) r = '{tz: 4'd5, len: 4'd2};
          if (w[8 -: 3] == 3'b010) r = '{tz: 4'd6, len: 4'd3};
          if (w[8 -: 3] == 3'b001) r = '{tz: 4'd7, len: 4'd3};
          if (w[8 -: 6] == 6'b000000) r = '{tz: 4'd8, len: 4'd6};
        end
        5'd9: begin
          if (w[8 -: 6] == 6'b000001) r = '{tz: 4'd0, len: 4'd6};
          if (w[8 -: 6] == 6'b000000) r = '{tz: 4'd1, len: 4'd6};
          if (w[8 -: 4] == 4'b0001) r = '{tz: 4'd2, len: 4'd4};
          if (w[8 -: 2] == 2'b11) r = '{tz: 4'd3, len: 4'd2};
          if (w[8 -: 2] == 2'b10) r = '{tz: 4'd4, len: 4'd2};
          if (w[8 -: 3] == 3'b001) r = '{tz: 4'd5, len: 4'd3};
          if (w[8 -: 2] == 2'b01) r = '{tz: 4'd6, len: 4'd2};
          if (w[8 -: 5] == 5'b00001) r = '{tz: 4'd7, len: 4'd5};
        end
        5'd10: begin
          if (w[8 -: 5] == 5'b00001) r = '{tz: 4'd0, len: 4'd5};
          if (w[8 -: 5] == 5'b00000) r = '{tz: 4'd1, len: 4'd5};
          if (w[8 -: 3] == 3'b001) r = '{tz: 4'd2, len: 4'd3};
          if (w[8 -: 2] == 2'b11) r = '{tz: 4'd3, len: 4'd2};
          if (w[8 -: 2] == 2'b10) r = '{tz: 4'd4, len: 4'd2};
          if (w[8 -: 2] == 2'b01) r = '{tz: 4'd5, len: 4'd2};
          if (w[8 -: 4] == 4'b0001) r = '{tz: 4'd6, len: 4'd4};
        end
        5'd11: begin
          if (w[8 -: 4] == 4'b0000) r = '{tz: 4'd0, len: 4'd4};
          if (w[8 -: 4] == 4'b0001) r = '{tz: 4'd1, len: 4'd4};
          if (w[8 -: 3] == 3'b001) r = '{tz: 4'd2, len: 4'd3};
          if (w[8 -: 3] == 3'b010) r = '{tz: 4'd3, len: 4'd3};
          if (w[8 -: 1] == 1'b1) r = '{tz: 4'd4, len: 4'd1};
          if (w[8 -: 3] == 3'b011) r = '{tz: 4'd5, len: 4'd3};
        end
        5'd12: begin
          if (w[8 -: 4] == 4'b0000) r = '{tz: 4'd0, len: 4'd4};
          if (w[8 -: 4] == 4'b0001) r = '{tz: 4'd1, len: 4'd4};
          if (w[8 -: 2] == 2'b01) r = '{tz: 4'd2, len: 4'd2};
          if (w[8 -: 1] == 1'b1) r = '{tz: 4'd3, len: 4'd1};
          if (w[8 -: 3] == 3'b001) r = '{tz: 4'd4, len: 4'd3};
        end
        5'd13: begin
          if (w[8 -: 3] == 3'b000) r = '{tz: 4'd0, len: 4'd3};
          if (w[8 -: 3] == 3'b001) r = '{tz: 4'd1, len: 4'd3};
          if (w[8 -: 1] == 1'b1) r = '{tz: 4'd2, len: 4'd1};
          if (w[8 -: 2] == 2'b01) r = '{tz: 4'd3, len: 4'd2};
        end
        5'd14: begin
          if (w[8 -: 2] == 2'b00) r = '{tz: 4'd0, len: 4'd2};
          if (w[8 -: 2] == 2'b01) r = '{tz: 4'd1, len: 4'd2};
          if (w[8 -: 1] == 1'b1) r = '{tz: 4'd2, len: 4'd1};
        end
        5'd15: begin
          if (w[8 -: 1] == 1'b0) r = '{tz: 4'd0, len: 4'd1};
          if (w[8 -: 1] == 1'b1) r = '{tz: 4'd1, len: 4'd1};
        end
        default: ;
      endcase
    end
    return r;
  endfunction

  function automatic rb_res_t rb_lookup(logic [10:0] w, logic [3:0] zl);
    rb_res_t r;
    r = '{run: 4'd0, len: 4'd0};
    case (zl)
      4'd1: begin
        if (w[10 -: 1] == 1'b1) r = '{run: 4'd0, len: 4'd1};
        if (w[10 -: 1] == 1'b0) r = '{run: 4'd1, len: 4'd1};
      end
      4'd2: begin
        if (w[10 -: 1] == 1'b1) r = '{run: 4'd0, len: 4'd1};
        if (w[10 -: 2] == 2'b01) r = '{run: 4'd1, len: 4'd2};
        if (w[10 -: 2] == 2'b00) r = '{run: 4'd2, len: 4'd2};
      end
      4'd3: begin
        if (w[10 -: 2] == 2'b11) r = '{run: 4'd0, len: 4'd2};
        if (w[10 -: 2] == 2'b10) r = '{run: 4'd1, len: 4'd2};
        if (w[10 -: 2] == 2'b01) r = '{run: 4'd2, len: 4'd2};
        if (w[10 -: 2] == 2'b00) r = '{run: 4'd3, len: 4'd2};
      end
      4'd4: begin
        if (w[10 -: 2] == 2'b11) r = '{run: 4'd0, len: 4'd2};
        if (w[10 -: 2] == 2'b10) r = '{run: 4'd1, len: 4'd2};
        if (w[10 -: 2] == 2'b01) r = '{run: 4'd2, len: 4'd2};
        if (w[10 -: 3] == 3'b001) r = '{run: 4'd3, len: 4'd3};
        if (w[10 -: 3] == 3'b000) r = '{run: 4'd4, len: 4'd3};
      end
      4'd5: begin
        if (w[10 -: 2] == 2'b11) r = '{run: 4'd0, len: 4'd2};
        if (w[10 -: 2] == 2'b10) r = '{run: 4'd1, len: 4'd2};
        if (w[10 -: 3] == 3'b011) r = '{run: 4'd2, len: 4'd3};
        if (w[10 -: 3] == 3'b010) r = '{run: 4'd3, len: 4'd3};
        if (w[10 -: 3] == 3'b001) r = '{run: 4'd4, len: 4'd3};
        if (w[10 -: 3] == 3'b000) r = '{run: 4'd5, len: 4'd3};
      end
      4'd6: begin
        if (w[10 -: 2] == 2'b11) r = '{run: 4'd0, len: 4'd2};
        if (w[10 -: 3] == 3'b000) r = '{run: 4'd1, len: 4'd3};
        if (w[10 -: 3] == 3'b001) r = '{run: 4'd2, len: 4'd3};
        if (w[10 -: 3] == 3'b011) r = '{run: 4'd3, len: 4'd3};
        if (w[10 -: 3] == 3'b010) r = '{run: 4'd4, len: 4'd3};
        if (w[10 -: 3] == 3'b101) r = '{run: 4'd5, len: 4'd3};
        if (w[10 -: 3] == 3'b100) r = '{run: 4'd6, len: 4'd3};
      end
      default: begin
        if (w[10 -: 3] == 3'b111) r = '{run: 4'd0, len: 4'd3};
        if (w[10 -: 3] == 3'b110) r = '{run: 4'd1, len: 4'd3};
        if (w[10 -: 3] == 3'b101) r = '{run: 4'd2, len: 4'd3};
        if (w[10 -: 3] == 3'b100) r = '{run: 4'd3, len: 4'd3};
        if (w[10 -: 3] == 3'b011) r = '{run: 4'd4, len: 4'd3};
        if (w[10 -: 3] == 3'b010) r = '{run: 4'd5, len: 4'd3};
        if (w[10 -: 3] == 3'b001) r = '{run: 4'd6, len: 4'd3};
        if (w[10 -: 4] == 4'b0001) r = '{run: 4'd7, len: 4'd4};
        if (w[10 -: 5] == 5'b00001) r = '{run: 4'd8, len: 4'd5};
        if (w[10 -: 6] == 6'b000001) r = '{run: 4'd9, len: 4'd6};
        if (w[10 -: 7] == 7'b0000001) r = '{run: 4'd10, len: 4'd7};
        if (w[10 -: 8] == 8'b00000001) r = '{run: 4'd11, len: 4'd8};
        if (w[10 -: 9] == 9'b000000001) r = '{run: 4'd12, len: 4'd9};
        if (w[10 -: 10] == 10'b0000000001) r = '{run: 4'd13, len: 4'd10};
        if (w[10 -: 11] == 11'b00000000001) r = '{run: 4'd14, len: 4'd11};
      end
    endcase
    return r;
  endfunction

endpackage
