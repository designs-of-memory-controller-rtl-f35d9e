// Encoder-side code tables for the CAVLC reference model used by the
// testbenches. Each function returns {length, code} for one symbol, with the
// code right-aligned; these are the H.264 code tables written from the
// encoder's side, independent of the decoder's table logic.
//
// The tables are the standard H.264 ones, written independently of the
// decoder tables so they can check them.
package cavlc_enc_pkg;

  typedef struct packed { logic [4:0] len; logic [15:0] code; } vlc_t;

  function automatic vlc_t enc_ct_nc0(int tc, int t1s);
    case (tc*4+t1s)
      0: return '{len: 5'd1, code: 16'b1};
      4: return '{len: 5'd6, code: 16'b000101};
      5: return '{len: 5'd2, code: 16'b01};
      8: return '{len: 5'd8, code: 16'b00000111};
      9: return '{len: 5'd6, code: 16'b000100};
      10: return '{len: 5'd3, code: 16'b001};
      12: return '{len: 5'd9, code: 16'b000000111};
      13: return '{len: 5'd8, code: 16'b00000110};
      14: return '{len: 5'd7, code: 16'b0000101};
      15: return '{len: 5'd5, code: 16'b00011};
      16: return '{len: 5'd10, code: 16'b0000000111};
      17: return '{len: 5'd9, code: 16'b000000110};
      18: return '{len: 5'd8, code: 16'b00000101};
      19: return '{len: 5'd6, code: 16'b000011};
      20: return '{len: 5'd11, code: 16'b00000000111};
      21: return '{len: 5'd10, code: 16'b0000000110};
      22: return '{len: 5'd9, code: 16'b000000101};
      23: return '{len: 5'd7, code: 16'b0000100};
      24: return '{len: 5'd13, code: 16'b0000000001111};
      25: return '{len: 5'd11, code: 16'b00000000110};
      26: return '{len: 5'd10, code: 16'b0000000101};
      27: return '{len: 5'd8, code: 16'b00000100};
      28: return '{len: 5'd13, code: 16'b0000000001011};
      29: return '{len: 5'd13, code: 16'b0000000001110};
      30: return '{len: 5'd11, code: 16'b00000000101};
      31: return '{len: 5'd9, code: 16'b000000100};
      32: return '{len: 5'd13, code: 16'b0000000001000};
      33: return '{len: 5'd13, code: 16'b0000000001010};
      34: return '{len: 5'd13, code: 16'b0000000001101};
      35: return '{len: 5'd10, code: 16'b0000000100};
      36: return '{len: 5'd14, code: 16'b00000000001111};
      37: return '{len: 5'd14, code: 16'b00000000001110};
      38: return '{len: 5'd13, code: 16'b0000000001001};
      39: return '{len: 5'd11, code: 16'b00000000100};
      40: return '{len: 5'd14, code: 16'b00000000001011};
      41: return '{len: 5'd14, code: 16'b00000000001010};
      42: return '{len: 5'd14, code: 16'b00000000001101};
      43: return '{len: 5'd13, code: 16'b0000000001100};
      44: return '{len: 5'd15, code: 16'b000000000001111};
      45: return '{len: 5'd15, code: 16'b000000000001110};
      46: return '{len: 5'd14, code: 16'b00000000001001};
      47: return '{len: 5'd14, code: 16'b00000000001100};
      48: return '{len: 5'd15, code: 16'b000000000001011};
      49: return '{len: 5'd15, code: 16'b000000000001010};
      50: return '{len: 5'd15, code: 16'b000000000001101};
      51: return '{len: 5'd14, code: 16'b00000000001000};
      52: return '{len: 5'd16, code: 16'b0000000000001111};
      53: return '{len: 5'd15, code: 16'b000000000000001};
      54: return '{len: 5'd15, code: 16'b000000000001001};
      55: return '{len: 5'd15, code: 16'b000000000001100};
      56: return '{len: 5'd16, code: 16'b0000000000001011};
      57: return '{len: 5'd16, code: 16'b0000000000001110};
      58: return '{len: 5'd16, code: 16'b0000000000001101};
      59: return '{len: 5'd15, code: 16'b000000000001000};
      60: return '{len: 5'd16, code: 16'b0000000000000111};
      61: return '{len: 5'd16, code: 16'b0000000000001010};
      62: return '{len: 5'd16, code: 16'b0000000000001001};
      63: return '{len: 5'd16, code: 16'b0000000000001100};
      64: return '{len: 5'd16, code: 16'b0000000000000100};
      65: return '{len: 5'd16, code: 16'b0000000000000110};
      66: return '{len: 5'd16, code: 16'b0000000000000101};
      67: return '{len: 5'd16, code: 16'b0000000000001000};
      default: return '{len: 5'd0, code: 16'd0};
    endcase
  endfunction

  function automatic vlc_t enc_ct_nc2(int tc, int t1s);
    case (tc*4+t1s)
      0: return '{len: 5'd2, code: 16'b11};
      4: return '{len: 5'd6, code: 16'b001011};
      5: return '{len: 5'd2, code: 16'b10};
      8: return '{len: 5'd6, code: 16'b000111};
      9: return '{len: 5'd5, code: 16'b00111};
      10: return '{len: 5'd3, code: 16'b011};
      12: return '{len: 5'd7, code: 16'b0000111};
      13: return '{len: 5'd6, code: 16'b001010};
      14: return '{len: 5'd6, code: 16'b001001};
      15: return '{len: 5'd4, code: 16'b0101};
      16: return '{len: 5'd8, code: 16'b00000111};
      17: return '{len: 5'd6, code: 16'b000110};
      18: return '{len: 5'd6, code: 16'b000101};
      19: return '{len: 5'd4, code: 16'b0100};
      20: return '{len: 5'd8, code: 16'b00000100};
      21: return '{len: 5'd7, code: 16'b0000110};
      22: return '{len: 5'd7, code: 16'b0000101};
      23: return '{len: 5'd5, code: 16'b00110};
      24: return '{len: 5'd9, code: 16'b000000111};
      25: return '{len: 5'd8, code: 16'b00000110};
      26: return '{len: 5'd8, code: 16'b00000101};
      27: return '{len: 5'd6, code: 16'b001000};
      28: return '{len: 5'd11, code: 16'b00000001111};
      29: return '{len: 5'd9, code: 16'b000000110};
      30: return '{len: 5'd9, code: 16'b000000101};
      31: return '{len: 5'd6, code: 16'b000100};
      32: return '{len: 5'd11, code: 16'b00000001011};
      33: return '{len: 5'd11, code: 16'b00000001110};
      34: return '{len: 5'd11, code: 16'b00000001101};
      35: return '{len: 5'd7, code: 16'b0000100};
      36: return '{len: 5'd12, code: 16'b000000001111};
      37: return '{len: 5'd11, code: 16'b00000001010};
      38: return '{len: 5'd11, code: 16'b00000001001};
      39: return '{len: 5'd9, code: 16'b000000100};
      40: return '{len: 5'd12, code: 16'b000000001011};
      41: return '{len: 5'd12, code: 16'b000000001110};
      42: return '{len: 5'd12, code: 16'b000000001101};
      43: return '{len: 5'd11, code: 16'b00000001100};
      44: return '{len: 5'd12, code: 16'b000000001000};
      45: return '{len: 5'd12, code: 16'b000000001010};
      46: return '{len: 5'd12, code: 16'b000000001001};
      47: return '{len: 5'd11, code: 16'b00000001000};
      48: return '{len: 5'd13, code: 16'b0000000001111};
      49: return '{len: 5'd13, code: 16'b0000000001110};
      50: return '{len: 5'd13, code: 16'b0000000001101};
      51: return '{len: 5'd12, code: 16'b000000001100};
      52: return '{len: 5'd13, code: 16'b0000000001011};
      53: return '{len: 5'd13, code: 16'b0000000001010};
      54: return '{len: 5'd13, code: 16'b0000000001001};
      55: return '{len: 5'd13, code: 16'b0000000001100};
      56: return '{len: 5'd13, code: 16'b0000000000111};
      57: return '{len: 5'd14, code: 16'b00000000001011};
      58: return '{len: 5'd13, code: 16'b0000000000110};
      59: return '{len: 5'd13, code: 16'b0000000001000};
      60: return '{len: 5'd14, code: 16'b00000000001001};
      61: return '{len: 5'd14, code: 16'b00000000001000};
      62: return '{len: 5'd14, code: 16'b00000000001010};
      63: return '{len: 5'd13, code: 16'b0000000000001};
      64: return '{len: 5'd14, code: 16'b00000000000111};
      65: return '{len: 5'd14, code: 16'b00000000000110};
      66: return '{len: 5'd14, code: 16'b00000000000101};
      67: return '{len: 5'd14, code: 16'b00000000000100};
      default: return '{len: 5'd0, code: 16'd0};
    endcase
  endfunction

  function automatic vlc_t enc_ct_nc4(int tc, int t1s);
    case (tc*4+t1s)
      0: return '{len: 5'd4, code: 16'b1111};
      4: return '{len: 5'd6, code: 16'b001111};
      5: return '{len: 5'd4, code: 16'b1110};
      8: return '{len: 5'd6, code: 16'b001011};
      9: return '{len: 5'd5, code: 16'b01111};
      10: return '{len: 5'd4, code: 16'b1101};
      12: return '{len: 5'd6, code: 16'b001000};
      13: return '{len: 5'd5, code: 16'b01100};
      14: return '{len: 5'd5, code: 16'b01110};
      15: return '{len: 5'd4, code: 16'b1100};
      16: return '{len: 5'd7, code: 16'b0001111};
      17: return '{len: 5'd5, code: 16'b01010};
      18: return '{len: 5'd5, code: 16'b01011};
      19: return '{len: 5'd4, code: 16'b1011};
      20: return '{len: 5'd7, code: 16'b0001011};
      21: return '{len: 5'd5, code: 16'b01000};
      22: return '{len: 5'd5, code: 16'b01001};
      23: return '{len: 5'd4, code: 16'b1010};
      24: return '{len: 5'd7, code: 16'b0001001};
      25: return '{len: 5'd6, code: 16'b001110};
      26: return '{len: 5'd6, code: 16'b001101};
      27: return '{len: 5'd4, code: 16'b1001};
      28: return '{len: 5'd7, code: 16'b0001000};
      29: return '{len: 5'd6, code: 16'b001010};
      30: return '{len: 5'd6, code: 16'b001001};
      31: return '{len: 5'd4, code: 16'b1000};
      32: return '{len: 5'd8, code: 16'b00001111};
      33: return '{len: 5'd7, code: 16'b0001110};
      34: return '{len: 5'd7, code: 16'b0001101};
      35: return '{len: 5'd5, code: 16'b01101};
      36: return '{len: 5'd8, code: 16'b00001011};
      37: return '{len: 5'd8, code: 16'b00001110};
      38: return '{len: 5'd7, code: 16'b0001010};
      39: return '{len: 5'd6, code: 16'b001100};
      40: return '{len: 5'd9, code: 16'b000001111};
      41: return '{len: 5'd8, code: 16'b00001010};
      42: return '{len: 5'd8, code: 16'b00001101};
      43: return '{len: 5'd7, code: 16'b0001100};
      44: return '{len: 5'd9, code: 16'b000001011};
      45: return '{len: 5'd9, code: 16'b000001110};
      46: return '{len: 5'd8, code: 16'b00001001};
      47: return '{len: 5'd8, code: 16'b00001100};
      48: return '{len: 5'd9, code: 16'b000001000};
      49: return '{len: 5'd9, code: 16'b000001010};
      50: return '{len: 5'd9, code: 16'b000001101};
      51: return '{len: 5'd8, code: 16'b00001000};
      52: return '{len: 5'd10, code: 16'b0000001101};
      53: return '{len: 5'd9, code: 16'b000000111};
      54: return '{len: 5'd9, code: 16'b000001001};
      55: return '{len: 5'd9, code: 16'b000001100};
      56: return '{len: 5'd10, code: 16'b0000001001};
      57: return '{len: 5'd10, code: 16'b0000001100};
      58: return '{len: 5'd10, code: 16'b0000001011};
      59: return '{len: 5'd10, code: 16'b0000001010};
      60: return '{len: 5'd10, code: 16'b0000000101};
      61: return '{len: 5'd10, code: 16'b0000001000};
      62: return '{len: 5'd10, code: 16'b0000000111};
      63: return '{len: 5'd10, code: 16'b0000000110};
      64: return '{len: 5'd10, code: 16'b0000000001};
      65: return '{len: 5'd10, code: 16'b0000000100};
      66: return '{len: 5'd10, code: 16'b0000000011};
      67: return '{len: 5'd10, code: 16'b0000000010};
      default: return '{len: 5'd0, code: 16'd0};
    endcase
  endfunction

  function automatic vlc_t enc_ct_cdc(int tc, int t1s);
    case (tc*4+t1s)
      0: return '{len: 5'd2, code: 16'b01};
      4: return '{len: 5'd6, code: 16'b000111};
      5: return '{len: 5'd1, code: 16'b1};
      8: return '{len: 5'd6, code: 16'b000100};
      9: return '{len: 5'd6, code: 16'b000110};
      10: return '{len: 5'd3, code: 16'b001};
      12: return '{len: 5'd6, code: 16'b000011};
      13: return '{len: 5'd7, code: 16'b0000011};
      14: return '{len: 5'd7, code: 16'b0000010};
      15: return '{len: 5'd6, code: 16'b000101};
      16: return '{len: 5'd6, code: 16'b000010};
      17: return '{len: 5'd8, code: 16'b00000011};
      18: return '{len: 5'd8, code: 16'b00000010};
      19: return '{len: 5'd7, code: 16'b0000000};
      default: return '{len: 5'd0, code: 16'd0};
    endcase
  endfunction

  function automatic vlc_t enc_tz(int tc, int tz, bit dc);
    if (dc) begin
      case (tc*16+tz)
        16: return '{len: 5'd1, code: 16'b1};
        17: return '{len: 5'd2, code: 16'b01};
        18: return '{len: 5'd3, code: 16'b001};
        19: return '{len: 5'd3, code: 16'b000};
        32: return '{len: 5'd1, code: 16'b1};
        33: return '{len: 5'd2, code: 16'b01};
        34: return '{len: 5'd2, code: 16'b00};
        48: return '{len: 5'd1, code: 16'b1};
        49: return '{len: 5'd1, code: 16'b0};
        default: return '{len: 5'd0, code: 16'd0};
      endcase
    end
    case (tc*16+tz)
      16: return '{len: 5'd1, code: 16'b1};
      17: return '{len: 5'd3, code: 16'b011};
      18: return '{len: 5'd3, code: 16'b010};
      19: return '{len: 5'd4, code: 16'b0011};
      20: return '{len: 5'd4, code: 16'b0010};
      21: return '{len: 5'd5, code: 16'b00011};
      22: return '{len: 5'd5, code: 16'b00010};
      23: return '{len: 5'd6, code: 16'b000011};
      24: return '{len: 5'd6, code: 16'b000010};
      25: return '{len: 5'd7, code: 16'b0000011};
      26: return '{len: 5'd7, code: 16'b0000010};
      27: return '{len: 5'd8, code: 16'b00000011};
      28: return '{len: 5'd8, code: 16'b00000010};
      29: return '{len: 5'd9, code: 16'b000000011};
      30: return '{len: 5'd9, code: 16'b000000010};
      31: return '{len: 5'd9, code: 16'b000000001};
      32: return '{len: 5'd3, code: 16'b111};
      33: return '{len: 5'd3, code: 16'b110};
      34: return '{len: 5'd3, code: 16'b101};
      35: return '{len: 5'd3, code: 16'b100};
      36: return '{len: 5'd3, code: 16'b011};
      37: return '{len: 5'd4, code: 16'b0101};
      38: return '{len: 5'd4, code: 16'b0100};
      39: return '{len: 5'd4, code: 16'b0011};
      40: return '{len: 5'd4, code: 16'b0010};
      41: return '{len: 5'd5, code: 16'b00011};
      42: return '{len: 5'd5, code: 16'b00010};
      43: return '{len: 5'd6, code: 16'b000011};
      44: return '{len: 5'd6, code: 16'b000010};
      45: return '{len: 5'd6, code: 16'b000001};
      46: return '{len: 5'd6, code: 16'b000000};
      48: return '{len: 5'd4, code: 16'b0101};
      49: return '{len: 5'd3, code: 16'b111};
      50: return '{len: 5'd3, code: 16'b110};
      51: return '{len: 5'd3, code: 16'b101};
      52: return '{len: 5'd4, code: 16'b0100};
      53: return '{len: 5'd4, code: 16'b0011};
      54: return '{len: 5'd3, code: 16'b100};
      55: return '{len: 5'd3, code: 16'b011};
      56: return '{len: 5'd4, code: 16'b0010};
      57: return '{len: 5'd5, code: 16'b00011};
      58: return '{len: 5'd5, code: 16'b00010};
      59: return '{len: 5'd6, code: 16'b000001};
      60: return '{len: 5'd5, code: 16'b00001};
      61: return '{len: 5'd6, code: 16'b000000};
      64: return '{len: 5'd5, code: 16'b00011};
      65: return '{len: 5'd3, code: 16'b111};
      66: return '{len: 5'd4, code: 16'b0101};
      67: return '{len: 5'd4, code: 16'b0100};
      68: return '{len: 5'd3, code: 16'b110};
      69: return '{len: 5'd3, code: 16'b101};
      70: return '{len: 5'd3, code: 16'b100};
      71: return '{len: 5'd4, code: 16'b0011};
      72: return '{len: 5'd3, code: 16'b011};
      73: return '{len: 5'd4, code: 16'b0010};
      74: return '{len: 5'd5, code: 16'b00010};
      75: return '{len: 5'd5, code: 16'b00001};
      76: return '{len: 5'd5, code: 16'b00000};
      80: return '{len: 5'd4, code: 16'b0101};
      81: return '{len: 5'd4, code: 16'b0100};
      82: return '{len: 5'd4, code: 16'b0011};
      83: return '{len: 5'd3, code: 16'b111};
      84: return '{len: 5'd3, code: 16'b110};
      85: return '{len: 5'd3, code: 16'b101};
      86: return '{len: 5'd3, code: 16'b100};
      87: return '{len: 5'd3, code: 16'b011};
      88: return '{len: 5'd4, code: 16'b0010};
      89: return '{len: 5'd5, code: 16'b00001};
      90: return '{len: 5'd4, code: 16'b0001};
      91: return '{len: 5'd5, code: 16'b00000};
      96: return '{len: 5'd6, code: 16'b000001};
      97: return '{len: 5'd5, code: 16'b00001};
      98: return '{len: 5'd3, code: 16'b111};
      99: return '{len: 5'd3, code: 16'b110};
      100: return '{len: 5'd3, code: 16'b101};
      101: return '{len: 5'd3, code: 16'b100};
      102: return '{len: 5'd3, code: 16'b011};
      103: return '{len: 5'd3, code: 16'b010};
      104: return '{len: 5'd4, code: 16'b0001};
      105: return '{len: 5'd3, code: 16'b001};
      106: return '{len: 5'd6, code: 16'b000000};
      112: return '{len: 5'd6, code: 16'b000001};
      113: return '{len: 5'd5, code: 16'b00001};
      114: return '{len: 5'd3, code: 16'b101};
      115: return '{len: 5'd3, code: 16'b100};
      116: return '{len: 5'd3, code: 16'b011};
      117: return '{len: 5'd2, code: 16'b11};
      118: return '{len: 5'd3, code: 16'b010};
      119: return '{len: 5'd4, code: 16'b0001};
      120: return '{len: 5'd3, code: 16'b001};
      121: return '{len: 5'd6, code: 16'b000000};
      128: return '{len: 5'd6, code: 16'b000001};
      129: return '{len: 5'd4, code: 16'b0001};
      130: return '{len: 5'd5, code: 16'b00001};
      131: return '{len: 5'd3, code: 16'b011};
      132: return '{len: 5'd2, code: 16'b11};
      133: return '{len: 5'd2, code: 16'b10};
      134: return '{len: 5'd3, code: 16'b010};
      135: return '{len: 5'd3, code: 16'b001};
      136: return '{len: 5'd6, code: 16'b000000};
      144: return '{len: 5'd6, code: 16'b000001};
      145: return '{len: 5'd6, code: 16'b000000};
      146: return '{len: 5'd4, code: 16'b0001};
      147: return '{len: 5'd2, code: 16'b11};
      148: return '{len: 5'd2, code: 16'b10};
      149: return '{len: 5'd3, code: 16'b001};
      150: return '{len: 5'd2, code: 16'b01};
      151: return '{len: 5'd5, code: 16'b00001};
      160: return '{len: 5'd5, code: 16'b00001};
      161: return '{len: 5'd5, code: 16'b00000};
      162: return '{len: 5'd3, code: 16'b001};
      163: return '{len: 5'd2, code: 16'b11};
      164: return '{len: 5'd2, code: 16'b10};
      165: return '{len: 5'd2, code: 16'b01};
      166: return '{len: 5'd4, code: 16'b0001};
      176: return '{len: 5'd4, code: 16'b0000};
      177: return '{len: 5'd4, code: 16'b0001};
      178: return '{len: 5'd3, code: 16'b001};
      179: return '{len: 5'd3, code: 16'b010};
      180: return '{len: 5'd1, code: 16'b1};
      181: return '{len: 5'd3, code: 16'b011};
      192: return '{len: 5'd4, code: 16'b0000};
      193: return '{len: 5'd4, code: 16'b0001};
      194: return '{len: 5'd2, code: 16'b01};
      195: return '{len: 5'd1, code: 16'b1};
      196: return '{len: 5'd3, code: 16'b001};
      208: return '{len: 5'd3, code: 16'b000};
      209: return '{len: 5'd3, code: 16'b001};
      210: return '{len: 5'd1, code: 16'b1};
      211: return '{len: 5'd2, code: 16'b01};
      224: return '{len: 5'd2, code: 16'b00};
      225: return '{len: 5'd2, code: 16'b01};
      226: return '{len: 5'd1, code: 16'b1};
      240: return '{len: 5'd1, code: 16'b0};
      241: return '{len: 5'd1, code: 16'b1};
      default: return '{len: 5'd0, code: 16'd0};
    endcase
  endfunction

  function automatic vlc_t enc_rb(int zl, int run);
    int z;
    z = (zl > 6) ? 7 : zl;
    case (z*16+run)
      16: return '{len: 5'd1, code: 16'b1};
      17: return '{len: 5'd1, code: 16'b0};
      32: return '{len: 5'd1, code: 16'b1};
      33: return '{len: 5'd2, code: 16'b01};
      34: return '{len: 5'd2, code: 16'b00};
      48: return '{len: 5'd2, code: 16'b11};
      49: return '{len: 5'd2, code: 16'b10};
      50: return '{len: 5'd2, code: 16'b01};
      51: return '{len: 5'd2, code: 16'b00};
      64: return '{len: 5'd2, code: 16'b11};
      65: return '{len: 5'd2, code: 16'b10};
      66: return '{len: 5'd2, code: 16'b01};
      67: return '{len: 5'd3, code: 16'b001};
      68: return '{len: 5'd3, code: 16'b000};
      80: return '{len: 5'd2, code: 16'b11};
      81: return '{len: 5'd2, code: 16'b10};
      82: return '{len: 5'd3, code: 16'b011};
      83: return '{len: 5'd3, code: 16'b010};
      84: return '{len: 5'd3, code: 16'b001};
      85: return '{len: 5'd3, code: 16'b000};
      96: return '{len: 5'd2, code: 16'b11};
      97: return '{len: 5'd3, code: 16'b000};
      98: return '{len: 5'd3, code: 16'b001};
      99: return '{len: 5'd3, code: 16'b011};
      100: return '{len: 5'd3, code: 16'b010};
      101: return '{len: 5'd3, code: 16'b101};
      102: return '{len: 5'd3, code: 16'b100};
      112: return '{len: 5'd3, code: 16'b111};
      113: return '{len: 5'd3, code: 16'b110};
      114: return '{len: 5'd3, code: 16'b101};
      115: return '{len: 5'd3, code: 16'b100};
      116: return '{len: 5'd3, code: 16'b011};
      117: return '{len: 5'd3, code: 16'b010};
      118: return '{len: 5'd3, code: 16'b001};
      119: return '{len: 5'd4, code: 16'b0001};
      120: return '{len: 5'd5, code: 16'b00001};
      121: return '{len: 5'd6, code: 16'b000001};
      122: return '{len: 5'd7, code: 16'b0000001};
      123: return '{len: 5'd8, code: 16'b00000001};
      124: return '{len: 5'd9, code: 16'b000000001};
      125: return '{len: 5'd10, code: 16'b0000000001};
      126: return '{len: 5'd11, code: 16'b00000000001};
      default: return '{len: 5'd0, code: 16'd0};
    endcase
  endfunction

endpackage
