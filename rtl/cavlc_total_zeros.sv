// total_zeros decoder of the CAVLC decoder.
//
// Combinational. Two tables, one for 4x4 blocks and one for chroma DC 2x2
// blocks, each split into sub-tables selected by TotalCoeff; it returns
// TotalZeros and its code length (at most 9 bits).
//
// The tables for 4x4 and chroma DC blocks follow H.264; their combinational
// form is this design's choice.
module cavlc_total_zeros
  import cavlc_pkg::*;
(
  input  logic [31:0] win,
  input  logic [4:0]  total_coeff,
  input  logic        chroma_dc,
  output logic [3:0]  total_zeros,
  output logic [3:0]  len
);

  tz_res_t r;
  assign r           = tz_lookup(win[31:23], total_coeff, chroma_dc);
  assign total_zeros = r.tz;
  assign len         = r.len;

endmodule
