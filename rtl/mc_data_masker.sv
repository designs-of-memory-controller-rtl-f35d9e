// Data masker of the frame memory controller read path.
//
// Every 32-bit word read from the SDRAM carries four pixels, but at the left
// and right edge of a requested rectangle only some of them are wanted. The
// masker takes each returning word with the index of its first and last
// wanted pixel (`lo`, `hi`, pixel 0 in bits 7:0), shifts the wanted pixels
// down so that they start at bit 0, clears the others and reports their
// number in `n_pix` (1..4): the first 8*n_pix bits of `out_data` are valid.
// It holds two words: the input register that captures the SDRAM data and
// the output register. Line and request boundary flags travel with the data,
// and `out_valid` is the data-enable to the processing unit. Latency: two
// cycles from `in_valid` to `out_valid`.
//
// Masking the redundant bytes of each word follows the source design; the
// two-stage pipeline and the pixel-count output are this design's choices.
module mc_data_masker
  import mc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [DATA_W-1:0]  in_data,
  input  logic [1:0]         in_lo,
  input  logic [1:0]         in_hi,
  input  logic               in_eol,
  input  logic               in_last,
  output logic               out_valid,
  output logic [DATA_W-1:0]  out_data,
  output logic [2:0]         out_n_pix,
  output logic               out_eol,
  output logic               out_last
);

  logic              v1_q, eol1_q, last1_q;
  logic [DATA_W-1:0] d1_q;
  logic [1:0]        lo1_q, hi1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q <= 1'b0; eol1_q <= 1'b0; last1_q <= 1'b0; d1_q <= '0; lo1_q <= '0; hi1_q <= '0;
    end else begin
      v1_q <= in_valid;
      if (in_valid) begin
        d1_q <= in_data; lo1_q <= in_lo; hi1_q <= in_hi; eol1_q <= in_eol; last1_q <= in_last;
      end
    end
  end

  logic [DATA_W-1:0] shifted, mask;
  logic [2:0]        n_d;
  always_comb begin
    n_d     = 3'(hi1_q) - 3'(lo1_q) + 3'd1;
    shifted = d1_q >> {lo1_q, 3'b000};
    mask    = ~(DATA_W'('1) << {n_d, 3'b000});
    if (n_d == 3'd4) mask = '1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_data <= '0; out_n_pix <= '0; out_eol <= 1'b0; out_last <= 1'b0;
    end else begin
      out_valid <= v1_q;
      if (v1_q) begin
        out_data  <= shifted & mask;
        out_n_pix <= n_d;
        out_eol   <= eol1_q;
        out_last  <= last1_q;
      end
    end
  end

endmodule
