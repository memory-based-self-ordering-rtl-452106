// pe: radix-2 decimation-in-frequency butterfly (processing element).
//
//   Dox = (Dix + Diy) / 2
//   Doy = (Dix - Diy) / 2 * tw
// The sum and the difference are formed in the clock in which the memories
// deliver Dix/Diy and are stored in pipeline registers; the complex multiply
// by the twiddle factor is combinational in the following clock, so results
// leave two clocks after the read addresses were issued (one for the memory
// read, one for the pipeline register), as in the original design's PE diagram.
// The halving in every stage is this design's choice: it keeps the word
// length at DW bits through all log2(N) stages without overflow as long as
// the input's complex magnitude stays below full scale, and makes the output
// the DFT divided by N. Both the halving and the product scaling truncate
// (arithmetic shift). tw is a TW-bit complex number with 2^(TW-1)-1 meaning
// 1.0 and must be valid in the clock after dix/diy.
module pe (
  input  logic           clk,
  input  fft_pkg::cplx_t dix,
  input  fft_pkg::cplx_t diy,
  input  fft_pkg::tw_t   tw,
  output fft_pkg::cplx_t dox,
  output fft_pkg::cplx_t doy
);
  import fft_pkg::*;

  logic signed [DW:0] sum_re, sum_im, dif_re, dif_im;
  cplx_t              sum_q, dif_q;

  assign sum_re = DW'(dix.re) + DW'(diy.re);
  assign sum_im = DW'(dix.im) + DW'(diy.im);
  assign dif_re = DW'(dix.re) - DW'(diy.re);
  assign dif_im = DW'(dix.im) - DW'(diy.im);

  // pipeline registers between the adders and the multiplier
  always_ff @(posedge clk) begin
    sum_q.re <= DW'(sum_re >>> 1);
    sum_q.im <= DW'(sum_im >>> 1);
    dif_q.re <= DW'(dif_re >>> 1);
    dif_q.im <= DW'(dif_im >>> 1);
  end

  // complex multiplier
  localparam int PW = DW + TW + 1;
  logic signed [PW-1:0] p_re, p_im;
  assign p_re = PW'(dif_q.re * tw.re) - PW'(dif_q.im * tw.im);
  assign p_im = PW'(dif_q.re * tw.im) + PW'(dif_q.im * tw.re);

  assign dox    = sum_q;
  assign doy.re = DW'(p_re >>> (TW - 1));
  assign doy.im = DW'(p_im >>> (TW - 1));

endmodule
