// tb_fft_full: the streaming FFT at its default size, N = 2048 points
// (log2 N = 11 stages, 11264 clocks per frame), three frames (impulse, tone,
// random) against a double-precision DFT, with the frame rate and interface
// timing checked (see fft_stream_checker).
module tb_fft_full;
  import fft_pkg::*;
  localparam int N = 2048;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                         rst_n, ird, ord, done;
  int                           checks, failures;
  cplx_t                        di0, di1, do0, do1;
  logic [$clog2($clog2(N))-1:0] stage;

  fft_top dut (.clk, .rst_n, .di0, .di1, .ird, .do0, .do1, .ord, .stage);

  fft_stream_checker #(.N(N), .FRAMES(3)) u_chk (
    .clk, .rst_n, .di0, .di1, .ird, .do0, .do1, .ord, .stage,
    .done, .checks, .failures
  );
endmodule
