// tb_fft_top: end-to-end test of the streaming FFT at N = 128 (log2 N = 7),
// five frames (impulse, tone, three random) against a double-precision DFT,
// with the interface timing and frame rate checked (see fft_stream_checker).
module tb_fft_top;
  import fft_pkg::*;
  localparam int N = 128;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                         rst_n, ird, ord, done;
  int                           checks, failures;
  cplx_t                        di0, di1, do0, do1;
  logic [$clog2($clog2(N))-1:0] stage;

  fft_top #(.N(N)) dut (.clk, .rst_n, .di0, .di1, .ird, .do0, .do1, .ord, .stage);

  fft_stream_checker #(.N(N), .FRAMES(5)) u_chk (
    .clk, .rst_n, .di0, .di1, .ird, .do0, .do1, .ord, .stage,
    .done, .checks, .failures
  );
endmodule
