// tb_fft_sizes: the transform lengths the FFT was built for besides the
// default, N = 32 (5 stages, 80 clocks per frame) and N = 512 (9 stages,
// 2304 clocks per frame), each streaming four frames against a
// double-precision DFT with frame rate and interface timing checked. The two
// instances run side by side; the test ends when both have finished.
module tb_fft_sizes;
  import fft_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  // N = 32
  logic        rst_a, ird_a, ord_a, done_a;
  int          checks_a, failures_a;
  cplx_t       di0_a, di1_a, do0_a, do1_a;
  logic [2:0]  stage_a;
  fft_top #(.N(32)) dut_a (.clk, .rst_n(rst_a), .di0(di0_a), .di1(di1_a), .ird(ird_a),
                           .do0(do0_a), .do1(do1_a), .ord(ord_a), .stage(stage_a));
  fft_stream_checker #(.N(32), .FRAMES(4), .OWN_FINISH(1'b0)) u_chk_a (
    .clk, .rst_n(rst_a), .di0(di0_a), .di1(di1_a), .ird(ird_a), .do0(do0_a), .do1(do1_a),
    .ord(ord_a), .stage(stage_a), .done(done_a), .checks(checks_a), .failures(failures_a));

  // N = 512
  logic        rst_b, ird_b, ord_b, done_b;
  int          checks_b, failures_b;
  cplx_t       di0_b, di1_b, do0_b, do1_b;
  logic [3:0]  stage_b;
  fft_top #(.N(512)) dut_b (.clk, .rst_n(rst_b), .di0(di0_b), .di1(di1_b), .ird(ird_b),
                            .do0(do0_b), .do1(do1_b), .ord(ord_b), .stage(stage_b));
  fft_stream_checker #(.N(512), .FRAMES(4), .OWN_FINISH(1'b0)) u_chk_b (
    .clk, .rst_n(rst_b), .di0(di0_b), .di1(di1_b), .ird(ird_b), .do0(do0_b), .do1(do1_b),
    .ord(ord_b), .stage(stage_b), .done(done_b), .checks(checks_b), .failures(failures_b));

  initial begin
    fork
      wait (done_a && done_b);
      repeat (7 * 2304 + 200) @(posedge clk);
    join_any
    @(posedge clk);
    $display("N=32: checks %0d failures %0d; N=512: checks %0d failures %0d",
             checks_a, failures_a, checks_b, failures_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b,
             failures_a + failures_b + ((done_a && done_b) ? 0 : 1));
    $finish;
  end
endmodule
