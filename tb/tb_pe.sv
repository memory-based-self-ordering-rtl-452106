// tb_pe: random butterflies through the processing element. The expected
// results are formed here with integer arithmetic written out independently:
//   Dox = floor((x + y) / 2)  per component
//   d   = floor((x - y) / 2)  per component
//   Doy = floor((d * tw) / 2^(TW-1)), complex product
// Dox/Doy must appear one clock after Dix/Diy are presented (the pipeline
// register), with the twiddle presented in that later clock.
module tb_pe;
  import fft_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  cplx_t dix, diy, dox, doy;
  tw_t   tw;

  pe dut (.*);

  int checks = 0, failures = 0;

  function automatic longint fdiv(longint a, longint b);  // floor division
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  function automatic int rnd(int lim);
    return int'($urandom_range(2 * lim)) - lim;
  endfunction

  initial begin
    longint xr, xi, yr, yi, dr, di, wr, wi, er, ei, sr, si;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      xr = rnd(90000); xi = rnd(90000); yr = rnd(90000); yi = rnd(90000);
      dix.re = DW'(xr); dix.im = DW'(xi); diy.re = DW'(yr); diy.im = DW'(yi);
      @(negedge clk);
      // a unit-magnitude twiddle at a random angle
      wr = longint'($rtoi($cos(6.283185307179586 * $urandom_range(65535) / 65536.0) * 131071.0));
      wi = longint'($rtoi($sqrt(131071.0 * 131071.0 - real'(wr * wr)))) * (($urandom_range(1) == 1) ? -1 : 1);
      if (i == 0) begin wr = 131071; wi = 0; end
      tw.re = TW'(wr); tw.im = TW'(wi);
      dix = '0; diy = '0;              // must not disturb the registered values
      #1;
      sr = fdiv(xr + yr, 2); si = fdiv(xi + yi, 2);
      dr = fdiv(xr - yr, 2); di = fdiv(xi - yi, 2);
      er = fdiv(dr * wr - di * wi, 64'sd1 << (TW - 1));
      ei = fdiv(dr * wi + di * wr, 64'sd1 << (TW - 1));
      checks++; if (dox.re != sr || dox.im != si) begin failures++; $display("FAIL dox"); end
      checks++; if (doy.re != er || doy.im != ei) begin failures++; $display("FAIL doy %0d %0d / %0d %0d", doy.re, doy.im, er, ei); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
