// fft_stream_checker: stimulus and scoreboard for the streaming FFT, shared by
// the end-to-end testbenches (it is not a testbench on its own).
//
// It feeds FRAMES frames of complex samples through the ird window (x[k] on
// di0, x[k+N/2] on di1), then one more window of zeros to flush the last
// frame. Frame 0 is an impulse at n = 1, frame 1 a single complex tone at bin
// 3, the others pseudo-random samples of magnitude below full scale. Each
// output window is compared against a DFT (scaled by 1/N) computed here in
// double precision from the same samples; an output component may differ by
// at most TOL least-significant bits.
// Timing checks: ird lasts N/2 clocks and recurs every (N/2)*log2(N) clocks;
// ord follows ird by exactly two clocks; the first window after reset
// produces no output. Mechanism counters: clocks with load and unload
// overlapping, clocks spent in address-swapping stages, stage transitions,
// frames checked; each must be non-zero.
module fft_stream_checker #(
  parameter int N      = 128,
  parameter int FRAMES = 4,
  parameter int TOL    = 8,
  parameter bit OWN_FINISH = 1'b1   // 0: report through done/checks/failures
) (
  input  logic                          clk,
  output logic                          rst_n,
  output fft_pkg::cplx_t                di0,
  output fft_pkg::cplx_t                di1,
  input  logic                          ird,
  input  fft_pkg::cplx_t                do0,
  input  fft_pkg::cplx_t                do1,
  input  logic                          ord,
  input  logic [$clog2($clog2(N))-1:0]  stage,
  output logic                          done,
  output int                            checks,
  output int                            failures
);
  import fft_pkg::*;

  localparam int  S      = $clog2(N);
  localparam int  PERIOD = S * N / 2;
  localparam real PI     = 3.14159265358979323846;
  localparam int  AMP    = 1 << (DW - 2);   // per component: |x| < full scale

  initial begin checks = 0; failures = 0; done = 1'b0; end
  int n_overlap = 0, n_swap = 0, n_trans = 0, n_frames = 0;

  int   xr [FRAMES+1][N];
  int   xi [FRAMES+1][N];
  real  ct [N];
  real  st [N];

  // --- stimulus data --------------------------------------------------------
  initial begin
    for (int n = 0; n < N; n++) begin
      ct[n] = $cos(2.0 * PI * n / N);
      st[n] = $sin(2.0 * PI * n / N);
    end
    for (int f = 0; f <= FRAMES; f++)
      for (int n = 0; n < N; n++) begin
        if (f == FRAMES) begin
          xr[f][n] = 0; xi[f][n] = 0;
        end else if (f == 0) begin
          xr[f][n] = (n == 1) ? 100000 : 0;
          xi[f][n] = (n == 1) ? -50000 : 0;
        end else if (f == 1) begin
          xr[f][n] = $rtoi(80000.0 * ct[(3 * n) % N]);
          xi[f][n] = $rtoi(80000.0 * st[(3 * n) % N]);
        end else begin
          xr[f][n] = int'($urandom_range(2 * AMP)) - AMP;
          xi[f][n] = int'($urandom_range(2 * AMP)) - AMP;
        end
      end
  end

  // --- drive inputs -----------------------------------------------------------
  int fin = 0, kin = 0;
  always_comb begin
    di0.re = DW'(xr[fin][kin]);
    di0.im = DW'(xi[fin][kin]);
    di1.re = DW'(xr[fin][kin + N/2]);
    di1.im = DW'(xi[fin][kin + N/2]);
  end

  // --- timing bookkeeping -----------------------------------------------------
  longint cyc = 0, ird_rise = -1;
  logic   ird_q = 0, ird_qq = 0;
  logic [$clog2($clog2(N))-1:0] stage_q = '0;
  int     ird_len = 0;
  int     fout = 0, kout = 0;
  logic   seen_first_window = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // reference output for one frame and compare
  task automatic check_frame(int f, int yr0 [N], int yi0 [N]);
    real re, im, err, maxerr;
    maxerr = 0.0;
    for (int k = 0; k < N; k++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < N; n++) begin
        // x[n] * (cos - j sin)
        re += xr[f][n] * ct[(k * n) % N] + xi[f][n] * st[(k * n) % N];
        im += xi[f][n] * ct[(k * n) % N] - xr[f][n] * st[(k * n) % N];
      end
      re /= N; im /= N;
      err = (re > yr0[k]) ? re - yr0[k] : yr0[k] - re;
      if (err > maxerr) maxerr = err;
      err = (im > yi0[k]) ? im - yi0[k] : yi0[k] - im;
      if (err > maxerr) maxerr = err;
    end
    $display("frame %0d: largest output error %0.2f LSB", f, maxerr);
    check(maxerr <= TOL, $sformatf("frame %0d output error %0.2f LSB", f, maxerr));
    n_frames++;
  endtask

  int yr [N];
  int yi [N];

  always @(posedge clk) begin
    if (rst_n && !done) begin
      cyc <= cyc + 1;
      // input side
      if (ird) begin
        if (!ird_q) begin
          if (ird_rise >= 0) check(cyc - ird_rise == longint'(PERIOD),
                                   $sformatf("ird period %0d", cyc - ird_rise));
          ird_rise <= cyc;
        end
        if (kin == N/2 - 1) begin
          kin <= 0;
          if (fin < FRAMES) fin <= fin + 1;
        end else kin <= kin + 1;
        ird_len <= ird_len + 1;
      end else if (ird_q) begin
        check(ird_len == N/2, $sformatf("ird window %0d clocks", ird_len));
        ird_len <= 0;
      end
      // ord follows ird by two clocks, except in the first window
      check(ord == (ird_qq && seen_first_window), "ord is not ird delayed by two clocks");
      if (ord && ird) n_overlap <= n_overlap + 1;
      if (int'(stage) < S / 2) n_swap <= n_swap + 1;
      if (stage != stage_q) n_trans <= n_trans + 1;
      stage_q <= stage;
      ird_q  <= ird;
      ird_qq <= ird_q;
      if (!ird_q && ird_qq) seen_first_window <= 1'b1;
      // output side
      if (ord) begin
        yr[kout]       = int'(do0.re);  yi[kout]       = int'(do0.im);
        yr[kout + N/2] = int'(do1.re);  yi[kout + N/2] = int'(do1.im);
        if (kout == N/2 - 1) begin
          check_frame(fout, yr, yi);
          kout <= 0;
          fout <= fout + 1;
          if (fout == FRAMES - 1 && !done) begin
            check(n_overlap > 0, "load and unload never overlapped");
            check(n_swap > 0, "no address-swapping stage seen");
            check(n_trans > 0, "no stage transition seen");
            $display("overlap clocks %0d, swapping-stage clocks %0d, stage transitions %0d, frames %0d",
                     n_overlap, n_swap, n_trans, n_frames);
            done <= 1'b1;
            if (OWN_FINISH) begin
              $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
              $finish;
            end
          end
        end else kout <= kout + 1;
      end
    end
  end

  // reset and watchdog
  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;                  // falling edge: asynchronous reset
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat ((FRAMES + 2) * PERIOD + 100) @(posedge clk);
    wait (OWN_FINISH);
    failures++;
    $display("FAIL: watchdog expired after %0d frames", fout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
