// tb_addr_gen: checks the self-ordering address generator at N = 128.
//
// The testbench keeps its own memory of N complex values (double precision)
// and executes the butterflies exactly as the generator schedules them:
// reads at rd_addr0/1 in clock t, results written at wr_addr0/1 when wr_en is
// high (clock t+2), twiddle W_N^tw_exp computed here from cos/sin. In the last
// stage the butterfly results are compared with a DFT of the frame that was
// loaded, and new samples are written at the read addresses. A correct result
// shows that the permutations leave the output in natural order and that no
// word is read before it is written or overwritten before it is read.
// Also checked: every stage reads each address exactly once; the write of a
// port never selects the same memory block as that port's read; ird lasts N/2
// clocks per (N/2)*log2(N) clocks and ord follows ird by two clocks.
module tb_addr_gen;
  localparam int  N  = 128;
  localparam int  S  = $clog2(N);
  localparam int  SH = S / 2;
  localparam real PI = 3.14159265358979323846;
  localparam int  FRAMES = 3;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic [S-1:0] rd_addr0, rd_addr1, wr_addr0, wr_addr1;
  logic         rd_load, ird, wr_en, ord;
  logic [S-2:0] tw_exp;
  logic [$clog2(S)-1:0] stage;

  addr_gen #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  real mr [N], mi [N];            // memory model
  real xr [FRAMES+1][N], xi [FRAMES+1][N];
  real pr0 [3], pi0 [3], pr1 [3], pi1 [3];   // butterfly result pipeline
  int  seen [N];
  int  fin = 0, cnt_in = 0, frames_checked = 0;
  int  cyc = 0, ird_rise = -1, ird_len = 0;
  logic ird_q = 0, ird_qq = 0, first_done = 0, fd_q = 0, fd_qq = 0;
  logic [$clog2(S)-1:0] stage_q;

  function automatic logic [1:0] bank(logic [S-1:0] a);
    return {a[SH], a[SH-1]};
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic void dft(int f, int k, output real re, output real im);
    re = 0.0; im = 0.0;
    for (int n = 0; n < N; n++) begin
      re += xr[f][n] * $cos(2.0*PI*k*n/N) + xi[f][n] * $sin(2.0*PI*k*n/N);
      im += xi[f][n] * $cos(2.0*PI*k*n/N) - xr[f][n] * $sin(2.0*PI*k*n/N);
    end
  endfunction

  initial begin
    for (int f = 0; f <= FRAMES; f++)
      for (int n = 0; n < N; n++) begin
        xr[f][n] = real'($urandom_range(2000)) - 1000.0;
        xi[f][n] = real'($urandom_range(2000)) - 1000.0;
      end
    for (int n = 0; n < N; n++) seen[n] = 0;
    #1 rst_n = 1'b0;                  // falling edge: asynchronous reset
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
  end

  always @(posedge clk) if (rst_n) begin
    real ar, ai, br, bi, wr, wi, dr, di, er, ei;
    cyc++;
    // ---- read side, clock t ----
    ar = mr[rd_addr0]; ai = mi[rd_addr0];
    br = mr[rd_addr1]; bi = mi[rd_addr1];
    wr = $cos(2.0*PI*tw_exp/N); wi = -$sin(2.0*PI*tw_exp/N);
    dr = ar - br; di = ai - bi;
    pr0[0] = ar + br;          pi0[0] = ai + bi;
    pr1[0] = dr*wr - di*wi;    pi1[0] = dr*wi + di*wr;
    // coverage of the read addresses in each stage
    if (stage_q != stage && cyc > 1) begin
      for (int n = 0; n < N; n++) begin
        check(seen[n] == 1, $sformatf("stage %0d read address %0d %0d times", stage_q, n, seen[n]));
        seen[n] = 0;
      end
    end
    seen[rd_addr0]++; seen[rd_addr1]++;
    check(ord == fd_qq, "ord is not ird delayed by two clocks (first window excluded)");
    fd_qq = fd_q; fd_q = ird && first_done;
    // ---- last stage: compare results with DFT of the loaded frame, load new data
    if (rd_load) begin
      if (first_done) begin
        dft(fin - 1, int'(rd_addr0), er, ei);
        check(rabs(er - pr0[0]) < 1e-6 * N && rabs(ei - pi0[0]) < 1e-6 * N,
              $sformatf("X[%0d] wrong", rd_addr0));
        dft(fin - 1, int'(rd_addr1), er, ei);
        check(rabs(er - pr1[0]) < 1e-6 * N && rabs(ei - pi1[0]) < 1e-6 * N,
              $sformatf("X[%0d] wrong", rd_addr1));
      end
      check(rd_addr0 == S'(cnt_in) && rd_addr1 == S'(cnt_in + N/2), "load address not in natural order");
      mr[rd_addr0] = xr[fin][rd_addr0]; mi[rd_addr0] = xi[fin][rd_addr0];
      mr[rd_addr1] = xr[fin][rd_addr1]; mi[rd_addr1] = xi[fin][rd_addr1];
      if (cnt_in == N/2 - 1) begin
        cnt_in = 0;
        if (first_done) frames_checked++;
        first_done = 1;
        fin++;
      end else cnt_in++;
    end
    // ---- write side, clock t+2 ----
    if (wr_en) begin
      check(bank(wr_addr1) != bank(rd_addr0), "port A: write and read in the same block");
      check(bank(wr_addr0) != bank(rd_addr1), "port B: write and read in the same block");
      mr[wr_addr0] = pr0[2]; mi[wr_addr0] = pi0[2];
      mr[wr_addr1] = pr1[2]; mi[wr_addr1] = pi1[2];
    end
    for (int i = 2; i > 0; i--) begin
      pr0[i] = pr0[i-1]; pi0[i] = pi0[i-1]; pr1[i] = pr1[i-1]; pi1[i] = pi1[i-1];
    end
    stage_q = stage;
    // ---- interface timing ----
    if (ird && !ird_q) begin
      if (ird_rise >= 0) check(cyc - ird_rise == S * N / 2, "frame period");
      ird_rise = cyc;
    end
    if (ird) ird_len++;
    else if (ird_q) begin
      check(ird_len == N/2, "ird window length");
      ird_len = 0;
    end
    ird_qq = ird_q; ird_q = ird;
    if (fin == FRAMES + 1) begin
      check(frames_checked == FRAMES, "frame count");
      $display("frames checked: %0d", frames_checked);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat ((FRAMES + 3) * S * N / 2) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
