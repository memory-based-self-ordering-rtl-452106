// tb_twiddle_gen: all N/2 twiddle indices at N = 128, and every 7th one at
// N = 2048, against cos(2*pi*e/N) - j*sin(2*pi*e/N) scaled by 2^(TW-1)-1 and
// computed here in double precision. Each component may differ from the
// exact value by at most 0.5 LSB (table rounding) plus a small margin; the
// result must appear one clock after the index.
module tb_twiddle_gen;
  import fft_pkg::*;
  localparam real PI  = 3.14159265358979323846;
  localparam real AMP = 131071.0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [5:0]  e_s;
  logic [9:0]  e_l;
  tw_t         tw_s, tw_l;

  twiddle_gen #(.N(128))  dut_s (.clk, .e(e_s), .tw(tw_s));
  twiddle_gen #(.N(2048)) dut_l (.clk, .e(e_l), .tw(tw_l));

  int checks = 0, failures = 0;

  task automatic cmp(tw_t t, int e, int n);
    real er, ei, dr, di;
    er = $cos(2.0 * PI * e / n) * AMP;
    ei = -$sin(2.0 * PI * e / n) * AMP;
    dr = t.re - er; di = t.im - ei;
    checks++;
    if (dr > 0.6 || dr < -0.6 || di > 0.6 || di < -0.6) begin
      failures++;
      $display("FAIL N=%0d e=%0d got %0d %0d want %f %f", n, e, t.re, t.im, er, ei);
    end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      e_s = 6'(i % 64);
      e_l = 10'((i * 7) % 1024);
      @(negedge clk);
      cmp(tw_s, i % 64, 128);
      cmp(tw_l, (i * 7) % 1024, 2048);
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
