// twiddle_gen: twiddle factor W_N^e = cos(2*pi*e/N) - j*sin(2*pi*e/N) for
// 0 <= e < N/2, from a quarter-wave sine table.
//
// The table holds T[i] = round(sin(2*pi*i/N) * (2^(TW-1)-1)) for
// i = 0 .. N/4 (N/4+1 words), computed when the design is elaborated. Two
// table reads per clock give the real and imaginary parts through the
// symmetry of the sine:
//   e <  N/4:  cos = T[N/4-e],        sin = T[e]
//   e >= N/4:  cos = -T[e-N/4],       sin = T[N/2-e]
// The table look-up follows the original description; the table size, the
// scaling and the register placement are this design's. Latency: one clock (registered table
// outputs and quadrant flag), so e given in clock t gives tw in clock t+1.
module twiddle_gen #(
  parameter int N = 2048
) (
  input  logic                 clk,
  input  logic [$clog2(N)-2:0] e,
  output fft_pkg::tw_t         tw
);
  import fft_pkg::*;

  localparam int  Q   = N / 4;
  localparam int  QW  = $clog2(Q) + 1;
  localparam real PI  = 3.14159265358979323846;
  localparam real AMP = real'((1 << (TW - 1)) - 1);

  logic signed [TW-1:0] rom [Q+1];

  initial begin
    for (int i = 0; i <= Q; i++)
      rom[i] = TW'($rtoi($floor($sin(2.0 * PI * i / N) * AMP + 0.5)));
  end

  logic          quad;
  logic [QW-1:0] idx_a, idx_b;
  assign quad  = e[$clog2(N)-2];               // e >= N/4
  assign idx_a = QW'(quad ? e - ($clog2(N)-1)'(Q) : e);  // e or e - N/4
  assign idx_b = QW'(Q) - idx_a;

  logic signed [TW-1:0] ta_q, tb_q;
  logic                 quad_q;
  always_ff @(posedge clk) begin
    ta_q   <= rom[idx_a];
    tb_q   <= rom[idx_b];
    quad_q <= quad;
  end

  // real part = cos, imaginary part = -sin
  assign tw.re = quad_q ? -ta_q : tb_q;
  assign tw.im = quad_q ? -tb_q : -ta_q;

endmodule
