// fft_top: self-ordering, memory-based, radix-2 complex FFT of N points.
//
// One butterfly (pe) per clock works in place on N complex words held in four
// dual-port memory blocks of N/4 words (mem_bank). The address generator
// (addr_gen) permutes the address bits while the first int(log2(N)/2) stages
// are written back, so that at the end every result sits at its natural
// index and the last stage can stream results out in order. That last stage
// is therefore never written back: in the same clocks, new input samples are
// written into the words it has just read. Load, unload and the last stage
// overlap completely, and a new N-point transform starts every
// (N/2)*log2(N) clocks.
//
// Streaming interface (2 samples per clock in each direction):
//   ird high: present x[k] on di0 and x[k+N/2] on di1, for k = 0, 1, ...,
//             N/2-1 in consecutive clocks (N/2 clocks per frame).
//   stage:    number of the stage in progress (0 .. log2(N)-1), for
//             monitoring; the last stage is the load/unload window.
//   ord high: X[k] on do0 and X[k+N/2] on do1, k = 0 .. N/2-1 in order;
//             ord follows ird by two clocks and belongs to the frame loaded
//             in the previous ird window. X is the DFT divided by N.
// After reset the first ird window loads the first frame; ord stays low in
// the matching window. Inputs must keep a complex magnitude below full scale.
// Transform lengths 2^S with odd S >= 5 are supported (N = 2048 by default).
module fft_top #(
  parameter int N = 2048
) (
  input  logic           clk,
  input  logic           rst_n,
  input  fft_pkg::cplx_t di0,
  input  fft_pkg::cplx_t di1,
  output logic           ird,
  output fft_pkg::cplx_t do0,
  output fft_pkg::cplx_t do1,
  output logic           ord,
  output logic [$clog2($clog2(N))-1:0] stage
);
  import fft_pkg::*;

  localparam int S  = $clog2(N);
  localparam int SH = S / 2;

  logic [S-1:0]          rd_addr0, rd_addr1, wr_addr0, wr_addr1;
  logic                  rd_load, wr_en;
  logic [S-2:0]          tw_exp, tw_exp_q;

  addr_gen #(.N(N)) u_addr_gen (
    .clk, .rst_n,
    .rd_addr0, .rd_addr1, .rd_load, .ird, .tw_exp, .stage,
    .wr_addr0, .wr_addr1, .wr_en, .ord
  );

  // twiddle index waits one clock for the memory read, the table adds one
  always_ff @(posedge clk) tw_exp_q <= tw_exp;

  tw_t tw;
  twiddle_gen #(.N(N)) u_twiddle (.clk, .e(tw_exp_q), .tw);

  cplx_t dox, doy;
  cplx_t dout_a [4];
  cplx_t dout_b [4];

  for (genvar p = 0; p < 4; p++) begin : g_bank
    mem_bank #(.N(N), .P(p)) u_bank (
      .clk,
      .r_addr0(rd_addr0), .r_addr1(rd_addr1), .r_en(1'b1), .r_load(rd_load),
      .w_addr0(wr_addr0), .w_addr1(wr_addr1), .w_en(wr_en),
      .dox, .doy, .di0, .di1,
      .dout_a(dout_a[p]), .dout_b(dout_b[p])
    );
  end

  cplx_t dix, diy;
  read_mux u_read_mux (
    .clk,
    .sel0(bank_of(word_t'(rd_addr0), SH)), .sel1(bank_of(word_t'(rd_addr1), SH)),
    .dout_a, .dout_b, .dix, .diy
  );

  pe u_pe (.clk, .dix, .diy, .tw, .dox, .doy);

  assign do0 = dox;
  assign do1 = doy;

  // interface rule: results leave two clocks after the matching input pair
  a_ord_after_ird: assert property (@(posedge clk) disable iff (!rst_n)
                                    ord |-> $past(ird, 2))
    else $error("fft_top: ord without ird two clocks earlier");

endmodule
