// read_mux: selects the two PE inputs from the four memory blocks.
//
// Dix comes from port A of the block addressed by R0, Diy from port B of the
// block addressed by R1. The block numbers (the two block-select bits of R0
// and R1) are given in the clock the read address is issued and are delayed
// here by one clock to meet the data, which the memories return one clock
// later.
module read_mux (
  input  logic              clk,
  input  logic [1:0]        sel0,
  input  logic [1:0]        sel1,
  input  fft_pkg::cplx_t    dout_a [4],
  input  fft_pkg::cplx_t    dout_b [4],
  output fft_pkg::cplx_t    dix,
  output fft_pkg::cplx_t    diy
);
  logic [1:0] sel0_q, sel1_q;

  always_ff @(posedge clk) begin
    sel0_q <= sel0;
    sel1_q <= sel1;
  end

  assign dix = dout_a[sel0_q];
  assign diy = dout_b[sel1_q];

endmodule
