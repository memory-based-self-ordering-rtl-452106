// mem_bank: memory block p of the four, with its routing (one block of the
// document's per-block routing diagram).
//
// A dual-port memory of N/4 complex words. Port A is routed by a port_router
// between read address R0 and delayed write address W1, port B between R1 and
// W0. Each port's write data comes from a two-input multiplexer: the PE
// result that belongs to that port's write address (Doy for W1 on port A, Dox
// for W0 on port B) when the router passes the write address, otherwise the
// new input sample (di0 on port A, di1 on port B), which is written only in
// the last stage. The document draws Dox at port A; here each PE output goes
// to the port that carries its own address, which is what makes the results
// land where the schedule places them.
// Read data appear on dout_a / dout_b one clock after the address.
module mem_bank #(
  parameter int N = 2048,
  parameter int P = 0
) (
  input  logic                 clk,
  input  logic [$clog2(N)-1:0] r_addr0,
  input  logic [$clog2(N)-1:0] r_addr1,
  input  logic                 r_en,
  input  logic                 r_load,
  input  logic [$clog2(N)-1:0] w_addr0,
  input  logic [$clog2(N)-1:0] w_addr1,
  input  logic                 w_en,
  input  fft_pkg::cplx_t       dox,
  input  fft_pkg::cplx_t       doy,
  input  fft_pkg::cplx_t       di0,
  input  fft_pkg::cplx_t       di1,
  output fft_pkg::cplx_t       dout_a,
  output fft_pkg::cplx_t       dout_b
);
  import fft_pkg::*;

  localparam int AW = $clog2(N) - 2;

  logic [AW-1:0] adr_a, adr_b;
  logic          we_a, we_b, ce_a, ce_b, selw_a, selw_b;
  cplx_t         din_a, din_b;

  port_router #(.N(N), .P(P)) u_router_a (
    .clk, .r_addr(r_addr0), .r_en, .r_load, .w_addr(w_addr1), .w_en,
    .adr(adr_a), .we(we_a), .ce(ce_a), .sel_w(selw_a)
  );

  port_router #(.N(N), .P(P)) u_router_b (
    .clk, .r_addr(r_addr1), .r_en, .r_load, .w_addr(w_addr0), .w_en,
    .adr(adr_b), .we(we_b), .ce(ce_b), .sel_w(selw_b)
  );

  assign din_a = selw_a ? doy : di0;
  assign din_b = selw_b ? dox : di1;

  dp_ram #(.DEPTH(N / 4), .WIDTH($bits(cplx_t))) u_ram (
    .clk,
    .ce_a, .we_a, .addr_a(adr_a), .din_a(din_a), .dout_a(dout_a),
    .ce_b, .we_b, .addr_b(adr_b), .din_b(din_b), .dout_b(dout_b)
  );

endmodule
