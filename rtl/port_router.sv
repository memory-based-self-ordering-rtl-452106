// port_router: address router in front of one port of memory block P.
//
// Each port of a memory block is offered exactly two addresses: the read
// address of the current butterfly (R0 for port A, R1 for port B) and the
// two-clock-delayed write address (W1 for port A, W0 for port B). The two
// block-select bits of an address (bits SH and SH-1) say which of the four
// blocks it belongs to. The routing rule follows the original design's
// truth table:
//   write address selects this block -> Adr = local part of W, WE = 1, CE = 1
//   else read address selects block  -> Adr = local part of R, WE = r_load,
//                                       CE = 1
//   else                             -> port idle, WE = 0, CE = 0
// r_load is this design's addition for the last FFT stage: the port then
// writes a new input sample at the address it reads in the same clock
// (read-first), so sel_w tells the input-data multiplexer whether the word to
// write is a PE result (1) or a new input sample (0).
// The address schedule guarantees that the write and the read of a port never
// select the same block in the same clock; an assertion checks that rule.
// Purely combinational.
module port_router #(
  parameter int N = 2048,
  parameter int P = 0
) (
  input  logic                 clk,
  input  logic [$clog2(N)-1:0] r_addr,
  input  logic                 r_en,
  input  logic                 r_load,
  input  logic [$clog2(N)-1:0] w_addr,
  input  logic                 w_en,
  output logic [$clog2(N)-3:0] adr,
  output logic                 we,
  output logic                 ce,
  output logic                 sel_w
);
  import fft_pkg::*;

  localparam int S  = $clog2(N);
  localparam int SH = S / 2;

  logic hit_w, hit_r;
  assign hit_w = w_en && (bank_of(word_t'(w_addr), SH) == 2'(P));
  assign hit_r = r_en && (bank_of(word_t'(r_addr), SH) == 2'(P));

  always_comb begin
    sel_w = 1'b0;
    we    = 1'b0;
    ce    = 1'b0;
    adr   = '0;
    if (hit_w) begin
      sel_w = 1'b1;
      we    = 1'b1;
      ce    = 1'b1;
      adr   = local_of(word_t'(w_addr), SH)[S-3:0];
    end else if (hit_r) begin
      we    = r_load;
      ce    = 1'b1;
      adr   = local_of(word_t'(r_addr), SH)[S-3:0];
    end
  end

  // a port can serve only one access per clock
  a_no_port_conflict: assert property (@(posedge clk) !(hit_w && hit_r))
    else $error("port_router %0d: read and write select the same block", P);

endmodule
