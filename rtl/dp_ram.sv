// dp_ram: true dual-port block memory, as found in FPGA block RAM.
//
// DEPTH words of WIDTH bits, two independent ports A and B. Each port, when
// its enable ce is high, reads the addressed word into its output register
// (one clock read latency) and, if we is also high, writes din at the same
// address. A read and a write on the same port and address in one clock
// return the old word (read-first); the FFT's last stage relies on this to
// load a new sample where it reads the last intermediate value. When ce is
// low the output register holds its value. The two ports never write the same
// word in the same clock in this design; which one would win is not defined.
module dp_ram #(
  parameter int DEPTH = 512,
  parameter int WIDTH = 36
) (
  input  logic                     clk,
  input  logic                     ce_a,
  input  logic                     we_a,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  input  logic [WIDTH-1:0]         din_a,
  output logic [WIDTH-1:0]         dout_a,
  input  logic                     ce_b,
  input  logic                     we_b,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  input  logic [WIDTH-1:0]         din_b,
  output logic [WIDTH-1:0]         dout_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce_a) begin
      dout_a <= mem[addr_a];
      if (we_a) mem[addr_a] <= din_a;
    end
  end

  always_ff @(posedge clk) begin
    if (ce_b) begin
      dout_b <= mem[addr_b];
      if (we_b) mem[addr_b] <= din_b;
    end
  end

endmodule
