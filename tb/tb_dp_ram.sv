// tb_dp_ram: random two-port traffic on a 32 x 36 dual-port memory against a
// model. Checks the one-clock read latency, read-first behaviour (a port that
// reads and writes one address returns the old word), that a disabled port
// neither reads nor writes, and that each port sees the other's writes.
module tb_dp_ram;
  localparam int DEPTH = 32, WIDTH = 36;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                     ce_a, we_a, ce_b, we_b;
  logic [$clog2(DEPTH)-1:0] addr_a, addr_b;
  logic [WIDTH-1:0]         din_a, din_b, dout_a, dout_b;

  dp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] exp_a, exp_b;

  initial begin
    ce_a = 0; we_a = 0; ce_b = 0; we_b = 0; addr_a = 0; addr_b = 0; din_a = 0; din_b = 0;
    // fill through both ports
    for (int i = 0; i < DEPTH; i += 2) begin
      @(negedge clk);
      ce_a = 1; we_a = 1; addr_a = 5'(i);     din_a = {$urandom, 4'($urandom)};
      ce_b = 1; we_b = 1; addr_b = 5'(i + 1); din_b = {$urandom, 4'($urandom)};
      model[i] = din_a; model[i+1] = din_b;
    end
    exp_a = dout_a; exp_b = dout_b;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ce_a = 1'($urandom); we_a = 1'($urandom); addr_a = 5'($urandom); din_a = {$urandom, 4'($urandom)};
      ce_b = 1'($urandom); we_b = 1'($urandom); addr_b = 5'($urandom); din_b = {$urandom, 4'($urandom)};
      if (addr_b == addr_a) we_b = 0;
      if (ce_a) exp_a = model[addr_a];
      if (ce_b) exp_b = model[addr_b];
      if (ce_a && we_a) model[addr_a] = din_a;
      if (ce_b && we_b) model[addr_b] = din_b;
      @(posedge clk); #1;
      checks++; if (dout_a !== exp_a) begin failures++; $display("FAIL port A"); end
      checks++; if (dout_b !== exp_b) begin failures++; $display("FAIL port B"); end
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
