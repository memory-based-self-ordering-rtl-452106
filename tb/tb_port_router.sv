// tb_port_router: exhaustive-by-random check of the per-port address router
// for block P = 2 at N = 128 against the routing table:
//   write address in this block -> write address, WE = 1, CE = 1, sel_w = 1
//   else read address in block  -> read address, WE = r_load, CE = 1
//   else                        -> WE = 0, CE = 0
// The block of an address is {bit 3, bit 2} (bits SH and SH-1, SH = 3) and
// the local address is the other five bits in order. Stimuli never put the
// read and the write into the same block, as the schedule guarantees.
module tb_port_router;
  localparam int N = 128;
  localparam int S = 7;
  localparam int P = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [S-1:0] r_addr, w_addr;
  logic         r_en, r_load, w_en;
  logic [S-3:0] adr;
  logic         we, ce, sel_w;

  port_router #(.N(N), .P(P)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [S-3:0] loc(logic [S-1:0] a);
    return {a[6:4], a[1:0]};
  endfunction

  initial begin
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      r_addr = S'($urandom); w_addr = S'($urandom);
      r_en = 1'($urandom); w_en = 1'($urandom); r_load = 1'($urandom);
      if (r_en && w_en && r_addr[3:2] == w_addr[3:2]) w_addr[3:2] = ~r_addr[3:2];
      #1;
      if (w_en && w_addr[3:2] == 2'(P)) begin
        check(ce && we && sel_w && adr == loc(w_addr), "write path");
      end else if (r_en && r_addr[3:2] == 2'(P)) begin
        check(ce && (we == r_load) && !sel_w && adr == loc(r_addr), "read path");
      end else begin
        check(!ce && !we, "idle port");
      end
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
