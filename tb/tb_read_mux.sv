// tb_read_mux: random block outputs and selectors; Dix must equal port A of
// the block selected by sel0 one clock earlier, Diy port B of the block
// selected by sel1 one clock earlier.
module tb_read_mux;
  import fft_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] sel0, sel1, s0_q, s1_q;
  cplx_t      dout_a [4];
  cplx_t      dout_b [4];
  cplx_t      dix, diy;

  read_mux dut (.*);

  int checks = 0, failures = 0;

  initial begin
    sel0 = 0; sel1 = 0;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      s0_q = sel0; s1_q = sel1;
      @(posedge clk);
      #1;
      sel0 = 2'($urandom); sel1 = 2'($urandom);
      for (int p = 0; p < 4; p++) begin
        dout_a[p] = {DW'($urandom), DW'($urandom)};
        dout_b[p] = {DW'($urandom), DW'($urandom)};
      end
      #1;
      checks++; if (dix !== dout_a[s0_q]) begin failures++; $display("FAIL dix"); end
      checks++; if (diy !== dout_b[s1_q]) begin failures++; $display("FAIL diy"); end
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
