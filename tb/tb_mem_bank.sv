// tb_mem_bank: memory block P = 1 of a 32-point FFT (block select = address
// bits 2 and 1) under random traffic, against a model of the block's routing:
// port A serves W1 (writing Doy) when W1 is in this block, else R0 (writing
// di0 when r_load); port B serves W0 (Dox) or R1 (di1) the same way. Reads
// return the old word one clock later. Stimuli respect the schedule's rule
// that a port's read and write never select the same block at once.
module tb_mem_bank;
  import fft_pkg::*;
  localparam int N = 32, P = 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0] r_addr0, r_addr1, w_addr0, w_addr1;
  logic       r_en, r_load, w_en;
  cplx_t      dox, doy, di0, di1, dout_a, dout_b;

  mem_bank #(.N(N), .P(P)) dut (.*);

  int checks = 0, failures = 0, hits_w = 0, hits_load = 0, hits_r = 0;
  cplx_t model [8];
  cplx_t exp_a, exp_b;

  function automatic logic inb(logic [4:0] a);
    return a[2:1] == 2'(P);
  endfunction
  function automatic logic [2:0] loc(logic [4:0] a);
    return {a[4:3], a[0]};
  endfunction

  initial begin
    logic a_w, a_r, b_w, b_r;
    logic [2:0] la, lb;
    r_en = 0; w_en = 0; r_load = 0;
    r_addr0 = 0; r_addr1 = 0; w_addr0 = 0; w_addr1 = 0;
    dox = '0; doy = '0; di0 = '0; di1 = '0;
    // fill the block through the load path (both ports)
    for (int i = 0; i < 8; i += 2) begin
      @(negedge clk);
      r_en = 1; r_load = 1; w_en = 0;
      r_addr0 = {2'(i >> 1), 2'(P), 1'b0};
      r_addr1 = {2'(i >> 1), 2'(P), 1'b1};
      di0 = {DW'($urandom), DW'($urandom)}; di1 = {DW'($urandom), DW'($urandom)};
      model[loc(r_addr0)] = di0; model[loc(r_addr1)] = di1;
    end
    @(negedge clk);
    r_load = 0; r_en = 0;
    exp_a = dout_a; exp_b = dout_b;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      r_addr0 = 5'($urandom); r_addr1 = 5'($urandom);
      w_addr0 = 5'($urandom); w_addr1 = 5'($urandom);
      r_en = 1'($urandom); w_en = 1'($urandom); r_load = 1'($urandom);
      if (w_addr1[2:1] == r_addr0[2:1]) w_addr1[2:1] = ~r_addr0[2:1];
      if (w_addr0[2:1] == r_addr1[2:1]) w_addr0[2:1] = ~r_addr1[2:1];
      dox = {DW'($urandom), DW'($urandom)}; doy = {DW'($urandom), DW'($urandom)};
      di0 = {DW'($urandom), DW'($urandom)}; di1 = {DW'($urandom), DW'($urandom)};
      a_w = w_en && inb(w_addr1);
      a_r = !a_w && r_en && inb(r_addr0);
      b_w = w_en && inb(w_addr0);
      b_r = !b_w && r_en && inb(r_addr1);
      la = a_w ? loc(w_addr1) : loc(r_addr0);
      lb = b_w ? loc(w_addr0) : loc(r_addr1);
      // keep the two ports off one word when either of them writes
      if ((a_w || a_r) && (b_w || b_r) && la == lb && (a_w || b_w || r_load)) begin
        w_en = 0; r_en = 0; a_w = 0; a_r = 0; b_w = 0; b_r = 0;
      end
      if (a_w || a_r) exp_a = model[la];
      if (b_w || b_r) exp_b = model[lb];
      if (a_w) begin model[la] = doy; hits_w++; end
      else if (a_r && r_load) begin model[la] = di0; hits_load++; end
      else if (a_r) hits_r++;
      if (b_w) model[lb] = dox;
      else if (b_r && r_load) model[lb] = di1;
      @(posedge clk); #1;
      checks++; if (dout_a !== exp_a) begin failures++; if (failures < 10) $display("FAIL port A @%0d", i); end
      checks++; if (dout_b !== exp_b) begin failures++; if (failures < 10) $display("FAIL port B @%0d", i); end
    end
    checks++;
    if (hits_w == 0 || hits_load == 0 || hits_r == 0) failures++;
    $display("writes %0d, loads %0d, reads %0d", hits_w, hits_load, hits_r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
