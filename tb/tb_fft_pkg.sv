// tb_fft_pkg: checks the address-bit helpers of fft_pkg on random 32-bit
// words against bit-by-bit loops written here: swap_bits exchanges two bit
// positions, insert_bit opens a gap and fills it, bank_of returns bits
// {SH, SH-1}, local_of returns the remaining bits in order. Also checks that
// a complex sample packs to 2 x 18 bits.
module tb_fft_pkg;
  import fft_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    word_t x, exp_w;
    int    i, j, k, sh, n;
    check($bits(cplx_t) == 36, "cplx_t width");
    for (int t = 0; t < 5000; t++) begin
      x = $urandom;
      i = $urandom_range(30); j = $urandom_range(30);
      // swap
      exp_w = x;
      if (x[i] != x[j]) begin exp_w[i] = ~x[i]; exp_w[j] = ~x[j]; end
      check(swap_bits(x, i, j) == exp_w, $sformatf("swap_bits %h %0d %0d", x, i, j));
      // insert
      x[31] = 1'b0;
      k = 0;
      for (int p = 0; p < 32; p++) begin
        if (p == i) exp_w[p] = 1'(t);      // the inserted value
        else begin exp_w[p] = x[k]; end
        if (p != i) k++;
      end
      check(insert_bit(x, i, 1'(t)) == exp_w, $sformatf("insert_bit %h %0d", x, i));
      // bank / local, S = 11 (SH = 5)
      sh = 5; n = 0;
      x = x & 32'h7ff;
      exp_w = '0;
      for (int p = 0; p < 11; p++)
        if (p != sh && p != sh - 1) begin exp_w[n] = x[p]; n++; end
      check(bank_of(x, sh) == {x[5], x[4]}, "bank_of");
      check(local_of(x, sh) == exp_w, $sformatf("local_of %h", x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
