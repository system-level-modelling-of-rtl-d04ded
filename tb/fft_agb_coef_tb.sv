// fft_agb_coef_tb: checks the coefficient address for every size from 16 to 1024 points,
// every pass and every butterfly. The expected exponent is derived independently from the
// operand addresses of a decimation-in-time pass: operand A = rotl_n(2b, p), its position
// inside its group of 2**(p+1) is m = A mod 2**p, and the coefficient is W_N^(m*N/2**(p+1)).
`timescale 1ns/1ps
module fft_agb_coef_tb;
  logic [3:0] log2n, p;
  logic [8:0] b, k;
  int checks = 0, failures = 0;

  fft_agb_coef #(.LOG2N_MAX(10)) u_dut (.log2n, .p, .b, .k);

  function automatic int rotl(int v, int s, int n);
    for (int i = 0; i < s; i++) v = ((v << 1) | (v >> (n - 1))) & ((1 << n) - 1);
    return v;
  endfunction

  initial begin
    for (int n = 4; n <= 10; n++) begin
      for (int pp = 0; pp < n; pp++) begin
        for (int bb = 0; bb < (1 << (n - 1)); bb++) begin
          int a, m, e;
          log2n = 4'(n); p = 4'(pp); b = 9'(bb);
          a = rotl(2 * bb, pp, n);
          m = a % (1 << pp);
          e = m * ((1 << n) >> (pp + 1));
          #1;
          checks++;
          if (int'(k) != e) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d p=%0d b=%0d: k=%0d expected %0d", n, pp, bb, k, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
