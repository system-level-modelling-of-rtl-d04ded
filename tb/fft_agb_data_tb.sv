// fft_agb_data_tb: checks the data addresses for every size from 16 to 1024 points. For
// each pass p the bench checks that the two operands of every butterfly are exactly 2**p
// apart (fa has bit p clear, fb = fa + 2**p), that the butterflies of a pass visit every
// such pair once, that the two operands lie in different clusters (address parities differ)
// and that the in-cluster addresses are fa >> 1 and fb >> 1. In transfer mode it checks
// natural and bit-reversed sample addresses, with the bit reversal worked out bit by bit.
`timescale 1ns/1ps
module fft_agb_data_tb;
  logic [3:0] log2n, p;
  logic [9:0] cnt, fa, fb;
  logic       io, rev;
  logic [8:0] addr_a, addr_b;
  int checks = 0, failures = 0;
  bit seen [1024];

  fft_agb_data #(.LOG2N_MAX(10)) u_dut (.log2n, .p, .cnt, .io, .rev, .fa, .fb, .addr_a, .addr_b);

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s n=%0d p=%0d cnt=%0d fa=%0d fb=%0d", msg, log2n, p, cnt, fa, fb);
  endtask

  initial begin
    io = 1'b0; rev = 1'b0;
    for (int n = 4; n <= 10; n++) begin
      log2n = 4'(n);
      for (int pp = 0; pp < n; pp++) begin
        p = 4'(pp);
        foreach (seen[i]) seen[i] = 1'b0;
        for (int bb = 0; bb < (1 << (n - 1)); bb++) begin
          cnt = 10'(bb);
          #1;
          checks++;
          if (fa[pp] != 1'b0 || int'(fb) != int'(fa) + (1 << pp) || int'(fb) >= (1 << n)) fail("pair");
          checks++;
          if (seen[fa]) fail("repeat");
          seen[fa] = 1'b1;
          checks++;
          if ((^fa) == (^fb) || (^fa) != (^cnt)) fail("cluster");
          checks++;
          if (addr_a != fa[9:1] || addr_b != fb[9:1]) fail("split");
        end
      end
      // transfer mode
      io = 1'b1;
      for (int i = 0; i < (1 << n); i++) begin
        int r;
        r = 0;
        for (int j = 0; j < n; j++) if ((i >> j) & 1) r += 1 << (n - 1 - j);
        cnt = 10'(i);
        rev = 1'b1;
        #1;
        checks++;
        if (int'(fa) != r || fa != fb) fail("bit-reversed");
        rev = 1'b0;
        #1;
        checks++;
        if (int'(fa) != i || addr_a != fa[9:1]) fail("natural");
      end
      io = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
