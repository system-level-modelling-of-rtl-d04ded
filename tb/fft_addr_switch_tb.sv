// fft_addr_switch_tb: checks the address switch: read addresses (A, B) to (DMC0, DMC1) for
// cb = 0 and crossed for cb = 1, at once; write addresses equal to the read addresses of two
// clocks earlier.
`timescale 1ns/1ps
module fft_addr_switch_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       cb;
  logic [8:0] addr_a, addr_b, r0, r1, w0, w1;
  logic [8:0] h0 [3], h1 [3];
  int checks = 0, failures = 0;

  fft_addr_switch #(.AW(9)) u_dut (
    .clk, .rst_n, .cb, .addr_a, .addr_b, .rd_addr0(r0), .rd_addr1(r1), .wr_addr0(w0), .wr_addr1(w1)
  );

  initial begin
    cb = 1'b0; addr_a = '0; addr_b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      cb = 1'($urandom);
      addr_a = 9'($urandom);
      addr_b = 9'($urandom);
      #1;
      checks++;
      if (r0 !== (cb ? addr_b : addr_a) || r1 !== (cb ? addr_a : addr_b)) begin
        failures++;
        if (failures < 10) $display("FAIL read addresses %0d", i);
      end
      if (i >= 2) begin
        checks++;
        if (w0 !== h0[1] || w1 !== h1[1]) begin
          failures++;
          if (failures < 10) $display("FAIL write addresses %0d: %0d %0d expected %0d %0d", i, w0, w1, h0[1], h1[1]);
        end
      end
      h0[1] = h0[0]; h1[1] = h1[0];
      h0[0] = cb ? addr_b : addr_a;
      h1[0] = cb ? addr_a : addr_b;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
