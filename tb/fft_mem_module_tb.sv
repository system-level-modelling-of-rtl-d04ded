// fft_mem_module_tb: checks one 8 x 32 memory module: write every word, read it back one
// clock after the read enable, hold the read data while re is low, read-old-data on a
// same-word read and write, and the power switch (writes ignored and read data cleared
// while off). Expected values come from a shadow array kept by the bench.
`timescale 1ns/1ps
module fft_mem_module_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        pwr_on, we, re;
  logic [2:0]  waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] shadow [8];
  int checks = 0, failures = 0;

  fft_mem_module #(.WORDS(8), .WIDTH(32)) u_dut (
    .clk, .pwr_on, .we, .waddr, .wdata, .re, .raddr, .rdata
  );

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    pwr_on = 1'b1; we = 1'b0; re = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 3'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 8; i++) begin
      re = 1'b1; raddr = 3'(7 - i);
      @(negedge clk);
      expect_eq(rdata, shadow[7 - i], "read");
    end
    // hold while re low
    re = 1'b0; raddr = 3'd0;
    @(negedge clk);
    expect_eq(rdata, shadow[0], "hold");
    // read and write the same word: old data returned, new data stored
    re = 1'b1; raddr = 3'd3; we = 1'b1; waddr = 3'd3; wdata = 32'hCAFE_F00D;
    @(negedge clk);
    expect_eq(rdata, shadow[3], "read-old");
    shadow[3] = 32'hCAFE_F00D;
    we = 1'b0;
    @(negedge clk);
    expect_eq(rdata, shadow[3], "new data");
    // power off: read data cleared, writes ignored
    pwr_on = 1'b0; we = 1'b1; waddr = 3'd5; wdata = 32'h1234_5678; raddr = 3'd5;
    @(negedge clk);
    expect_eq(rdata, 32'h0, "off read");
    we = 1'b0; pwr_on = 1'b1;
    @(negedge clk);
    expect_eq(rdata, shadow[5], "write while off ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
