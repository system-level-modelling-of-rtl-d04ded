// fft_cmc_tb: checks a coefficient memory cluster of 64 modules x 8 words. At the largest size it
// writes all 512 coefficients through the load port and reads them back in random order (read data one clock after re).
// For every size from 16 to 1024 points it checks the module power mask: exactly the first
// N/16 modules on. At 16 points it checks that a write into a switched-off module is lost
// and that module 0 still works. Expected values come from a shadow array.
`timescale 1ns/1ps
module fft_cmc_tb;
  import fft_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  log2n;
  logic        we, re;
  logic [8:0]  waddr, raddr;
  cplx_t       wdata, rdata;
  logic [63:0] dmm_on;
  logic [31:0] shadow [512];
  int checks = 0, failures = 0;

  fft_cmc u_dut (.clk, .rst_n, .log2n, .ld_we(we), .ld_addr(waddr), .ld_data(wdata), .re, .addr(raddr), .coef(rdata), .cmm_on(dmm_on));

  initial begin
    log2n = 4'd10; we = 1'b0; re = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 9'(i); wdata = cplx_t'($urandom); shadow[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 600; i++) begin
      int a;
      a = $urandom_range(511, 0);
      re = 1'b1; raddr = 9'(a);
      @(negedge clk);
      // the next address (another module) must not disturb the data of this read
      re = 1'b0; raddr = 9'(a) ^ 9'h1F8;
      #1;
      checks++;
      if (rdata !== shadow[a]) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d: %h expected %h", a, rdata, shadow[a]);
      end
    end
    re = 1'b0;
    for (int n = 4; n <= 10; n++) begin
      logic [63:0] exp_on;
      log2n = 4'(n);
      exp_on = '0;
      for (int m = 0; m < ((1 << n) / 16); m++) exp_on[m] = 1'b1;
      #1;
      checks++;
      if (dmm_on !== exp_on) begin
        failures++;
        $display("FAIL power mask n=%0d: %h expected %h", n, dmm_on, exp_on);
      end
    end
    // 16 points: module 1 (words 8..15) is off
    log2n = 4'd4;
    @(negedge clk);
    we = 1'b1; waddr = 9'd9; wdata = 32'h0BAD_0BAD;
    @(negedge clk);
    we = 1'b1; waddr = 9'd2; wdata = 32'h600D_600D; shadow[2] = wdata;
    @(negedge clk);
    we = 1'b0; log2n = 4'd10; re = 1'b1; raddr = 9'd9;
    @(negedge clk);
    checks++;
    if (rdata !== shadow[9]) begin failures++; $display("FAIL write to off module stored"); end
    raddr = 9'd2;
    @(negedge clk);
    checks++;
    if (rdata !== shadow[2]) begin failures++; $display("FAIL module 0 at 16 points"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
