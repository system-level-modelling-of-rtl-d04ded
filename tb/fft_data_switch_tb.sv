// fft_data_switch_tb: checks the data switch. Read side: one clock after cb is given (while
// cb already carries the next, random value), the
// butterfly operands must be (DMC0, DMC1) for cb = 0 and (DMC1, DMC0) for cb = 1. Write
// side: one further clock later the cluster write data must be (x1, x2) for cb = 0 and
// (x2, x1) for cb = 1, or the loaded sample on both while ld_sel was high.
`timescale 1ns/1ps
module fft_data_switch_tb;
  import fft_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  cb, ld_sel;
  cplx_t d0, d1, op_a, op_b, x1, x2, ld_sample, w0, w1;
  cplx_t e_w0, e_w1;
  logic  cb_prev;
  int checks = 0, failures = 0;

  fft_data_switch u_dut (
    .clk, .rst_n, .cb, .dmc0_rdata(d0), .dmc1_rdata(d1), .op_a, .op_b,
    .x1, .x2, .ld_sel, .ld_sample, .dmc0_wdata(w0), .dmc1_wdata(w1)
  );

  initial begin
    cb = 1'b0; ld_sel = 1'b0; d0 = '0; d1 = '0; x1 = '0; x2 = '0; ld_sample = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cb_prev = 1'b0;
    cb = 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (w0 !== e_w0 || w1 !== e_w1) begin
          failures++;
          if (failures < 10) $display("FAIL write side %0d", i);
        end
      end
      // cb_prev belongs to the read issued last cycle, whose data arrive now;
      // cb is already that of the next read
      cb_prev = cb;
      cb = 1'($urandom);
      d0 = cplx_t'($urandom); d1 = cplx_t'($urandom);
      x1 = cplx_t'($urandom); x2 = cplx_t'($urandom);
      ld_sel = ($urandom_range(3, 0) == 0);
      ld_sample = cplx_t'($urandom);
      #1;
      checks++;
      if (op_a !== (cb_prev ? d1 : d0) || op_b !== (cb_prev ? d0 : d1)) begin
        failures++;
        if (failures < 10) $display("FAIL read side %0d", i);
      end
      e_w0 = ld_sel ? ld_sample : (cb_prev ? x2 : x1);
      e_w1 = ld_sel ? ld_sample : (cb_prev ? x1 : x2);
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
