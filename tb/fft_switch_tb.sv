// fft_switch_tb: checks the switch block in both builds: the combinational one
// (REG = 0) must pass or cross its inputs at once according to cb, the registered one
// (REG = 1) must show the same routing one clock later. Random words and cb values.
`timescale 1ns/1ps
module fft_switch_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cb;
  logic [15:0] xs, xt, c0, c1, r0, r1;
  logic [15:0] e0_q, e1_q;
  int checks = 0, failures = 0;

  fft_switch #(.W(16), .REG(1'b0)) u_comb (.clk, .rst_n, .cb, .xs, .xt, .y0(c0), .y1(c1));
  fft_switch #(.W(16), .REG(1'b1)) u_reg  (.clk, .rst_n, .cb, .xs, .xt, .y0(r0), .y1(r1));

  initial begin
    cb = 1'b0; xs = '0; xt = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (r0 !== e0_q || r1 !== e1_q) begin
          failures++;
          $display("FAIL registered: got %h %h expected %h %h", r0, r1, e0_q, e1_q);
        end
      end
      cb = 1'($urandom);
      xs = 16'($urandom);
      xt = 16'($urandom);
      e0_q = cb ? xt : xs;
      e1_q = cb ? xs : xt;
      #1;
      checks++;
      if (c0 !== e0_q || c1 !== e1_q) begin
        failures++;
        $display("FAIL combinational: cb=%0d got %h %h", cb, c0, c1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
