// fft_butterfly_tb: checks the butterfly block on directed and random operands. The
// expected outputs are computed here with 64-bit integer arithmetic (products, shift right
// by 10 with truncation towards minus infinity, saturation to 16 bits), plus directed cases:
// W = 1 and W = -i with exact results, and a saturating case that must raise sat.
`timescale 1ns/1ps
module fft_butterfly_tb;
  import fft_pkg::*;

  cplx_t a, b, w, x1, x2;
  logic  sat;
  int checks = 0, failures = 0;

  fft_butterfly u_dut (.a, .b, .w, .x1, .x2, .sat);

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  task automatic check_one();
    longint tr, ti;
    int e1r, e1i, e2r, e2i;
    bit esat;
    tr = (longint'(b.re) * w.re - longint'(b.im) * w.im) >>> 10;
    ti = (longint'(b.re) * w.im + longint'(b.im) * w.re) >>> 10;
    e1r = sat16(a.re + tr);
    e1i = sat16(a.im + ti);
    e2r = sat16(a.re - tr);
    e2i = sat16(a.im - ti);
    esat = (e1r != a.re + tr) || (e1i != a.im + ti) || (e2r != a.re - tr) || (e2i != a.im - ti);
    #1;
    checks++;
    if (x1.re != e1r || x1.im != e1i || x2.re != e2r || x2.im != e2i || sat != esat) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=(%0d,%0d) b=(%0d,%0d) w=(%0d,%0d): x1=(%0d,%0d) x2=(%0d,%0d) sat=%0d",
                 a.re, a.im, b.re, b.im, w.re, w.im, x1.re, x1.im, x2.re, x2.im, sat);
    end
  endtask

  initial begin
    // W = 1: x1 = a + b, x2 = a - b exactly
    a = '{re: 16'sd1000, im: -16'sd300};
    b = '{re: 16'sd250,  im: 16'sd77};
    w = '{re: 16'sd1024, im: 16'sd0};
    #1;
    checks++;
    if (x1.re != 1250 || x1.im != -223 || x2.re != 750 || x2.im != -377 || sat) begin
      failures++;
      $display("FAIL W=1 case");
    end
    // W = -i: w*b = (b.im, -b.re)
    w = '{re: 16'sd0, im: -16'sd1024};
    #1;
    checks++;
    if (x1.re != 1077 || x1.im != -550 || x2.re != 923 || x2.im != -50) begin
      failures++;
      $display("FAIL W=-i case: x1=(%0d,%0d) x2=(%0d,%0d)", x1.re, x1.im, x2.re, x2.im);
    end
    // saturation
    a = '{re: 16'sd30000, im: 16'sd0};
    b = '{re: 16'sd30000, im: 16'sd0};
    w = '{re: 16'sd1024, im: 16'sd0};
    #1;
    checks++;
    if (x1.re != 32767 || !sat) begin
      failures++;
      $display("FAIL saturation case");
    end
    for (int i = 0; i < 5000; i++) begin
      a = cplx_t'($urandom);
      b = cplx_t'($urandom);
      if (i % 2 == 0) begin
        w.re = sample_t'($urandom_range(2048, 0) - 1024);
        w.im = sample_t'($urandom_range(2048, 0) - 1024);
      end else begin
        w = cplx_t'($urandom);
      end
      if (i % 3 == 0) begin
        a.re = a.re >>> 4; a.im = a.im >>> 4; b.re = b.re >>> 4; b.im = b.im >>> 4;
      end
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
