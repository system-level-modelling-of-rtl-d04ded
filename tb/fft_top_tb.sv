// fft_top_tb: end-to-end test of the FFT processor at its default parameters.
//
// For every size from 16 to 1024 points the bench loads the coefficient table
// (W^k = exp(-2*pi*i*k/N) rounded to Q5.10), feeds random samples through the input
// handshake with random source delays, runs the transform and takes the results through
// the output handshake with random sink delays. Each result is compared with a bit-exact
// fixed-point reference (a textbook iterative decimation-in-time FFT with the same
// truncation and saturation) and with a floating-point DFT within a loose error bound.
// A final 16-point transform of a large constant drives the butterflies into saturation.
// The pass schedule is checked too: n*N/2 butterfly issues and 2 stall clocks per pass,
// n*(N/2+2) clocks in all, within the published budget of (n+1)*N/2 clocks per transform. Every mechanism of the design (size change, stall, operand
// cluster swap, switched-off memory modules, waiting on either handshake, saturation) is
// counted, and one that never happens counts as a failure.
`timescale 1ns/1ps
module fft_top_tb;
  import fft_pkg::*;

  localparam int LMAX = MAX_LOG2N;
  localparam int NMAX = 1 << LMAX;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            start = 1'b0;
  logic [3:0]      cfg_log2n = 4'd4;
  logic            busy, done, data_req, data_valid, data_ready, data_ack;
  sample_t         in_re, in_im, out_re, out_im, coef_re, coef_im;
  logic            coef_we;
  logic [LMAX-2:0] coef_addr;
  logic [63:0]     dmm_on0, dmm_on1, cmm_on;
  logic            ovf;

  fft_top u_dut (
    .clk, .rst_n, .start, .cfg_log2n, .busy, .done,
    .data_req, .data_valid, .in_re, .in_im,
    .out_re, .out_im, .data_ready, .data_ack,
    .coef_we, .coef_addr, .coef_re, .coef_im,
    .dmm_on0, .dmm_on1, .cmm_on, .ovf
  );

  int checks = 0, failures = 0;

  // mechanism counters
  int n_sizes = 0, n_stall = 0, n_swap = 0, n_mod_off = 0, n_src_wait = 0, n_sink_wait = 0;
  int n_sat = 0, n_issue = 0;

  always @(posedge clk) if (rst_n) begin
    if (u_dut.stall) n_stall++;
    if (u_dut.cmc_re) begin
      n_issue++;
      if (u_dut.cb) n_swap++;
    end
    if (busy && (dmm_on0 != '1)) n_mod_off++;
    if (data_req && !data_valid) n_src_wait++;
    if (data_ready && !data_ack) n_sink_wait++;
  end

  // sample and reference storage
  int xin_re [NMAX], xin_im [NMAX];
  int ref_re [NMAX], ref_im [NMAX];
  int got_re [NMAX], got_im [NMAX];
  int tw_re [NMAX/2], tw_im [NMAX/2];

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int bitrev(int v, int n);
    int r = 0;
    for (int i = 0; i < n; i++) if (v[i]) r |= 1 << (n - 1 - i);
    return r;
  endfunction

  task automatic make_twiddles(int n);
    int nn = 1 << n;
    for (int k = 0; k < nn / 2; k++) begin
      real ang = 2.0 * 3.14159265358979323846 * k / nn;
      tw_re[k] = int'($floor($cos(ang) * 1024.0 + 0.5));
      tw_im[k] = int'($floor(-$sin(ang) * 1024.0 + 0.5));
    end
  endtask

  // bit-exact reference: iterative radix-2 DIT on bit-reversed input
  task automatic reference_fft(int n);
    int nn = 1 << n;
    int ar [NMAX], ai [NMAX];
    for (int i = 0; i < nn; i++) begin
      ar[bitrev(i, n)] = xin_re[i];
      ai[bitrev(i, n)] = xin_im[i];
    end
    for (int s = 0; s < n; s++) begin
      int half = 1 << s;
      for (int g = 0; g < nn; g += 2 * half) begin
        for (int m = 0; m < half; m++) begin
          int kk = m * (nn / (2 * half));
          longint pr, pi;
          int ua, ub, i0, i1;
          i0 = g + m;
          i1 = g + m + half;
          pr = longint'(ar[i1]) * tw_re[kk] - longint'(ai[i1]) * tw_im[kk];
          pi = longint'(ar[i1]) * tw_im[kk] + longint'(ai[i1]) * tw_re[kk];
          pr = pr >>> 10;
          pi = pi >>> 10;
          ua = ar[i0];
          ub = ai[i0];
          ar[i0] = sat16(ua + pr);
          ai[i0] = sat16(ub + pi);
          ar[i1] = sat16(ua - pr);
          ai[i1] = sat16(ub - pi);
        end
      end
    end
    for (int i = 0; i < nn; i++) begin
      ref_re[i] = ar[i];
      ref_im[i] = ai[i];
    end
  endtask

  task automatic load_coefs(int n);
    for (int k = 0; k < (1 << (n - 1)); k++) begin
      @(negedge clk);
      coef_we   = 1'b1;
      coef_addr = (LMAX-1)'(k);
      coef_re   = sample_t'(tw_re[k]);
      coef_im   = sample_t'(tw_im[k]);
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  // source: answers data_req after a random delay, keeps data_valid until data_req drops
  int src_idx;
  int src_delay_max = 3;
  initial begin
    data_valid = 1'b0;
    in_re = '0;
    in_im = '0;
    forever begin
      @(posedge clk);
      if (data_req && !data_valid) begin
        repeat ($urandom_range(src_delay_max, 0)) @(posedge clk);
        in_re <= sample_t'(xin_re[src_idx]);
        in_im <= sample_t'(xin_im[src_idx]);
        data_valid <= 1'b1;
        src_idx++;
        @(posedge clk);
        while (data_req) @(posedge clk);
        data_valid <= 1'b0;
      end
    end
  end

  // sink: acknowledges data_ready after a random delay
  int sink_idx;
  initial begin
    data_ack = 1'b0;
    forever begin
      @(posedge clk);
      if (data_ready && !data_ack) begin
        repeat ($urandom_range(2, 0)) @(posedge clk);
        got_re[sink_idx] = int'(out_re);
        got_im[sink_idx] = int'(out_im);
        sink_idx++;
        data_ack <= 1'b1;
        @(posedge clk);
        while (data_ready) @(posedge clk);
        data_ack <= 1'b0;
      end
    end
  end

  task automatic run_fft(int n, bit big);
    int nn = 1 << n;
    int amp = 4096 >> (n / 2);
    int issue0, stall0, t0, t_first, t_last;
    real maxmag = 0.0, maxerr = 0.0;
    make_twiddles(n);
    for (int i = 0; i < nn; i++) begin
      if (big) begin
        xin_re[i] = 8192;
        xin_im[i] = -8192;
      end else begin
        xin_re[i] = $urandom_range(2 * amp, 0) - amp;
        xin_im[i] = $urandom_range(2 * amp, 0) - amp;
      end
    end
    reference_fft(n);
    // the size is set first: the coefficient modules it needs are then switched on
    @(negedge clk);
    cfg_log2n = 4'(n);
    load_coefs(n);
    src_idx = 0;
    sink_idx = 0;
    issue0 = n_issue;
    stall0 = n_stall;
    @(negedge clk);
    cfg_log2n = 4'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // pass schedule: cycles from the first butterfly issue to the last drain cycle
    t_first = -1;
    t_last = -1;
    t0 = 0;
    while (!done) begin
      @(posedge clk);
      t0++;
      if (busy && t0 == 4) begin
        // N/2 words per data bank and N/2 coefficients: N/16 modules of 8 words on
        checks++;
        if ($countones(dmm_on0) != nn / 16 || $countones(dmm_on1) != nn / 16 ||
            $countones(cmm_on) != nn / 16) begin
          failures++;
          $display("FAIL n=%0d: %0d/%0d/%0d modules on, expected %0d", n,
                   $countones(dmm_on0), $countones(dmm_on1), $countones(cmm_on), nn / 16);
        end
      end
      if (u_dut.cmc_re && t_first < 0) t_first = t0;
      if (u_dut.stall) t_last = t0;
    end
    @(posedge clk);
    checks++;
    if (sink_idx != nn || src_idx != nn) begin
      failures++;
      $display("FAIL n=%0d: %0d samples in, %0d results out", n, src_idx, sink_idx);
    end
    checks++;
    if (n_issue - issue0 != n * nn / 2 || n_stall - stall0 != 2 * n ||
        t_last - t_first + 1 != n * (nn / 2 + 2)) begin
      failures++;
      $display("FAIL n=%0d: %0d issues, %0d stalls, %0d pass clocks (expected %0d, %0d, %0d)",
               n, n_issue - issue0, n_stall - stall0, t_last - t_first + 1,
               n * nn / 2, 2 * n, n * (nn / 2 + 2));
    end
    // clock budget: a transform of N points at 20 MHz, taken from the published energy and
    // power per size, comes to (n+1)*N/2 clocks for 16 .. 1024 points
    checks++;
    if (t_last - t_first + 1 > (n + 1) * nn / 2) begin
      failures++;
      $display("FAIL n=%0d: passes take %0d clocks, budget %0d", n, t_last - t_first + 1, (n + 1) * nn / 2);
    end
    for (int i = 0; i < nn; i++) begin
      checks++;
      if (got_re[i] != ref_re[i] || got_im[i] != ref_im[i]) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d bin %0d: got (%0d,%0d) expected (%0d,%0d)",
                   n, i, got_re[i], got_im[i], ref_re[i], ref_im[i]);
      end
    end
    if (!big) begin
      // floating-point DFT. Truncating w*b costs at most 1 LSB per part per butterfly and a
      // later pass at most doubles an error, so |re err| + |im err| < 2*N LSB; 1% of the
      // largest bin covers the rounding of the coefficients.
      for (int kk = 0; kk < nn; kk++) begin
        real sr = 0.0, si = 0.0, er, ei, e;
        for (int i = 0; i < nn; i++) begin
          real ang = -2.0 * 3.14159265358979323846 * ((i * kk) % nn) / nn;
          sr += xin_re[i] * $cos(ang) - xin_im[i] * $sin(ang);
          si += xin_re[i] * $sin(ang) + xin_im[i] * $cos(ang);
        end
        er = sr - got_re[kk];
        ei = si - got_im[kk];
        e = (er < 0 ? -er : er) + (ei < 0 ? -ei : ei);
        if (e > maxerr) maxerr = e;
        if ((sr < 0 ? -sr : sr) > maxmag) maxmag = (sr < 0 ? -sr : sr);
      end
      checks++;
      if (maxerr > 2.0 * nn + 0.01 * maxmag) begin
        failures++;
        $display("FAIL n=%0d: error against DFT %f LSB", n, maxerr);
      end
    end else begin
      checks++;
      if (!ovf) begin
        failures++;
        $display("FAIL: saturation not flagged");
      end else n_sat++;
    end
    $display("size %0d done: %0d clocks, pass clocks %0d, max DFT error %0.1f LSB",
             nn, t0, t_last - t_first + 1, maxerr);
    n_sizes++;
  endtask

  initial begin
    coef_we = 1'b0;
    coef_addr = '0;
    coef_re = '0;
    coef_im = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 4; n <= LMAX; n++) run_fft(n, 1'b0);
    run_fft(4, 1'b1);
    run_fft(LMAX, 1'b0);
    // every mechanism must have happened
    checks++; if (n_sizes < 2)     begin failures++; $display("FAIL: no size change"); end
    checks++; if (n_stall == 0)    begin failures++; $display("FAIL: no pass stall"); end
    checks++; if (n_swap == 0)     begin failures++; $display("FAIL: no cluster swap"); end
    checks++; if (n_mod_off == 0)  begin failures++; $display("FAIL: no module off"); end
    checks++; if (n_src_wait == 0) begin failures++; $display("FAIL: no source wait"); end
    checks++; if (n_sink_wait == 0) begin failures++; $display("FAIL: no sink wait"); end
    checks++; if (n_sat == 0)      begin failures++; $display("FAIL: no saturation"); end
    $display("mechanisms: sizes=%0d stall=%0d swap=%0d module_off=%0d src_wait=%0d sink_wait=%0d sat=%0d",
             n_sizes, n_stall, n_swap, n_mod_off, n_src_wait, n_sink_wait, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
