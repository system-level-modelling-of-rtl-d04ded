// fft_control_tb: checks the control block on its own for a 16-point and a 64-point
// transform. A source and a sink with random delays follow the two handshakes; a stand-in
// memory answers each read one clock later with a word derived from the sample number.
// Checked: the input handshake (data_req drops once data_valid is seen, the sample is
// captured), write enables two clocks after each issue and only for the cluster given by the
// address parity while loading, both clusters for a butterfly; the butterfly counter runs
// 0 .. N/2-1 in every pass, the pass counter 0 .. n-1, cb is the parity of the counter;
// 2 stall clocks per pass and n*(N/2+2) clocks from first issue to the last stall; results
// handed out in order with the read data; done pulses once and busy falls.
`timescale 1ns/1ps
module fft_control_tb;
  import fft_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, busy, done, data_req, data_valid, data_ready, data_ack;
  logic [3:0]  cfg_log2n, log2n, p;
  sample_t     in_re, in_im, out_re, out_im;
  logic [9:0]  cnt;
  logic        agb_io, agb_rev, cb, dmc_re, cmc_re, dmc0_we, dmc1_we, ds_ld_sel, stall;
  cplx_t       ld_sample, rd_sample;
  int checks = 0, failures = 0;

  fft_control u_dut (
    .clk, .rst_n, .start, .cfg_log2n, .log2n, .busy, .done,
    .data_req, .data_valid, .in_re, .in_im, .out_re, .out_im, .data_ready, .data_ack,
    .cnt, .p, .agb_io, .agb_rev, .cb, .dmc_re, .cmc_re, .dmc0_we, .dmc1_we,
    .ds_ld_sel, .ld_sample, .rd_sample, .stall
  );

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  // stand-in memory: the word read for sample i is (i, -i)
  always_ff @(posedge clk) if (dmc_re) rd_sample <= '{re: sample_t'(cnt), im: -sample_t'(cnt)};

  // write-enable prediction: two clocks after each issue
  logic [1:0] p_we0, p_we1;
  always @(posedge clk) if (rst_n) begin
    chk(dmc0_we == p_we0[1] && dmc1_we == p_we1[1], "write enable timing");
    p_we0 <= {p_we0[0], cmc_re || (data_req && data_valid && !cb)};
    p_we1 <= {p_we1[0], cmc_re || (data_req && data_valid &&  cb)};
  end

  // counter sequence during the passes
  int exp_b, exp_p, n_stall, t_first, t_last, t;
  always @(posedge clk) if (rst_n && busy) begin
    t++;
    if (cmc_re) begin
      if (t_first < 0) t_first = t;
      chk(int'(cnt) == exp_b && int'(p) == exp_p && cb == ^cnt && !agb_io, "butterfly sequence");
      if (exp_b == (1 << (log2n - 1)) - 1) begin exp_b = 0; exp_p++; end
      else exp_b++;
    end
    if (stall) begin
      n_stall++;
      t_last = t;
    end
  end

  // source
  int src_idx;
  initial begin
    data_valid = 1'b0; in_re = '0; in_im = '0;
    forever begin
      @(posedge clk);
      if (data_req && !data_valid) begin
        repeat ($urandom_range(2, 0)) @(posedge clk);
        in_re <= sample_t'(100 + src_idx);
        in_im <= sample_t'(200 + src_idx);
        data_valid <= 1'b1;
        @(posedge clk);
        #1;
        chk(!data_req, "data_req dropped after data_valid");
        chk(ld_sample.re == sample_t'(100 + src_idx) && ld_sample.im == sample_t'(200 + src_idx),
            "sample captured");
        src_idx++;
        data_valid <= 1'b0;
      end
    end
  end

  // sink
  int sink_idx;
  initial begin
    data_ack = 1'b0;
    forever begin
      @(posedge clk);
      if (data_ready && !data_ack) begin
        repeat ($urandom_range(2, 0)) @(posedge clk);
        chk(out_re == sample_t'(sink_idx) && out_im == -sample_t'(sink_idx), "result order");
        sink_idx++;
        data_ack <= 1'b1;
        @(posedge clk);
        while (data_ready) @(posedge clk);
        data_ack <= 1'b0;
      end
    end
  end

  int n_done;
  always @(posedge clk) if (done) n_done++;

  task automatic run(int n);
    int nn = 1 << n;
    exp_b = 0; exp_p = 0; n_stall = 0; t_first = -1; t_last = -1; t = 0;
    src_idx = 0; sink_idx = 0; n_done = 0;
    @(negedge clk);
    cfg_log2n = 4'(n); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    chk(src_idx == nn && sink_idx == nn, "sample counts");
    chk(exp_p == n && exp_b == 0, "all passes run");
    chk(n_stall == 2 * n, "two stall clocks per pass");
    chk(t_last - t_first + 1 == n * (nn / 2 + 2), "pass clock count");
    chk(n_done == 1, "one done pulse");
    $display("n=%0d: pass clocks %0d", n, t_last - t_first + 1);
  endtask

  initial begin
    start = 1'b0; cfg_log2n = 4'd4; p_we0 = '0; p_we1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(4);
    run(6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
