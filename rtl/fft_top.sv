// fft_top: reconfigurable radix-2 FFT processor, an accelerator core for a system-on-chip.
// It computes in-place, decimation-in-time transforms of 16 to 2**LOG2N_MAX (1024) complex
// Q5.10 points, the size chosen per transform.
//
// How it works: the six main blocks are wired as follows. The control block counts
// butterflies and passes. One address generation block turns the counters into the two
// operand addresses, the other into the coefficient address. The address switch sends the
// two 9-bit operand addresses to the data memory cluster that holds each operand (the two
// clusters split the data by address parity, so the operands of a butterfly are always in
// different clusters and both are read in one clock). The coefficient memory cluster
// supplies W. The data switch puts the cluster outputs in operand order for the butterfly
// block and steers the two results back into the clusters they came from. One butterfly is
// issued per clock; results are written two clocks after the read.
//
// Interface:
//   start / cfg_log2n  begin a transform of 2**cfg_log2n points (cfg_log2n = 4 .. 10)
//   busy, done         transform in progress / one-clock pulse at the end
//   data_req, data_valid, in_re, in_im     input handshake: samples in natural order
//   out_re, out_im, data_ready, data_ack   output handshake: results in natural order
//   coef_we, coef_addr, coef_re, coef_im   coefficient table load (while idle): entry k holds
//                                          exp(-2*pi*i*k/N), k = 0 .. N/2-1, in Q5.10
//   dmm_on0, dmm_on1, cmm_on               which memory modules are switched on
//   ovf                                    a butterfly output saturated in this transform
// Timing: a transform of N = 2**n points takes, between the last sample in and the first
// result out, n * (N/2 + 2) clocks of butterfly passes plus a few clocks of load drain; each
// sample in or out takes at least four clocks of handshake.
//
// The block set and their connections, the memory organisation (two 64 x 8 x 32 data
// clusters, a 512-coefficient cluster, 9-bit cluster addresses), the coefficient rule, the
// number format and the handshake signals follow the design. Decimation in time, the parity
// split over the clusters, the coefficient load port, the pipeline and the status outputs
// are this implementation's choices.
module fft_top
  import fft_pkg::*;
#(
  parameter int unsigned LOG2N_MAX = MAX_LOG2N,
  localparam int unsigned AW = LOG2N_MAX - 1,
  localparam int unsigned NMOD = (2 ** AW) / MOD_WORDS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [3:0]      cfg_log2n,
  output logic            busy,
  output logic            done,
  output logic            data_req,
  input  logic            data_valid,
  input  sample_t         in_re,
  input  sample_t         in_im,
  output sample_t         out_re,
  output sample_t         out_im,
  output logic            data_ready,
  input  logic            data_ack,
  input  logic            coef_we,
  input  logic [AW-1:0]   coef_addr,
  input  sample_t         coef_re,
  input  sample_t         coef_im,
  output logic [NMOD-1:0] dmm_on0,
  output logic [NMOD-1:0] dmm_on1,
  output logic [NMOD-1:0] cmm_on,
  output logic            ovf
);

  logic [3:0]           log2n, p;
  logic [LOG2N_MAX-1:0] cnt, fa, fb;
  logic                 agb_io, agb_rev, cb, dmc_re, cmc_re, dmc0_we, dmc1_we, ds_ld_sel, stall;
  logic [AW-1:0]        addr_a, addr_b, k;
  logic [AW-1:0]        rd_addr0, rd_addr1, wr_addr0, wr_addr1;
  cplx_t                ld_sample, dmc0_rdata, dmc1_rdata, dmc0_wdata, dmc1_wdata;
  cplx_t                op_a, op_b, x1, x2, w;
  logic                 sat, sat_q;

  fft_control #(.LOG2N_MAX(LOG2N_MAX)) u_control (
    .clk, .rst_n, .start, .cfg_log2n, .log2n, .busy, .done,
    .data_req, .data_valid, .in_re, .in_im,
    .out_re, .out_im, .data_ready, .data_ack,
    .cnt, .p, .agb_io, .agb_rev,
    .cb, .dmc_re, .cmc_re, .dmc0_we, .dmc1_we, .ds_ld_sel, .ld_sample,
    .rd_sample(op_a),
    .stall
  );

  fft_agb_data #(.LOG2N_MAX(LOG2N_MAX)) u_agb_dmc (
    .log2n, .p, .cnt, .io(agb_io), .rev(agb_rev), .fa, .fb, .addr_a, .addr_b
  );

  fft_agb_coef #(.LOG2N_MAX(LOG2N_MAX)) u_agb_cmc (
    .log2n, .p, .b(cnt[AW-1:0]), .k
  );

  fft_addr_switch #(.AW(AW)) u_as (
    .clk, .rst_n, .cb, .addr_a, .addr_b, .rd_addr0, .rd_addr1, .wr_addr0, .wr_addr1
  );

  fft_dmc #(.NMOD(NMOD), .WORDS(MOD_WORDS)) u_dmc0 (
    .clk, .rst_n, .log2n,
    .we(dmc0_we), .waddr(wr_addr0), .wdata(dmc0_wdata),
    .re(dmc_re), .raddr(rd_addr0), .rdata(dmc0_rdata),
    .dmm_on(dmm_on0)
  );

  fft_dmc #(.NMOD(NMOD), .WORDS(MOD_WORDS)) u_dmc1 (
    .clk, .rst_n, .log2n,
    .we(dmc1_we), .waddr(wr_addr1), .wdata(dmc1_wdata),
    .re(dmc_re), .raddr(rd_addr1), .rdata(dmc1_rdata),
    .dmm_on(dmm_on1)
  );

  // While idle the coefficient port follows the requested size, so the modules the next
  // table needs are switched on for loading.
  fft_cmc #(.NMOD(NMOD), .WORDS(MOD_WORDS)) u_cmc (
    .clk, .rst_n,
    .log2n  (busy ? log2n : cfg_log2n),
    .ld_we  (coef_we && !busy),
    .ld_addr(coef_addr),
    .ld_data('{re: coef_re, im: coef_im}),
    .re     (cmc_re),
    .addr   (k),
    .coef   (w),
    .cmm_on
  );

  fft_data_switch u_ds (
    .clk, .rst_n, .cb,
    .dmc0_rdata, .dmc1_rdata, .op_a, .op_b,
    .x1, .x2, .ld_sel(ds_ld_sel), .ld_sample,
    .dmc0_wdata, .dmc1_wdata
  );

  fft_butterfly u_bb (
    .a(op_a), .b(op_b), .w, .x1, .x2, .sat
  );

  // Sticky saturation flag; a butterfly result is only valid one clock after a read.
  logic bf_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bf_valid <= 1'b0;
      sat_q    <= 1'b0;
    end else begin
      bf_valid <= cmc_re;
      if (start && !busy)      sat_q <= 1'b0;
      else if (bf_valid && sat) sat_q <= 1'b1;
    end
  end
  assign ovf = sat_q;

endmodule
