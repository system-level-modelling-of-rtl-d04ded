// fft_control: control block of the FFT processor. It sequences one transform: load the
// samples, run the butterfly passes, hand out the results, and drives every other block.
//
// How it works: two counters do the work of the passes, as in the design: the butterfly
// counter b counts the N/2 butterflies of a pass and the pass counter p the n = log2n
// passes. Their values feed both address generation blocks; the control block also derives
// the configuration bit cb of the data and address switches (cb = XOR of the bits of b,
// which is the cluster holding operand A) and the read/write enables of the data memory
// clusters. One butterfly is issued per clock. Reads issued in cycle t are written back in
// cycle t+2, so after the last butterfly of a pass the control block stalls for DRAIN = 2
// clocks before the next pass reads what this one wrote.
//
// Sample transfer follows the design's handshakes. Input: the block raises data_req, waits
// for data_valid, drops data_req and takes in_re/in_im; before asking for the next sample it
// waits for data_valid to fall. Sample i is written to full address bitrev(i). Output: result
// i is read from address i, put on out_re/out_im and data_ready is raised; after data_ack
// rises, data_ready drops, and once data_ack has fallen the next result follows.
//
// Interface: start (one clock, in idle) begins a transform of 2**cfg_log2n points
// (MIN_LOG2N .. LOG2N_MAX); log2n holds the size for the whole transform; busy is high from
// start to the last result; done pulses for one clock after it. Counters, handshake signal
// order and the per-pass flow follow the design; the drain stall, the parity rule for cb
// and the four-phase completion of each handshake are this implementation's choices.
module fft_control
  import fft_pkg::*;
#(
  parameter int unsigned LOG2N_MAX = MAX_LOG2N,
  parameter int unsigned DRAIN     = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration and status
  input  logic                 start,
  input  logic [3:0]           cfg_log2n,
  output logic [3:0]           log2n,
  output logic                 busy,
  output logic                 done,
  // input handshake (source)
  output logic                 data_req,
  input  logic                 data_valid,
  input  sample_t              in_re,
  input  sample_t              in_im,
  // output handshake (sink)
  output sample_t              out_re,
  output sample_t              out_im,
  output logic                 data_ready,
  input  logic                 data_ack,
  // to the address generation blocks
  output logic [LOG2N_MAX-1:0] cnt,      // butterfly counter b, or sample number
  output logic [3:0]           p,        // pass counter
  output logic                 agb_io,
  output logic                 agb_rev,
  // to the switches and memory clusters
  output logic                 cb,
  output logic                 dmc_re,
  output logic                 cmc_re,
  output logic                 dmc0_we,
  output logic                 dmc1_we,
  output logic                 ds_ld_sel,
  output cplx_t                ld_sample,
  input  cplx_t                rd_sample,  // operand A from the data switch (result read-out)
  // observation
  output logic                 stall      // pass drain cycle
);

  typedef enum logic [3:0] {
    S_IDLE, S_LD_REQ, S_LD_REL, S_LD_DRAIN, S_BFLY, S_PASS_DRAIN,
    S_UL_READ, S_UL_CAP, S_UL_RDY, S_UL_REL
  } state_t;

  state_t state;
  logic [LOG2N_MAX:0]   n_pts;
  logic [1:0]           drain_cnt;
  logic                 issue_wr;         // a write is issued this cycle (lands in 2)
  logic [1:0]           we0_pipe, we1_pipe;
  logic                 ld_sel_q;
  logic                 last_bfly, last_sample;

  always_comb begin
    n_pts       = '0;
    n_pts[log2n] = 1'b1;
    last_bfly   = ({1'b0, cnt} == (n_pts >> 1) - 1);
    last_sample = ({1'b0, cnt} == n_pts - 1);
  end

  // outputs decoded from the state
  always_comb begin
    busy     = (state != S_IDLE);
    data_req = (state == S_LD_REQ);
    data_ready = (state == S_UL_RDY);
    agb_io   = (state != S_BFLY);
    agb_rev  = (state == S_LD_REQ);
    cb       = ^cnt;
    dmc_re   = (state == S_BFLY) || (state == S_UL_READ);
    cmc_re   = (state == S_BFLY);
    stall    = (state == S_PASS_DRAIN);
    issue_wr = (state == S_BFLY) || (state == S_LD_REQ && data_valid);
    dmc0_we  = we0_pipe[1];
    dmc1_we  = we1_pipe[1];
    ds_ld_sel = ld_sel_q;
  end

  // write enable pipeline: both clusters for a butterfly, one cluster for a loaded sample
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      we0_pipe <= '0;
      we1_pipe <= '0;
      ld_sel_q <= 1'b0;
    end else begin
      we0_pipe <= {we0_pipe[0], issue_wr && (state == S_BFLY || !cb)};
      we1_pipe <= {we1_pipe[0], issue_wr && (state == S_BFLY ||  cb)};
      ld_sel_q <= (state == S_LD_REQ);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      log2n     <= 4'(MIN_LOG2N);
      cnt       <= '0;
      p         <= '0;
      drain_cnt <= '0;
      done      <= 1'b0;
      ld_sample <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          log2n <= cfg_log2n;
          cnt   <= '0;
          p     <= '0;
          state <= S_LD_REQ;
        end
        S_LD_REQ: if (data_valid) begin
          ld_sample <= '{re: in_re, im: in_im};
          state     <= S_LD_REL;
        end
        S_LD_REL: if (!data_valid) begin
          if (last_sample) begin
            cnt       <= '0;
            drain_cnt <= 2'(DRAIN - 1);
            state     <= S_LD_DRAIN;
          end else begin
            cnt   <= cnt + 1'b1;
            state <= S_LD_REQ;
          end
        end
        S_LD_DRAIN: begin
          if (drain_cnt == '0) state <= S_BFLY;
          else drain_cnt <= drain_cnt - 1'b1;
        end
        S_BFLY: begin
          if (last_bfly) begin
            cnt       <= '0;
            drain_cnt <= 2'(DRAIN - 1);
            state     <= S_PASS_DRAIN;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_PASS_DRAIN: begin
          if (drain_cnt != '0) begin
            drain_cnt <= drain_cnt - 1'b1;
          end else if (p == log2n - 4'd1) begin
            state <= S_UL_READ;
          end else begin
            p     <= p + 1'b1;
            state <= S_BFLY;
          end
        end
        S_UL_READ: state <= S_UL_CAP;
        S_UL_CAP: begin
          out_re <= rd_sample.re;
          out_im <= rd_sample.im;
          state  <= S_UL_RDY;
        end
        S_UL_RDY: if (data_ack) state <= S_UL_REL;
        S_UL_REL: if (!data_ack) begin
          if (last_sample) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            cnt   <= cnt + 1'b1;
            state <= S_UL_READ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A size outside the supported range is not accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && start) |-> (cfg_log2n >= 4'(MIN_LOG2N) && cfg_log2n <= 4'(LOG2N_MAX)));
  // The two-way handshakes: data_req and data_ready are never high together.
  assert property (@(posedge clk) disable iff (!rst_n) !(data_req && data_ready));

endmodule
