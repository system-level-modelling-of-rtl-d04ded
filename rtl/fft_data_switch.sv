// fft_data_switch: data switch (DS). Routes data between the two data memory clusters
// (DMC0, DMC1) and the butterfly block.
//
// How it works: the two operands of a butterfly always sit in different clusters, and the
// configuration bit cb tells which way round: cb = 0 means operand A (Input1) in DMC0 and
// operand B (Input2) in DMC1, cb = 1 the opposite. On the read side a combinational switch
// block puts the cluster outputs in operand order for the butterfly. On the write side a
// registered switch block sends Output1 back to the cluster of operand A and Output2 to the
// cluster of operand B, so the results overwrite their operands (in-place transform). While
// samples are being loaded (ld_sel) the loaded sample is offered to both clusters instead,
// and the control block enables the write of only one of them.
//
// Timing: cb belongs to the cycle in which the addresses are issued; the memories answer one
// cycle later, so cb is delayed one clock here for both sides. The write data leave the
// register one further clock later, i.e. two clocks after the read was issued, together with
// the write addresses from the address switch. Routing butterfly outputs into the right
// cluster follows the design; the read-side switch and the load path are this
// implementation's choices.
module fft_data_switch
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cb,          // cb of the cycle in which the read was issued
  // read side
  input  cplx_t dmc0_rdata,
  input  cplx_t dmc1_rdata,
  output cplx_t op_a,        // to butterfly Input1
  output cplx_t op_b,        // to butterfly Input2
  // write side
  input  cplx_t x1,          // butterfly Output1
  input  cplx_t x2,          // butterfly Output2
  input  logic  ld_sel,      // 1: write the loaded sample instead
  input  cplx_t ld_sample,
  output cplx_t dmc0_wdata,
  output cplx_t dmc1_wdata
);

  logic  cb_q;
  cplx_t w_s, w_t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cb_q <= 1'b0;
    else        cb_q <= cb;
  end

  fft_switch #(.W(32), .REG(1'b0)) u_rd_switch (
    .clk  (clk),
    .rst_n(rst_n),
    .cb   (cb_q),
    .xs   (dmc0_rdata),
    .xt   (dmc1_rdata),
    .y0   (op_a),
    .y1   (op_b)
  );

  assign w_s = ld_sel ? ld_sample : x1;
  assign w_t = ld_sel ? ld_sample : x2;

  fft_switch #(.W(32), .REG(1'b1)) u_wr_switch (
    .clk  (clk),
    .rst_n(rst_n),
    .cb   (cb_q),
    .xs   (w_s),
    .xt   (w_t),
    .y0   (dmc0_wdata),
    .y1   (dmc1_wdata)
  );

endmodule
