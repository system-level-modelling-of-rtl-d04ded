// fft_addr_switch: address switch (AS). Exchanges the two 9-bit in-cluster addresses from
// the data address generation block so that each goes to the cluster that holds its operand,
// and supplies the matching write addresses for the results.
//
// How it works: with cb = 0 address A goes to DMC0 and address B to DMC1, with cb = 1 the
// other way round (a combinational switch block for the read port). The switched pair is
// then carried through two register stages (a registered switch block with cb held at 0,
// and a plain register), so the write addresses leave two clocks after the read addresses,
// in step with the results of the data switch: every result is written back where its
// operand was read (in place).
//
// Interface and timing: rd_addr0/1 combinational from addr_a/addr_b/cb; wr_addr0/1 the same
// values two clocks later. The 9-bit address width follows the design; the two-clock write
// delay matches this implementation's pipeline.
module fft_addr_switch #(
  parameter int unsigned AW = fft_pkg::MAX_LOG2N - 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cb,
  input  logic [AW-1:0] addr_a,
  input  logic [AW-1:0] addr_b,
  output logic [AW-1:0] rd_addr0,
  output logic [AW-1:0] rd_addr1,
  output logic [AW-1:0] wr_addr0,
  output logic [AW-1:0] wr_addr1
);

  logic [AW-1:0] d1_0, d1_1;

  fft_switch #(.W(AW), .REG(1'b0)) u_rd_switch (
    .clk  (clk),
    .rst_n(rst_n),
    .cb   (cb),
    .xs   (addr_a),
    .xt   (addr_b),
    .y0   (rd_addr0),
    .y1   (rd_addr1)
  );

  // first delay stage: a registered switch block, not crossing
  fft_switch #(.W(AW), .REG(1'b1)) u_delay_switch (
    .clk  (clk),
    .rst_n(rst_n),
    .cb   (1'b0),
    .xs   (rd_addr0),
    .xt   (rd_addr1),
    .y0   (d1_0),
    .y1   (d1_1)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr0 <= '0;
      wr_addr1 <= '0;
    end else begin
      wr_addr0 <= d1_0;
      wr_addr1 <= d1_1;
    end
  end

endmodule
