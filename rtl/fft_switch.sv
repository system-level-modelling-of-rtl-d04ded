// fft_switch: switch block. A two-input, two-output crossbar for words of W bits, steered
// by the configuration bit cb (CB[0]): with cb = 0 input xs goes to y0 and xt to y1, with
// cb = 1 they are exchanged. With REG = 1 the crossing is captured in two output registers
// (the "negative" and "positive" registers), so y0/y1 follow xs/xt/cb by one clock; with
// REG = 0 the block is combinational.
//
// The multiplexer pair steered by CB[0] and the two registers follow the design's switch
// block; making the registers optional by a parameter, so that one block serves the read
// and write sides, is this implementation's choice. Registers reset to zero.
module fft_switch #(
  parameter int unsigned W   = 32,
  parameter bit          REG = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cb,
  input  logic [W-1:0] xs,
  input  logic [W-1:0] xt,
  output logic [W-1:0] y0,
  output logic [W-1:0] y1
);

  logic [W-1:0] mux_neg, mux_pos;

  assign mux_neg = cb ? xt : xs;
  assign mux_pos = cb ? xs : xt;

  if (REG) begin : g_reg
    logic [W-1:0] reg_neg, reg_pos;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        reg_neg <= '0;
        reg_pos <= '0;
      end else begin
        reg_neg <= mux_neg;
        reg_pos <= mux_pos;
      end
    end
    assign y0 = reg_neg;
    assign y1 = reg_pos;
  end else begin : g_comb
    assign y0 = mux_neg;
    assign y1 = mux_pos;
  end

endmodule
