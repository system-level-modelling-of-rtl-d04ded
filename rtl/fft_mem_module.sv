// fft_mem_module: one memory module of a memory cluster, a data memory module (DMM) or a
// coefficient memory module (CMM). WORDS words of WIDTH bits, one write port and one read
// port (dual port), both synchronous to clk.
//
// The module can be switched off as a whole with pwr_on = 0: it then ignores writes and
// reads and its read register is cleared, so a module that the current transform size does
// not use consumes no access energy. A write is taken at the rising edge when pwr_on and
// we are high. A read of raddr with re high returns the word on rdata after the next rising
// edge; rdata holds its value while re is low. A read and a write of the same word in one
// cycle return the old word.
//
// Size (8 x 32 bits) and dual-port organisation follow the design; the power-off behaviour
// (clearing the read register) and read-old-data on collisions are this implementation's
// choices.
module fft_mem_module #(
  parameter int unsigned WORDS = 8,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic             clk,
  input  logic             pwr_on,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (pwr_on && we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!pwr_on)  rdata <= '0;
    else if (re)  rdata <= mem[raddr];
  end

endmodule
