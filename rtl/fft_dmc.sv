// fft_dmc: data memory cluster (DMC). N_MODS data memory modules (DMMs) of MOD_WORDS
// complex words each, combined into one dual-port memory of N_MODS*MOD_WORDS words
// (64 x 8 = 512 words of 32 bits by default). The processor has two of these; together
// they hold a 1024-point transform.
//
// How it works: the low bits of an address pick the word inside a module and the most
// significant bits pick the module, so only the addressed module sees a write or read
// enable. In addition every module has its own power switch: for a transform of 2**log2n
// points a cluster holds 2**(log2n-1) words, so only the first 2**(log2n-1)/MOD_WORDS
// modules are switched on; the others stay off for the whole transform. dmm_on shows
// which modules are on. The read data of the addressed module is selected with the module
// index registered alongside the read, so rdata is valid one cycle after re.
//
// Interface and timing: write at the rising edge when we is high; read data one cycle after
// re. Module count and size, and switching modules off by address MSBs, follow the design;
// the linear MSB/LSB split of the address and the size-derived on/off mask are this
// implementation's choices.
module fft_dmc
  import fft_pkg::*;
#(
  parameter int unsigned NMOD  = N_MODS,
  parameter int unsigned WORDS = MOD_WORDS,
  localparam int unsigned AW  = $clog2(NMOD * WORDS),
  localparam int unsigned WAW = $clog2(WORDS),
  localparam int unsigned MAW = $clog2(NMOD)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [3:0]     log2n,      // transform size, 2**log2n points
  input  logic           we,
  input  logic [AW-1:0]  waddr,
  input  cplx_t          wdata,
  input  logic           re,
  input  logic [AW-1:0]  raddr,
  output cplx_t          rdata,
  output logic [NMOD-1:0] dmm_on     // power state of each data memory module
);

  logic [31:0] mod_rdata [NMOD];
  logic [MAW-1:0] rsel_q;

  // Number of words used in this cluster: half the transform.
  logic [AW:0] used_words;
  always_comb begin
    used_words = '0;
    used_words[log2n - 4'd1] = 1'b1;
  end

  for (genvar m = 0; m < NMOD; m++) begin : g_dmm
    logic sel_w, sel_r;
    assign dmm_on[m] = (AW + 1)'(m * WORDS) < used_words;
    assign sel_w = we && (waddr[AW-1:WAW] == MAW'(m));
    assign sel_r = re && (raddr[AW-1:WAW] == MAW'(m));
    fft_mem_module #(.WORDS(WORDS), .WIDTH(32)) u_dmm (
      .clk   (clk),
      .pwr_on(dmm_on[m]),
      .we    (sel_w),
      .waddr (waddr[WAW-1:0]),
      .wdata (wdata),
      .re    (sel_r),
      .raddr (raddr[WAW-1:0]),
      .rdata (mod_rdata[m])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rsel_q <= '0;
    else if (re) rsel_q <= raddr[AW-1:WAW];
  end

  assign rdata = cplx_t'(mod_rdata[rsel_q]);

endmodule
