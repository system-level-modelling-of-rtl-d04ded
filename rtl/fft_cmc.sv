// fft_cmc: coefficient memory cluster (CMC). N_MODS coefficient memory modules (CMMs) of
// MOD_WORDS twiddle factors each (64 x 8 = 512 coefficients of 32 bits by default), glued
// into one coefficient memory.
//
// How it works: the coefficient table is written through the load port (ld_we, ld_addr,
// ld_data) before a transform; for a 2**log2n-point transform entry k holds
// W^k = exp(-2*pi*i*k/2**log2n) for k = 0 .. 2**(log2n-1)-1, so the table is rewritten
// when the transform size changes. The most significant address bits select a module and
// the low bits a word in it; modules beyond the table for the current size are switched
// off (cmm_on). A coefficient read with re returns W on coef one cycle later, aligned with
// the data read from the data memory clusters.
//
// The 64 x 8 organisation follows the design. Loading the table through a write port, per
// transform size, and switching off unused modules are this implementation's choices.
module fft_cmc
  import fft_pkg::*;
#(
  parameter int unsigned NMOD  = N_MODS,
  parameter int unsigned WORDS = MOD_WORDS,
  localparam int unsigned AW  = $clog2(NMOD * WORDS),
  localparam int unsigned WAW = $clog2(WORDS),
  localparam int unsigned MAW = $clog2(NMOD)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0]      log2n,
  input  logic            ld_we,
  input  logic [AW-1:0]   ld_addr,
  input  cplx_t           ld_data,
  input  logic            re,
  input  logic [AW-1:0]   addr,
  output cplx_t           coef,
  output logic [NMOD-1:0] cmm_on
);

  logic [31:0] mod_rdata [NMOD];
  logic [MAW-1:0] rsel_q;

  // Coefficients needed: half the transform size.
  logic [AW:0] used_words;
  always_comb begin
    used_words = '0;
    used_words[log2n - 4'd1] = 1'b1;
  end

  for (genvar m = 0; m < NMOD; m++) begin : g_cmm
    logic sel_w, sel_r;
    assign cmm_on[m] = (AW + 1)'(m * WORDS) < used_words;
    assign sel_w = ld_we && (ld_addr[AW-1:WAW] == MAW'(m));
    assign sel_r = re && (addr[AW-1:WAW] == MAW'(m));
    fft_mem_module #(.WORDS(WORDS), .WIDTH(32)) u_cmm (
      .clk   (clk),
      .pwr_on(cmm_on[m]),
      .we    (sel_w),
      .waddr (ld_addr[WAW-1:0]),
      .wdata (ld_data),
      .re    (sel_r),
      .raddr (addr[WAW-1:0]),
      .rdata (mod_rdata[m])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rsel_q <= '0;
    else if (re) rsel_q <= addr[AW-1:WAW];
  end

  assign coef = cplx_t'(mod_rdata[rsel_q]);

endmodule
