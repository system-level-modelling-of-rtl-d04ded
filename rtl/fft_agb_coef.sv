// fft_agb_coef: address generation block for the coefficient memory cluster (AGB_CMC).
//
// How it works: for an N = 2**n point transform, butterfly b of pass p needs the coefficient
// W^k with W = exp(-2*pi*i/N), and k is b with its (n - 1 - p) least significant bits
// masked out. In the first pass every butterfly uses W^0; in the last pass k = b. The
// coefficient memory holds W^k at address k, so k is the address.
//
// Interface and timing: combinational, k has LOG2N_MAX-1 bits (9 for 1024 points). The
// masking rule is the design's; the table layout (entry k holds W^k of the current size) is
// this implementation's choice.
module fft_agb_coef
  import fft_pkg::*;
#(
  parameter int unsigned LOG2N_MAX = MAX_LOG2N,
  localparam int unsigned KW = LOG2N_MAX - 1
) (
  input  logic [3:0]    log2n,
  input  logic [3:0]    p,
  input  logic [KW-1:0] b,
  output logic [KW-1:0] k
);

  logic [3:0] drop;

  always_comb begin
    drop = log2n - 4'd1 - p;
    k    = b & ~KW'((1 << drop) - 1);
  end

endmodule
