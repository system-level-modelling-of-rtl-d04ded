// fft_agb_data: address generation block for the two data memory clusters (AGB_DMC).
//
// How it works: the transform is done in place, radix-2, decimation in time, over n = log2n
// passes of N/2 butterflies (N = 2**n). For butterfly b of pass p the two operands sit at
//     fa = rotl_n(2*b, p)      fb = rotl_n(2*b + 1, p)
// (rotl_n: rotate left within n bits), which differ only in bit p, so the operand distance
// doubles from pass to pass. Each full address is split over the two clusters: its parity
// (XOR of all bits) picks the cluster and fa >> 1 is the 9-bit address inside it. As the
// two operands differ in one bit they always lie in different clusters and can be read in
// the same cycle. For sample transfer (io = 1) both outputs carry the address of sample
// number cnt: bit-reversed when rev = 1 (loading, since time-decimation wants its input in
// bit-reversed order) and natural when rev = 0 (reading out results).
//
// Interface and timing: combinational; addr_a/addr_b are the in-cluster addresses (the
// 9-bit input of the address switch), fa/fb the full addresses. Generating addresses for
// every size from 16 to 2**MAX_LOG2N points follows the design; the rotation rule and the
// parity split over the clusters are this implementation's choices.
module fft_agb_data
  import fft_pkg::*;
#(
  parameter int unsigned LOG2N_MAX = MAX_LOG2N,
  localparam int unsigned AW = LOG2N_MAX - 1
) (
  input  logic [3:0]           log2n,
  input  logic [3:0]           p,        // pass number 0 .. log2n-1
  input  logic [LOG2N_MAX-1:0] cnt,      // butterfly number (compute) or sample number (io)
  input  logic                 io,
  input  logic                 rev,
  output logic [LOG2N_MAX-1:0] fa,
  output logic [LOG2N_MAX-1:0] fb,
  output logic [AW-1:0]        addr_a,
  output logic [AW-1:0]        addr_b
);

  logic [LOG2N_MAX-1:0] mask;
  logic [2*LOG2N_MAX-1:0] sh_a, sh_b;
  logic [LOG2N_MAX-1:0] x_a, x_b, io_addr;

  always_comb begin
    mask = LOG2N_MAX'((1 << log2n) - 1);
    x_a  = {cnt[LOG2N_MAX-2:0], 1'b0} & mask;
    x_b  = x_a | LOG2N_MAX'(1);
    sh_a = (2*LOG2N_MAX)'(x_a) << p;
    sh_b = (2*LOG2N_MAX)'(x_b) << p;
    // rotation: bits shifted past position n-1 come back at the bottom
    fa = (sh_a[LOG2N_MAX-1:0] | LOG2N_MAX'(sh_a >> log2n)) & mask;
    fb = (sh_b[LOG2N_MAX-1:0] | LOG2N_MAX'(sh_b >> log2n)) & mask;

    io_addr = '0;
    for (int i = 0; i < LOG2N_MAX; i++) begin
      if (i < int'(log2n)) io_addr[i] = cnt[int'(log2n) - 1 - i];
    end
    if (!rev) io_addr = cnt & mask;

    if (io) begin
      fa = io_addr;
      fb = io_addr;
    end
    addr_a = fa[LOG2N_MAX-1:1];
    addr_b = fb[LOG2N_MAX-1:1];
  end

endmodule
