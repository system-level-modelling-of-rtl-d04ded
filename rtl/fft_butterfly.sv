// fft_butterfly: radix-2 butterfly block (BB). Two complex inputs a (Input1) and b (Input2)
// and the complex coefficient w give two complex outputs
//     x1 = a + w*b        x2 = a - w*b
// (decimation-in-time butterfly: the coefficient multiplies the second input first).
//
// How it works: four real multipliers form the products b.re*w.re, b.im*w.im, b.re*w.im and
// b.im*w.re; one subtractor and one adder combine them into the real and imaginary parts of
// t = w*b, and two adders and two subtractors form a +/- t, as in the data path of the
// design. All words are Q5.10. The 32-bit products carry 20 fractional bits; the sums are
// shifted right by FRAC (truncation towards minus infinity) and the outputs are saturated to
// 16 bits, with sat flagging that an output was clipped.
//
// The block is purely combinational; the register after it sits in the data switch.
// Truncation and saturation are this implementation's choices.
module fft_butterfly
  import fft_pkg::*;
(
  input  cplx_t a,     // Input1
  input  cplx_t b,     // Input2
  input  cplx_t w,     // coefficient W
  output cplx_t x1,    // Output1 = a + w*b
  output cplx_t x2,    // Output2 = a - w*b
  output logic  sat    // an output was saturated
);

  localparam int unsigned PW = 2 * DW + 1;   // product sum width
  localparam int unsigned SW = PW - FRAC + 1; // a +/- t width

  logic signed [2*DW-1:0] p_rr, p_ii, p_ri, p_ir;
  logic signed [PW-1:0]   t_re_f, t_im_f;
  logic signed [SW-1:0]   t_re, t_im;
  logic signed [SW-1:0]   s1_re, s1_im, s2_re, s2_im;
  logic [3:0]             clip;

  function automatic sample_t saturate(input logic signed [SW-1:0] v, output logic clipped);
    localparam logic signed [SW-1:0] MAXV = SW'(2 ** (DW - 1) - 1);
    localparam logic signed [SW-1:0] MINV = -SW'(2 ** (DW - 1));
    clipped = 1'b0;
    if (v > MAXV) begin
      clipped = 1'b1;
      return sample_t'(MAXV);
    end else if (v < MINV) begin
      clipped = 1'b1;
      return sample_t'(MINV);
    end
    return sample_t'(v);
  endfunction

  always_comb begin
    p_rr   = b.re * w.re;
    p_ii   = b.im * w.im;
    p_ri   = b.re * w.im;
    p_ir   = b.im * w.re;
    t_re_f = PW'(p_rr) - PW'(p_ii);
    t_im_f = PW'(p_ri) + PW'(p_ir);
    t_re   = SW'(t_re_f >>> FRAC);
    t_im   = SW'(t_im_f >>> FRAC);
    s1_re  = SW'(a.re) + t_re;
    s1_im  = SW'(a.im) + t_im;
    s2_re  = SW'(a.re) - t_re;
    s2_im  = SW'(a.im) - t_im;
    x1.re  = saturate(s1_re, clip[0]);
    x1.im  = saturate(s1_im, clip[1]);
    x2.re  = saturate(s2_re, clip[2]);
    x2.im  = saturate(s2_im, clip[3]);
    sat    = |clip;
  end

endmodule
