// fft_butterfly: one radix-2 decimation-in-time butterfly,
//   y0 = (a + W*b) / 2,   y1 = (a - W*b) / 2,
// on 8-bit complex numbers. W = (w_re - j*w_sin)/128 comes from
// twiddle_rom. Each 8x8 product is 16 bits and the sum of two products,
// or of a product and a*128, is 17 bits, so all the arithmetic fits the
// 17-bit intermediate width the original design uses. The 17-bit sums are then
// shifted right by 8 (divide by 128 for the twiddle scale and by 2 for the
// stage), which keeps every stage at 8 bits; results outside -128..127
// saturate. Halving in every stage (instead of a single scale at the end)
// and floor rounding by arithmetic shift are this implementation's
// choices; the original design says only that values are scaled down to 8-bit
// inputs and outputs with 17-bit intermediates. Purely combinational.
module fft_butterfly
  import freqid_pkg::*;
(
  input  cplx_t                    a,
  input  cplx_t                    b,
  input  logic signed [DATA_W-1:0] w_re,
  input  logic signed [DATA_W-1:0] w_sin,
  output cplx_t                    y0,
  output cplx_t                    y1
);

  localparam int SHIFT = int'(TW_SHIFT) + 1;

  logic signed [ACC_W-1:0] t_re, t_im;          // W*b, scaled by 128
  logic signed [ACC_W-1:0] a_re_s, a_im_s;      // a, scaled by 128
  logic signed [ACC_W-1:0] s0_re, s0_im, s1_re, s1_im;

  // Saturate a 17-bit sum shifted down by SHIFT to DATA_W bits.
  function automatic logic signed [DATA_W-1:0] scale_sat(input logic signed [ACC_W-1:0] v);
    logic signed [ACC_W-1:0] s;
    s = v >>> SHIFT;
    if (s > ACC_W'(2**(DATA_W-1) - 1))      return DATA_W'(2**(DATA_W-1) - 1);
    else if (s < -ACC_W'(2**(DATA_W-1)))    return DATA_W'(-(2**(DATA_W-1)));
    else                                    return s[DATA_W-1:0];
  endfunction

  always_comb begin
    // (w_re - j w_sin)(b_re + j b_im) = (w_re b_re + w_sin b_im) + j(w_re b_im - w_sin b_re)
    t_re   = ACC_W'(w_re * b.re) + ACC_W'(w_sin * b.im);
    t_im   = ACC_W'(w_re * b.im) - ACC_W'(w_sin * b.re);
    a_re_s = ACC_W'(a.re) <<< TW_SHIFT;
    a_im_s = ACC_W'(a.im) <<< TW_SHIFT;
    s0_re  = a_re_s + t_re;
    s0_im  = a_im_s + t_im;
    s1_re  = a_re_s - t_re;
    s1_im  = a_im_s - t_im;
    y0.re  = scale_sat(s0_re);
    y0.im  = scale_sat(s0_im);
    y1.re  = scale_sat(s1_re);
    y1.im  = scale_sat(s1_im);
  end

endmodule
