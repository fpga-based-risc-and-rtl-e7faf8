// 8-point radix-2 decimation-in-time FFT, X(k) = sum x(n) W8^(kn), built
// from two 4-point FFTs (even and odd samples) and a last stage of four
// butterflies with twiddles W8^0 = 1, W8^1 = (1-j)/sqrt2, W8^2 = -j and
// W8^3 = -(1+j)/sqrt2, matching the three-stage 8-point flow graph.
// Combinational; natural-order inputs and outputs.
// Number format: samples are Q8.8 (8 fraction bits); the two
// non-trivial twiddles use cos(pi/4) in Q1.14, rounded, so outputs can be
// off by a few LSB. There is no scaling: the output may grow to 8 times the
// input, so inputs must stay below 1/8 of full scale (|x| < 16.0 in Q8.8).
// The fixed-point format is this design's choice.
module fft8
  import risc_dsp_pkg::*;
(
  input  cplx_t x [8],
  output cplx_t y [8]
);
  cplx_t xe [4], xo [4], e [4], o [4], t [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      xe[i] = x[2*i];
      xo[i] = x[2*i+1];
    end
  end

  fft4 u_even (.x(xe), .y(e));
  fft4 u_odd  (.x(xo), .y(o));

  always_comb begin
    // t[k] = W8^k * o[k]
    t[0] = o[0];
    t[1].re = mul_q14(o[1].re + o[1].im, COS_PI4_Q14);     // (a+jb)(c-jc) = c(a+b) + jc(b-a)
    t[1].im = mul_q14(o[1].im - o[1].re, COS_PI4_Q14);
    t[2].re =  o[2].im;                                    // -j(a+jb) = b - ja
    t[2].im = -o[2].re;
    t[3].re = mul_q14(o[3].im - o[3].re, COS_PI4_Q14);     // (a+jb)(-c-jc) = c(b-a) - jc(a+b)
    t[3].im = -mul_q14(o[3].re + o[3].im, COS_PI4_Q14);
    for (int k = 0; k < 4; k++) begin
      y[k].re   = e[k].re + t[k].re;
      y[k].im   = e[k].im + t[k].im;
      y[k+4].re = e[k].re - t[k].re;
      y[k+4].im = e[k].im - t[k].im;
    end
  end
endmodule
