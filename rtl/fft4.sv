// 4-point decimation-in-time FFT built from two 2-point FFTs, as the
// document builds its 8-point FFT. The even samples (x0, x2) and the odd
// samples (x1, x3) each go through an fft2; the results are combined with
// the twiddles W4^0 = 1 and W4^1 = -j:
//   X0 = E0 + O0,  X2 = E0 - O0,  X1 = E1 - jO1,  X3 = E1 + jO1.
// Multiplying by -j only swaps and negates parts, so the block is exact.
// Combinational; natural-order inputs and outputs.
module fft4
  import risc_dsp_pkg::*;
(
  input  cplx_t x [4],
  output cplx_t y [4]
);
  cplx_t e0, e1, o0, o1, o1j;

  fft2 u_even (.x0(x[0]), .x1(x[2]), .y0(e0), .y1(e1));
  fft2 u_odd  (.x0(x[1]), .x1(x[3]), .y0(o0), .y1(o1));

  always_comb begin
    // o1j = -j * o1
    o1j.re =  o1.im;
    o1j.im = -o1.re;
    y[0].re = e0.re + o0.re;   y[0].im = e0.im + o0.im;
    y[2].re = e0.re - o0.re;   y[2].im = e0.im - o0.im;
    y[1].re = e1.re + o1j.re;  y[1].im = e1.im + o1j.im;
    y[3].re = e1.re - o1j.re;  y[3].im = e1.im - o1j.im;
  end
endmodule
