// 2-point FFT (radix-2 butterfly without twiddle): X0 = x0 + x1,
// X1 = x0 - x1, on complex fixed-point samples. Combinational. Sums wrap
// at DSP_W bits; the caller keeps inputs small enough (see fft8).
// Building the FFT up from this 2-point stage follows the document.
module fft2
  import risc_dsp_pkg::*;
(
  input  cplx_t x0,
  input  cplx_t x1,
  output cplx_t y0,
  output cplx_t y1
);
  always_comb begin
    y0.re = x0.re + x1.re;
    y0.im = x0.im + x1.im;
    y1.re = x0.re - x1.re;
    y1.im = x0.im - x1.im;
  end
endmodule
