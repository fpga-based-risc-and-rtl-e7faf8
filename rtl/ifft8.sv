// 8-point inverse FFT, x(n) = (1/8) sum X(k) W8^(-kn). It reuses the forward
// fft8 through the identity IDFT(X) = conj(DFT(conj(X))) / N: the imaginary
// parts are negated on the way in and out, and the result is divided by 8
// with an arithmetic right shift (rounding toward minus infinity).
// Combinational. The conjugation method is this design's choice; the
// definition with the 1/N factor is the document's.
module ifft8
  import risc_dsp_pkg::*;
(
  input  cplx_t x [8],
  output cplx_t y [8]
);
  cplx_t xc [8], f [8];

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      xc[i].re =  x[i].re;
      xc[i].im = -x[i].im;
    end
  end

  fft8 u_fft (.x(xc), .y(f));

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      y[i].re =   f[i].re  >>> 3;
      y[i].im = (-f[i].im) >>> 3;
    end
  end
endmodule
