// Self-checking testbench for ifft8: random spectra against a direct
// inverse DFT with the 1/8 factor, in real arithmetic (tolerance 2 LSB of
// Q8.8), and a round trip of the ramp example through fft8 and ifft8.
module tb_ifft8;
  import risc_dsp_pkg::*;
  cplx_t x [8], y [8], f [8], r [8];
  int checks = 0, failures = 0;
  real xr [8], xi [8];

  localparam real PI = 3.14159265358979;
  localparam real SCALE = 256.0;

  ifft8 dut (.x, .y);
  fft8  u_f (.x(x), .y(f));
  ifft8 u_r (.x(f), .y(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < 8; k++) begin
        int ir, ii;
        ir = $urandom_range(0, 4095) - 2048; ii = $urandom_range(0, 4095) - 2048;
        x[k].re = 16'(ir); x[k].im = 16'(ii);
        xr[k] = real'(ir) / SCALE; xi[k] = real'(ii) / SCALE;
      end
      #1;
      for (int n = 0; n < 8; n++) begin
        real er, ei, dr, di;
        er = 0.0; ei = 0.0;
        for (int k = 0; k < 8; k++) begin
          er += xr[k] * $cos(2.0*PI*k*n/8.0) - xi[k] * $sin(2.0*PI*k*n/8.0);
          ei += xi[k] * $cos(2.0*PI*k*n/8.0) + xr[k] * $sin(2.0*PI*k*n/8.0);
        end
        er /= 8.0; ei /= 8.0;
        dr = real'(y[n].re) / SCALE - er;
        di = real'(y[n].im) / SCALE - ei;
        checks++;
        if (dr > 2.0/SCALE || dr < -2.0/SCALE || di > 2.0/SCALE || di < -2.0/SCALE) begin
          failures++;
          $display("x%0d = (%f,%f) exp (%f,%f)", n, real'(y[n].re)/SCALE, real'(y[n].im)/SCALE, er, ei);
        end
      end
    end
    // round trip of the ramp 0..7
    for (int n = 0; n < 8; n++) begin x[n].re = 16'(n * 256); x[n].im = '0; end
    #1;
    for (int n = 0; n < 8; n++) begin
      int d;
      d = int'(r[n].re) - n * 256;
      checks++;
      if (d > 2 || d < -2 || r[n].im > 2 || r[n].im < -2) begin
        failures++;
        $display("round trip x%0d = %0d,%0d", n, r[n].re, r[n].im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
