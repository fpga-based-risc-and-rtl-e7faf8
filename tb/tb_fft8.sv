// Self-checking testbench for fft8. First the example block x(n) = n,
// n = 0..7, whose DFT is X(0) = 28 and X(k) = -4 + j4 cot(k pi/8) otherwise
// (X1 = -4+j9.657, X2 = -4+j4, X3 = -4+j1.657, X4 = -4, ...); then random
// blocks against a direct DFT in real arithmetic. Tolerance 3 LSB of Q8.8.
module tb_fft8;
  import risc_dsp_pkg::*;
  cplx_t x [8], y [8];
  int checks = 0, failures = 0;
  real xr [8], xi [8];

  fft8 dut (.x, .y);

  localparam real PI = 3.14159265358979;
  localparam real SCALE = 256.0;

  task automatic compare(input string tag);
    for (int k = 0; k < 8; k++) begin
      real er, ei, dr, di;
      er = 0.0; ei = 0.0;
      for (int n = 0; n < 8; n++) begin
        er += xr[n] * $cos(2.0*PI*k*n/8.0) + xi[n] * $sin(2.0*PI*k*n/8.0);
        ei += xi[n] * $cos(2.0*PI*k*n/8.0) - xr[n] * $sin(2.0*PI*k*n/8.0);
      end
      dr = real'(y[k].re) / SCALE - er;
      di = real'(y[k].im) / SCALE - ei;
      checks++;
      if (dr > 3.0/SCALE || dr < -3.0/SCALE || di > 3.0/SCALE || di < -3.0/SCALE) begin
        failures++;
        $display("%s X%0d = (%f,%f) exp (%f,%f)", tag, k,
                 real'(y[k].re)/SCALE, real'(y[k].im)/SCALE, er, ei);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 8; n++) begin
      xr[n] = n; xi[n] = 0.0;
      x[n].re = 16'(n * 256); x[n].im = '0;
    end
    #1;
    compare("ramp");
    // spot values of the ramp example, independent of the DFT loop
    checks++;
    if (y[0].re != 16'sd7168 || y[0].im != 0) failures++;
    checks++;
    if (y[4].re != -16'sd1024 || y[4].im != 0) failures++;
    checks++;
    if (y[2].re != -16'sd1024 || y[2].im != 16'sd1024) failures++;
    for (int t = 0; t < 200; t++) begin
      for (int n = 0; n < 8; n++) begin
        int ir, ii;
        ir = $urandom_range(0, 4095) - 2048; ii = $urandom_range(0, 4095) - 2048;   // +-8.0
        x[n].re = 16'(ir); x[n].im = 16'(ii);
        xr[n] = real'(ir) / SCALE; xi[n] = real'(ii) / SCALE;
      end
      #1;
      compare("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
