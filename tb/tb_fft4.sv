// Self-checking testbench for fft4: random blocks against a direct
// 4-point DFT computed with integers (the 4-point twiddles are 1, -j, -1, j,
// so the result must be exact).
module tb_fft4;
  import risc_dsp_pkg::*;
  cplx_t x [4], y [4];
  int checks = 0, failures = 0;

  fft4 dut (.x, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xr [4], xi [4];
    for (int t = 0; t < 200; t++) begin
      for (int n = 0; n < 4; n++) begin
        xr[n] = $urandom_range(0, 4095) - 2048; xi[n] = $urandom_range(0, 4095) - 2048;
        x[n].re = 16'(xr[n]); x[n].im = 16'(xi[n]);
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        int sr, si;
        sr = 0; si = 0;
        for (int n = 0; n < 4; n++) begin
          // W4^(kn) = (-j)^(kn)
          case ((k * n) % 4)
            0: begin sr += xr[n]; si += xi[n]; end
            1: begin sr += xi[n]; si -= xr[n]; end
            2: begin sr -= xr[n]; si -= xi[n]; end
            default: begin sr -= xi[n]; si += xr[n]; end
          endcase
        end
        checks++;
        if (int'(y[k].re) != sr || int'(y[k].im) != si) begin
          failures++;
          $display("fft4 X%0d = %0d,%0d exp %0d,%0d", k, y[k].re, y[k].im, sr, si);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
