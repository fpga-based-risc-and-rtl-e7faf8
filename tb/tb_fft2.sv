// Self-checking testbench for fft2: random complex samples, exact sums
// and differences.
module tb_fft2;
  import risc_dsp_pkg::*;
  cplx_t x0, x1, y0, y1;
  int checks = 0, failures = 0;

  fft2 dut (.x0, .x1, .y0, .y1);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      int ar, ai, br, bi;
      ar = $urandom_range(0, 8191) - 4096; ai = $urandom_range(0, 8191) - 4096;
      br = $urandom_range(0, 8191) - 4096; bi = $urandom_range(0, 8191) - 4096;
      x0.re = 16'(ar); x0.im = 16'(ai); x1.re = 16'(br); x1.im = 16'(bi);
      #1;
      checks++;
      if (int'(y0.re) != ar + br || int'(y0.im) != ai + bi ||
          int'(y1.re) != ar - br || int'(y1.im) != ai - bi) begin
        failures++;
        $display("fft2 mismatch %0d %0d %0d %0d", ar, ai, br, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
