// Self-checking testbench for dct8: random real blocks through the DCT and
// the IDCT against the transform definitions evaluated in real arithmetic
// (tolerance 2 LSB of Q8.8), a DC block whose DCT is known in closed form,
// and the start-to-done latency of 66 cycles.
module tb_dct8;
  import risc_dsp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, inverse = 0, busy, done;
  logic signed [15:0] x [8], y [8];
  real xr [8];
  int checks = 0, failures = 0;

  localparam real PI = 3.14159265358979;
  localparam real SCALE = 256.0;

  dct8 dut (.clk, .rst_n, .start, .inverse, .x, .y, .busy, .done);

  always #5 clk = ~clk;

  function automatic real ck(input int k);
    return (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  task automatic run(input logic inv, input string tag);
    int cycles;
    @(negedge clk); start = 1; inverse = inv;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 66) begin failures++; $display("%s latency %0d", tag, cycles); end
    for (int o = 0; o < 8; o++) begin
      real e, d;
      e = 0.0;
      for (int i = 0; i < 8; i++)
        if (!inv) e += 0.5 * ck(o) * xr[i] * $cos((2*i+1) * o * PI / 16.0);
        else      e += 0.5 * ck(i) * xr[i] * $cos((2*o+1) * i * PI / 16.0);
      d = real'(y[o]) / SCALE - e;
      checks++;
      if (d > 2.0/SCALE || d < -2.0/SCALE) begin
        failures++;
        $display("%s out %0d = %f exp %f", tag, o, real'(y[o])/SCALE, e);
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) x[i] = '0;
    #12 rst_n = 1;
    // DC block of 1.0: DCT gives X0 = 8 * 0.5 / sqrt2 = 2.828, others 0
    for (int i = 0; i < 8; i++) begin x[i] = 16'sd256; xr[i] = 1.0; end
    run(1'b0, "dc");
    checks++;
    if (y[0] < 16'sd722 || y[0] > 16'sd726) failures++;
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < 8; i++) begin
        int v;
        v = $urandom_range(0, 4095) - 2048;
        x[i] = 16'(v); xr[i] = real'(v) / SCALE;
      end
      run(t[0], t[0] ? "idct" : "dct");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
