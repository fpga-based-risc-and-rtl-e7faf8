// Self-checking testbench for dsp_unit with a DSP data memory: loads a
// block, runs FFT, IFFT, DCT and IDCT, checks the block written back
// against the transform definitions in real arithmetic (tolerance 3 LSB of
// Q8.8), the done latency (18 cycles for FFT/IFFT, 84 for DCT/IDCT), and
// an FFT followed by an IFFT returning the original block.
module tb_dsp_unit;
  import risc_dsp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  dsp_op_e op;
  logic [2:0] mem_addr, host_addr;
  logic mem_we, host_we;
  cplx_t mem_wdata, mem_rdata, host_wdata, host_rdata;
  real xr [8], xi [8];
  int checks = 0, failures = 0;

  localparam real PI = 3.14159265358979;
  localparam real SCALE = 256.0;

  dsp_unit dut (.clk, .rst_n, .start, .op, .busy, .done, .mem_addr, .mem_we, .mem_wdata, .mem_rdata);
  dsp_data_memory #(.DEPTH(8)) u_mem (
    .clk, .risc_dsp(busy), .dsp_addr(mem_addr), .dsp_we(mem_we), .dsp_wdata(mem_wdata),
    .dsp_rdata(mem_rdata), .host_addr, .host_we, .host_wdata, .host_rdata);

  always #5 clk = ~clk;

  function automatic real ck(input int k);
    return (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  task automatic load_block(input int amp);
    for (int n = 0; n < 8; n++) begin
      int r, i;
      r = $urandom_range(0, 2*amp) - amp; i = $urandom_range(0, 2*amp) - amp;
      @(negedge clk);
      host_we = 1; host_addr = 3'(n); host_wdata.re = 16'(r); host_wdata.im = 16'(i);
      xr[n] = real'(r) / SCALE; xi[n] = real'(i) / SCALE;
    end
    @(negedge clk); host_we = 0;
  endtask

  task automatic run(input dsp_op_e o, input int exp_cycles);
    int cycles;
    @(negedge clk); start = 1; op = o;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != exp_cycles) begin failures++; $display("op %s latency %0d", o.name(), cycles); end
    @(negedge clk);
  endtask

  task automatic check_block(input dsp_op_e o);
    for (int k = 0; k < 8; k++) begin
      real er, ei, dr, di;
      er = 0.0; ei = 0.0;
      for (int n = 0; n < 8; n++) begin
        real a;
        case (o)
          DSP_FFT: begin
            a = 2.0*PI*k*n/8.0;
            er += xr[n]*$cos(a) + xi[n]*$sin(a);
            ei += xi[n]*$cos(a) - xr[n]*$sin(a);
          end
          DSP_IFFT: begin
            a = 2.0*PI*k*n/8.0;
            er += (xr[n]*$cos(a) - xi[n]*$sin(a)) / 8.0;
            ei += (xi[n]*$cos(a) + xr[n]*$sin(a)) / 8.0;
          end
          DSP_DCT:  er += 0.5 * ck(k) * xr[n] * $cos((2*n+1) * k * PI / 16.0);
          default:  er += 0.5 * ck(n) * xr[n] * $cos((2*k+1) * n * PI / 16.0);
        endcase
      end
      host_addr = 3'(k); #1;
      dr = real'(host_rdata.re) / SCALE - er;
      di = real'(host_rdata.im) / SCALE - ei;
      checks++;
      if (dr > 3.0/SCALE || dr < -3.0/SCALE || di > 3.0/SCALE || di < -3.0/SCALE) begin
        failures++;
        $display("%s out %0d = (%f,%f) exp (%f,%f)", o.name(), k,
                 real'(host_rdata.re)/SCALE, real'(host_rdata.im)/SCALE, er, ei);
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t orig [8];
    host_we = 0; host_addr = 0; host_wdata = '0; op = DSP_FFT;
    #12 rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      dsp_op_e o;
      o = dsp_op_e'(t % 4);
      load_block(2047);
      run(o, (o == DSP_FFT || o == DSP_IFFT) ? 18 : 84);
      check_block(o);
    end
    // FFT then IFFT gives the block back
    load_block(1024);
    for (int n = 0; n < 8; n++) begin host_addr = 3'(n); #1; orig[n] = host_rdata; end
    run(DSP_FFT, 18);
    run(DSP_IFFT, 18);
    for (int n = 0; n < 8; n++) begin
      int dr, di;
      host_addr = 3'(n); #1;
      dr = int'(host_rdata.re) - int'(orig[n].re);
      di = int'(host_rdata.im) - int'(orig[n].im);
      checks++;
      if (dr > 3 || dr < -3 || di > 3 || di < -3) begin
        failures++; $display("round trip %0d differs by %0d,%0d", n, dr, di);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
