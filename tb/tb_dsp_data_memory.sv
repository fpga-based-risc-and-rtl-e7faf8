// Self-checking testbench for dsp_data_memory: the host port writes when
// RISC_DSP is low, the DSP port when it is high, and the port that does
// not own the memory cannot write.
module tb_dsp_data_memory;
  import risc_dsp_pkg::*;
  logic clk = 0, risc_dsp = 0;
  logic [2:0] dsp_addr = 0, host_addr = 0;
  logic dsp_we = 0, host_we = 0;
  cplx_t dsp_wdata, dsp_rdata, host_wdata, host_rdata;
  cplx_t model [8];
  int checks = 0, failures = 0;

  dsp_data_memory #(.DEPTH(8)) dut (.clk, .risc_dsp, .dsp_addr, .dsp_we, .dsp_wdata, .dsp_rdata,
                                    .host_addr, .host_we, .host_wdata, .host_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dsp_wdata = '0; host_wdata = '0;
    for (int a = 0; a < 8; a++) begin
      @(negedge clk);
      host_we = 1; host_addr = 3'(a); host_wdata = cplx_t'($urandom); model[a] = host_wdata;
    end
    @(negedge clk); host_we = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      risc_dsp   = $urandom_range(0, 1);
      dsp_we     = $urandom_range(0, 1);
      host_we    = $urandom_range(0, 1);
      dsp_addr   = 3'($urandom);
      host_addr  = 3'($urandom);
      dsp_wdata  = cplx_t'($urandom);
      host_wdata = cplx_t'($urandom);
      #1;
      checks += 2;
      if (dsp_rdata !== model[dsp_addr]) begin failures++; $display("dsp read %0d", dsp_addr); end
      if (host_rdata !== model[host_addr]) begin failures++; $display("host read %0d", host_addr); end
      @(posedge clk);
      if (risc_dsp && dsp_we) model[dsp_addr] = dsp_wdata;
      if (!risc_dsp && host_we) model[host_addr] = host_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
