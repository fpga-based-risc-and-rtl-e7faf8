// Workload testbench: the 13-word example program of the design (four READs
// into R0..R3 of 10000001, 11100001, 00001001, 11111111, then OR R0,R1;
// AND R2,R3; NAND R1,R0; NOR R3,R0; AND R3,R2), followed by one FFT
// instruction on the ramp x(n) = n in the DSP data memory.
// Checked: PC is 1 after the first fetch and 2 after the first READ with
// R0 = 10000001; R0 = 11100001 after the OR at address 8 (PC 9); the final
// registers R0 = 11100001, R1 = 00011110, R2 = 00001001, R3 = 00000000;
// and the spectrum (28,0), (-4,9.657), (-4,4), (-4,1.657), (-4,0),
// (-4,-1.657), (-4,-4), (-4,-9.657) within 0.02.
module tb_example_program;
  import risc_dsp_pkg::*;
  logic clk = 0, rst_n = 0, rd_wb = 0;
  logic prog_we = 0;
  logic [7:0] prog_addr = 0, prog_wdata = 0;
  logic [2:0] dsp_host_addr = 0;
  logic dsp_host_we = 0;
  cplx_t dsp_host_wdata, dsp_host_rdata;
  logic [7:0] data_out, pc, ir;
  logic [7:0] regs [4];
  logic zero_flag, risc_dsp, instr_done;
  int checks = 0, failures = 0;

  risc_dsp_top dut (.clk, .rst_n, .rd_wb, .prog_we, .prog_addr, .prog_wdata,
                    .dsp_host_addr, .dsp_host_we, .dsp_host_wdata, .dsp_host_rdata,
                    .data_out, .regs, .pc, .ir, .zero_flag, .risc_dsp, .instr_done);

  always #5 clk = ~clk;

  task automatic expect8(input string what, input logic [7:0] got, input logic [7:0] want);
    checks++;
    if (got !== want) begin failures++; $display("%s = %b, expected %b", what, got, want); end
  endtask

  task automatic next_instr();
    do @(negedge clk); while (!instr_done);
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] prog_words [14];
    real exp_re [8], exp_im [8];
    prog_words = '{8'b00001111, 8'b10000001, 8'b01001111, 8'b11100001, 8'b10001111, 8'b00001001,
                8'b11001111, 8'b11111111, 8'b00010000, 8'b10110001, 8'b01000010, 8'b11000011,
                8'b11100001, 8'b00001011};
    exp_re = '{28.0, -4.0, -4.0, -4.0, -4.0, -4.0, -4.0, -4.0};
    exp_im = '{0.0, 9.657, 4.0, 1.657, 0.0, -1.657, -4.0, -9.657};
    dsp_host_wdata = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_wdata = (i < 14) ? prog_words[i] : 8'h00;
    end
    for (int n = 0; n < 8; n++) begin
      @(negedge clk); prog_we = 0;
      dsp_host_we = 1; dsp_host_addr = 3'(n);
      dsp_host_wdata.re = 16'(n * 256); dsp_host_wdata.im = '0;
    end
    @(negedge clk); dsp_host_we = 0;
    expect8("PC after reset", pc, 8'd0);
    rd_wb = 1;
    // first fetch: PC moves to 1 once IR holds 00001111
    do @(negedge clk); while (ir !== 8'b00001111);
    expect8("PC after first fetch", pc, 8'd1);
    next_instr();
    expect8("PC after first READ", pc, 8'd2);
    expect8("R0 after first READ", regs[0], 8'b10000001);
    repeat (3) next_instr();
    expect8("PC after the READs", pc, 8'd8);
    next_instr();
    expect8("PC after OR", pc, 8'd9);
    expect8("R0 after OR R0,R1", regs[0], 8'b11100001);
    repeat (4) next_instr();
    expect8("R0", regs[0], 8'b11100001);
    expect8("R1", regs[1], 8'b00011110);
    expect8("R2", regs[2], 8'b00001001);
    expect8("R3", regs[3], 8'b00000000);
    expect8("data_out", data_out, 8'b00000000);
    next_instr();   // FFT
    expect8("PC after FFT", pc, 8'd14);
    for (int k = 0; k < 8; k++) begin
      real gr, gi;
      dsp_host_addr = 3'(k); #1;
      gr = real'(dsp_host_rdata.re) / 256.0;
      gi = real'(dsp_host_rdata.im) / 256.0;
      checks++;
      if (gr - exp_re[k] > 0.02 || exp_re[k] - gr > 0.02 || gi - exp_im[k] > 0.02 || exp_im[k] - gi > 0.02) begin
        failures++; $display("X%0d = (%f,%f)", k, gr, gi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
