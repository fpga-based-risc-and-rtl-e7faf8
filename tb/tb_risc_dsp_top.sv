// End-to-end testbench for risc_dsp_top at its default parameters.
// It loads a program into the RISC memory while rd_wb is low: first the
// example program (READ of 10000001, 11100001, 00001001, 11111111 into
// R0..R3, then OR, AND, NAND, NOR, AND), then instructions that use every
// other opcode, a zero result, and the four DSP operations on the ramp
// block x(n) = n, n = 0..7, in the DSP data memory, then random ALU and
// READ instructions. An instruction-set model runs in lockstep and, at
// every instr_done, checks R0..R3, PC, IR, the zero flag, data_out and the
// instruction's length in cycles (ALU 6, READ 5, FFT/IFFT 22, DCT/IDCT 88).
// After each DSP operation the block is checked against the transform in
// real arithmetic; the FFT of the ramp must give X0 = 28 and
// Xk = -4 + j4cot(k pi/8). Finally rd_wb is pulled low to check that the
// core stops and then resumes. Each mechanism is counted and must occur.
module tb_risc_dsp_top;
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

  risc_dsp_top dut (.clk, .rst_n, .rd_wb, .prog_we, .prog_addr, .prog_wdata,
                    .dsp_host_addr, .dsp_host_we, .dsp_host_wdata, .dsp_host_rdata,
                    .data_out, .regs, .pc, .ir, .zero_flag, .risc_dsp, .instr_done);

  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979;
  localparam real SCALE = 256.0;

  int checks = 0, failures = 0;
  int op_count [16];
  int zero_count = 0, hold_count = 0, risc_dsp_cycles = 0;

  logic [7:0] mem [256];
  logic [7:0] m_regs [4];
  logic [7:0] m_pc, m_out;
  logic m_zero;
  real br [8], bi [8];        // model of the DSP block

  function automatic logic [7:0] alu_model(input logic [3:0] o, input logic [7:0] s, input logic [7:0] d);
    case (o)
      4'd0: return d | s;
      4'd1: return d & s;
      4'd2: return ~(d & s);
      4'd3: return ~(d | s);
      4'd4: return d ^ s;
      4'd5: return ~(d ^ s);
      4'd6: return 8'(int'(d) + int'(s));
      4'd7: return 8'(int'(d) - int'(s));
      4'd8: return ~s;
      4'd9: return 8'(int'(s) + 1);
      default: return 8'(int'(s) - 1);
    endcase
  endfunction

  function automatic real ck(input int k);
    return (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  // Compare the DSP block with the transform of the model block, then take
  // the hardware values as the new model block.
  task automatic check_dsp(input logic [3:0] opc);
    real er [8], ei [8];
    for (int k = 0; k < 8; k++) begin
      er[k] = 0.0; ei[k] = 0.0;
      for (int n = 0; n < 8; n++) begin
        real a;
        a = 2.0*PI*k*n/8.0;
        case (opc)
          4'b1011: begin er[k] += br[n]*$cos(a) + bi[n]*$sin(a); ei[k] += bi[n]*$cos(a) - br[n]*$sin(a); end
          4'b1100: begin er[k] += (br[n]*$cos(a) - bi[n]*$sin(a)) / 8.0; ei[k] += (bi[n]*$cos(a) + br[n]*$sin(a)) / 8.0; end
          4'b1101: er[k] += 0.5 * ck(k) * br[n] * $cos((2*n+1) * k * PI / 16.0);
          default: er[k] += 0.5 * ck(n) * br[n] * $cos((2*k+1) * n * PI / 16.0);
        endcase
      end
    end
    for (int k = 0; k < 8; k++) begin
      real dr, di;
      dsp_host_addr = 3'(k); #0.1;
      dr = real'(dsp_host_rdata.re) / SCALE - er[k];
      di = real'(dsp_host_rdata.im) / SCALE - ei[k];
      checks++;
      if (dr > 3.0/SCALE || dr < -3.0/SCALE || di > 3.0/SCALE || di < -3.0/SCALE) begin
        failures++;
        $display("DSP op %b out %0d = (%f,%f) exp (%f,%f)", opc, k,
                 real'(dsp_host_rdata.re)/SCALE, real'(dsp_host_rdata.im)/SCALE, er[k], ei[k]);
      end
      br[k] = real'(dsp_host_rdata.re) / SCALE;
      bi[k] = real'(dsp_host_rdata.im) / SCALE;
    end
  endtask

  // One instruction of the model; returns its expected length in cycles.
  function automatic int model_step(output logic [3:0] opc);
    logic [7:0] instr, res;
    logic [1:0] d, s;
    instr = mem[m_pc]; m_pc++;
    opc = instr[3:0]; d = instr[7:6]; s = instr[5:4];
    if (opc == 4'b1111) begin
      m_regs[d] = mem[m_pc]; m_out = mem[m_pc]; m_pc++;
      return 5;
    end else if (opc >= 4'b1011) begin
      return (opc <= 4'b1100) ? 22 : 88;
    end else begin
      res = alu_model(opc, m_regs[s], m_regs[d]);
      m_regs[d] = res; m_out = res; m_zero = (res == 8'h00);
      return 6;
    end
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (risc_dsp) risc_dsp_cycles++;

  initial begin
    int a, cyc, exp_len, n_instr;
    logic [3:0] opc;
    logic [7:0] tail [];
    // --- program -------------------------------------------------------
    // example program
    tail = '{8'b00001111, 8'b10000001, 8'b01001111, 8'b11100001, 8'b10001111, 8'b00001001,
             8'b11001111, 8'b11111111, 8'b00010000, 8'b10110001, 8'b01000010, 8'b11000011,
             8'b11100001,
    // remaining ALU opcodes, a zero result, then the DSP operations
             8'b00_01_0100, 8'b01_10_0101, 8'b10_11_0110, 8'b11_00_0111, 8'b00_01_1000,
             8'b01_10_1001, 8'b10_11_1010, 8'b11_11_0111,
             8'b00_00_1011, 8'b00_01_0110, 8'b00_00_1100, 8'b01_10_0100,
             8'b00_00_1101, 8'b10_11_0001, 8'b00_00_1110, 8'b11_00_0000};
    for (int i = 0; i < 256; i++) mem[i] = 8'h00;
    foreach (tail[i]) mem[i] = tail[i];
    a = tail.size();
    while (a < 250) begin
      logic [7:0] instr;
      instr = {2'($urandom), 2'($urandom), 4'($urandom_range(0, 11))};
      if (instr[3:0] == 4'd11) instr[3:0] = 4'b1111;
      mem[a] = instr; a++;
      if (instr[3:0] == 4'b1111) begin mem[a] = 8'($urandom); a++; end
    end
    dsp_host_wdata = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_wdata = mem[i];
    end
    for (int n = 0; n < 8; n++) begin
      @(negedge clk); prog_we = 0;
      dsp_host_we = 1; dsp_host_addr = 3'(n);
      dsp_host_wdata.re = 16'(n * 256); dsp_host_wdata.im = '0;
      br[n] = n; bi[n] = 0.0;
    end
    @(negedge clk); dsp_host_we = 0;
    for (int i = 0; i < 4; i++) m_regs[i] = 0;
    m_pc = 0; m_zero = 0; m_out = 0;
    // --- run ------------------------------------------------------------
    rd_wb = 1;
    cyc = 0;
    n_instr = 0;
    while (m_pc < 8'd240) begin
      @(negedge clk); cyc++;
      if (instr_done) begin
        @(posedge clk); #1;    // the instruction's last write lands on this edge
        exp_len = model_step(opc);
        op_count[opc]++;
        n_instr++;
        checks++;
        if (cyc != exp_len) begin failures++; $display("instr %0d op %b took %0d cycles, exp %0d", n_instr, opc, cyc, exp_len); end
        checks++;
        if (pc !== m_pc || ir[3:0] !== opc || data_out !== m_out || zero_flag !== m_zero ||
            regs[0] !== m_regs[0] || regs[1] !== m_regs[1] || regs[2] !== m_regs[2] || regs[3] !== m_regs[3]) begin
          failures++;
          $display("instr %0d op %b: pc=%h/%h out=%h/%h z=%b/%b R=%h %h %h %h / %h %h %h %h", n_instr, opc,
                   pc, m_pc, data_out, m_out, zero_flag, m_zero, regs[0], regs[1], regs[2], regs[3],
                   m_regs[0], m_regs[1], m_regs[2], m_regs[3]);
        end
        if (opc < 4'b1011 && m_zero) zero_count++;
        // register values of the example program after its last instruction
        if (n_instr == 9) begin
          checks++;
          if (regs[0] !== 8'b11100001 || regs[2] !== 8'b00001001) begin
            failures++; $display("example program: R0=%b R2=%b", regs[0], regs[2]);
          end
        end
        if (opc >= 4'b1011 && opc <= 4'b1110) begin
          check_dsp(opc);
          if (opc == 4'b1011) begin
            // the ramp's spectrum: 28, -4+j9.657, -4+j4, -4+j1.657, -4, ...
            real expi [8];
            expi = '{0.0, 9.657, 4.0, 1.657, 0.0, -1.657, -4.0, -9.657};
            for (int k = 0; k < 8; k++) begin
              real er;
              er = (k == 0) ? 28.0 : -4.0;
              checks++;
              if (br[k] - er > 0.02 || er - br[k] > 0.02 || bi[k] - expi[k] > 0.02 || expi[k] - bi[k] > 0.02) begin
                failures++; $display("ramp FFT X%0d = (%f,%f)", k, br[k], bi[k]);
              end
            end
          end
        end
        cyc = 0;
      end
    end
    // --- rd_wb low: the core stops after the current instruction ---------
    rd_wb = 0;
    do @(negedge clk); while (!instr_done);
    @(posedge clk); #1;
    void'(model_step(opc));
    op_count[opc]++;
    begin
      logic [7:0] pc_hold;
      pc_hold = pc;
      repeat (10) begin
        @(negedge clk);
        checks++;
        if (pc !== pc_hold || instr_done) failures++;
        hold_count++;
      end
      checks++;
      if (pc !== m_pc) begin failures++; $display("stopped at pc %h exp %h", pc, m_pc); end
    end
    rd_wb = 1;
    do @(negedge clk); while (!instr_done);
    @(posedge clk); #1;
    void'(model_step(opc));
    checks++;
    if (pc !== m_pc || regs[0] !== m_regs[0] || regs[1] !== m_regs[1] || regs[2] !== m_regs[2] || regs[3] !== m_regs[3]) begin
      failures++; $display("resume failed pc %h exp %h", pc, m_pc);
    end
    // --- every mechanism happened ---------------------------------------
    for (int o = 0; o < 16; o++) begin
      checks++;
      if (op_count[o] == 0) begin failures++; $display("opcode %b never executed", o); end
    end
    checks++; if (zero_count == 0)      begin failures++; $display("zero flag never set"); end
    checks++; if (hold_count == 0)      begin failures++; $display("rd_wb hold never seen"); end
    checks++; if (risc_dsp_cycles == 0) begin failures++; $display("RISC_DSP never raised"); end
    $display("instructions=%0d zero results=%0d RISC_DSP cycles=%0d", n_instr, zero_count, risc_dsp_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
