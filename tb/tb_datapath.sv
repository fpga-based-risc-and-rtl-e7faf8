// Self-checking testbench for datapath. The testbench plays the control
// unit: it loads a random program of ALU and READ instructions into the
// memory, then drives the load and select signals of fetch and execute
// step by step, and checks IR, PC, R0..R3, the zero flag and data_out
// against its own model of the instruction set after every instruction.
module tb_datapath;
  import risc_dsp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] load_r;
  logic load_ir, inc_pc, load_src, load_dst, load_add, load_zero;
  sel1_e sel1;
  sel2_e sel2;
  logic [7:0] ir, pc, data_out;
  logic [7:0] regs [4];
  logic zero_flag;
  logic host_we;
  logic [7:0] host_addr, host_wdata;
  logic [7:0] prog [256];
  logic [7:0] m_regs [4];
  logic [7:0] m_pc, m_out;
  logic m_zero;
  int checks = 0, failures = 0;

  datapath dut (.clk, .rst_n, .load_r, .load_ir, .inc_pc, .load_src, .load_dst, .load_add,
                .load_zero, .sel1, .sel2, .ir, .zero_flag, .pc, .regs, .data_out,
                .host_we, .host_addr, .host_wdata);

  always #5 clk = ~clk;

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

  task automatic idle_ctl();
    load_r = '0; load_ir = 0; inc_pc = 0; load_src = 0; load_dst = 0; load_add = 0; load_zero = 0;
    sel1 = SEL1_PC; sel2 = SEL2_BUS1;
  endtask

  task automatic step();
    @(posedge clk); #1; idle_ctl();
  endtask

  task automatic compare(input string tag);
    checks++;
    if (pc !== m_pc || zero_flag !== m_zero || data_out !== m_out ||
        regs[0] !== m_regs[0] || regs[1] !== m_regs[1] || regs[2] !== m_regs[2] || regs[3] !== m_regs[3]) begin
      failures++;
      $display("%s: pc=%h/%h z=%b/%b out=%h/%h R=%h %h %h %h / %h %h %h %h", tag, pc, m_pc, zero_flag, m_zero,
               data_out, m_out, regs[0], regs[1], regs[2], regs[3], m_regs[0], m_regs[1], m_regs[2], m_regs[3]);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] instr;
    int a;
    idle_ctl();
    host_we = 0; host_addr = 0; host_wdata = 0;
    // random program: READs (instruction + data word) and ALU operations
    a = 0;
    while (a < 255) begin
      instr = {2'($urandom), 2'($urandom), 4'($urandom_range(0, 11))};
      if (instr[3:0] == 4'd11) instr[3:0] = 4'b1111;
      prog[a] = instr; a++;
      if (instr[3:0] == 4'b1111) begin prog[a] = 8'($urandom); a++; end
    end
    prog[255] = 8'h00;
    #12 rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); host_we = 1; host_addr = 8'(i); host_wdata = prog[i];
    end
    @(negedge clk); host_we = 0;
    for (int i = 0; i < 4; i++) m_regs[i] = 0;
    m_pc = 0; m_zero = 0; m_out = 0;
    compare("reset");
    while (m_pc < 8'd250) begin
      // fetch
      sel1 = SEL1_PC; sel2 = SEL2_BUS1; load_add = 1; step();
      sel2 = SEL2_MEM; load_ir = 1; inc_pc = 1; step();
      instr = prog[m_pc]; m_pc++;
      checks++;
      if (ir !== instr) begin failures++; $display("IR=%h exp %h", ir, instr); end
      if (instr[3:0] == 4'b1111) begin
        sel1 = SEL1_PC; sel2 = SEL2_BUS1; load_add = 1; step();
        sel2 = SEL2_MEM; load_r[instr[7:6]] = 1; inc_pc = 1; step();
        m_regs[instr[7:6]] = prog[m_pc]; m_out = prog[m_pc]; m_pc++;
      end else begin
        logic [7:0] res;
        sel1 = sel1_e'({1'b0, instr[5:4]}); load_src = 1; step();
        sel1 = sel1_e'({1'b0, instr[7:6]}); load_dst = 1; step();
        sel2 = SEL2_ALU; load_r[instr[7:6]] = 1; load_zero = 1; step();
        res = alu_model(instr[3:0], m_regs[instr[5:4]], m_regs[instr[7:6]]);
        m_regs[instr[7:6]] = res; m_out = res; m_zero = (res == 0);
      end
      compare($sformatf("instr %b", instr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
