// Self-checking testbench for control_unit. For every opcode and random
// register fields it follows one instruction cycle by cycle and checks the
// control signals of each step: fetch (Add_reg <- PC, then IR <- memory and
// Inc PC), decode, and the execute steps of ALU, READ and DSP instructions,
// including the instruction length (6, 5 and 4 + DSP wait cycles), the
// RISC_DSP signal, the DSP operation code, and the hold while rd_wb is low.
module tb_control_unit;
  import risc_dsp_pkg::*;
  logic clk = 0, rst_n = 0, rd_wb = 0, dsp_done = 0;
  logic [7:0] ir;
  logic [3:0] load_r;
  logic load_ir, inc_pc, load_src, load_dst, load_add, load_zero, risc_dsp, dsp_start, instr_done;
  sel1_e sel1;
  sel2_e sel2;
  dsp_op_e dsp_op;
  int checks = 0, failures = 0;

  control_unit dut (.clk, .rst_n, .rd_wb, .ir, .dsp_done, .load_r, .load_ir, .inc_pc,
                    .load_src, .load_dst, .load_add, .load_zero, .sel1, .sel2,
                    .risc_dsp, .dsp_start, .dsp_op, .instr_done);

  always #5 clk = ~clk;

  // Compare the packed control word with the expectation for this cycle.
  task automatic expect_ctl(input string step, input logic [3:0] lr, input logic lir, input logic ipc,
                            input logic lsrc, input logic ldst, input logic ladd, input logic lz,
                            input logic rdsp, input logic dst, input logic idone);
    checks++;
    if (load_r !== lr || load_ir !== lir || inc_pc !== ipc || load_src !== lsrc ||
        load_dst !== ldst || load_add !== ladd || load_zero !== lz || risc_dsp !== rdsp ||
        dsp_start !== dst || instr_done !== idone) begin
      failures++;
      $display("%s ir=%b: load_r=%b ir=%b inc=%b src=%b dst=%b add=%b z=%b rdsp=%b start=%b done=%b",
               step, ir, load_r, load_ir, inc_pc, load_src, load_dst, load_add, load_zero,
               risc_dsp, dsp_start, instr_done);
    end
  endtask

  task automatic one_instr(input logic [7:0] instr);
    logic [3:0] opc;
    logic [1:0] d, s;
    int waitc;
    opc = instr[3:0]; d = instr[7:6]; s = instr[5:4];
    // FETCH1 (we are at a negedge inside it)
    expect_ctl("fetch1", 4'b0, 0, 0, 0, 0, 1, 0, 0, 0, 0);
    checks++; if (sel1 !== SEL1_PC || sel2 !== SEL2_BUS1) failures++;
    @(negedge clk);
    expect_ctl("fetch2", 4'b0, 1, 1, 0, 0, 0, 0, 0, 0, 0);
    checks++; if (sel2 !== SEL2_MEM) failures++;
    ir = instr;                                   // IR loads at this edge
    @(negedge clk);
    expect_ctl("decode", 4'b0, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    @(negedge clk);
    if (opc == 4'b1111) begin
      expect_ctl("read1", 4'b0, 0, 0, 0, 0, 1, 0, 0, 0, 0);
      checks++; if (sel1 !== SEL1_PC || sel2 !== SEL2_BUS1) failures++;
      @(negedge clk);
      expect_ctl("read2", 4'(1 << d), 0, 1, 0, 0, 0, 0, 0, 0, 1);
      checks++; if (sel2 !== SEL2_MEM) failures++;
    end else if (opc >= 4'b1011) begin
      expect_ctl("dsp1", 4'b0, 0, 0, 0, 0, 0, 0, 1, 1, 0);
      checks++;
      if (dsp_op !== dsp_op_e'(opc - 4'b1011)) begin failures++; $display("dsp_op %0d for %b", dsp_op, opc); end
      waitc = $urandom_range(1, 5);
      for (int w = 0; w < waitc; w++) begin
        @(negedge clk);
        expect_ctl("dsp2", 4'b0, 0, 0, 0, 0, 0, 0, 1, 0, 0);
      end
      @(negedge clk);
      dsp_done = 1; #1;
      expect_ctl("dsp2 done", 4'b0, 0, 0, 0, 0, 0, 0, 1, 0, 1);
      @(negedge clk);
      dsp_done = 0;
      return;
    end else begin
      expect_ctl("ex_src", 4'b0, 0, 0, 1, 0, 0, 0, 0, 0, 0);
      checks++; if (sel1 !== sel1_e'({1'b0, s})) failures++;
      @(negedge clk);
      expect_ctl("ex_dst", 4'b0, 0, 0, 0, 1, 0, 0, 0, 0, 0);
      checks++; if (sel1 !== sel1_e'({1'b0, d})) failures++;
      @(negedge clk);
      expect_ctl("ex_wb", 4'(1 << d), 0, 0, 0, 0, 0, 1, 0, 0, 1);
      checks++; if (sel2 !== SEL2_ALU) failures++;
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ir = '0;
    #12 rst_n = 1;
    // held in IDLE while rd_wb is low
    repeat (3) begin
      @(negedge clk);
      expect_ctl("idle", 4'b0, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    end
    rd_wb = 1;
    @(negedge clk);
    for (int t = 0; t < 200; t++) one_instr({2'($urandom), 2'($urandom), 4'(t % 16)});
    // rd_wb low: the running instruction ends, then the unit waits
    rd_wb = 0;
    one_instr(8'b0001_0110);
    repeat (4) begin
      @(negedge clk);
      expect_ctl("hold", 4'b0, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
