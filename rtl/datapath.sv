// Datapath of the RISC core, under the control unit's signals.
// Structure: the general purpose registers R0..R3 and the program counter
// feed MUX1, which drives Bus1. Bus1 loads the ALU operand registers Src Reg
// and Dst Reg. MUX2 puts the ALU result, the memory word or Bus1 on Bus2,
// which loads R0..R3, the instruction register IR and the memory address
// register Add_reg. The RISC memory is read at Add_reg.
// Beyond the registers in the block diagram, a zero-flag register keeps the
// ALU condition of the last ALU instruction, and an 8-bit output register
// keeps the last value written to a general purpose register (the 8-bit
// output of the system). Both are this design's choice.
// Timing: every register loads on the rising edge when its load is high;
// memory reads are asynchronous. Reset is active low and clears all
// registers (not the memory).
module datapath
  import risc_dsp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic [NREGS-1:0]  load_r,      // Load R0..R3
  input  logic              load_ir,
  input  logic              inc_pc,
  input  logic              load_src,
  input  logic              load_dst,
  input  logic              load_add,
  input  logic              load_zero,
  input  sel1_e             sel1,
  input  sel2_e             sel2,
  // status
  output logic [DATA_W-1:0] ir,
  output logic              zero_flag,
  output logic [ADDR_W-1:0] pc,
  output logic [DATA_W-1:0] regs [NREGS],
  output logic [DATA_W-1:0] data_out,
  // program loading
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [DATA_W-1:0] host_wdata
);
  logic [DATA_W-1:0] bus1, bus2, src_q, dst_q, alu_out, mem_out;
  logic [ADDR_W-1:0] add_q;
  logic              alu_zero;

  for (genvar i = 0; i < NREGS; i++) begin : g_gpr
    load_register #(.WIDTH(DATA_W)) u_r (
      .clk, .rst_n, .load(load_r[i]), .d(bus2), .q(regs[i])
    );
  end

  program_counter #(.WIDTH(ADDR_W)) u_pc (.clk, .rst_n, .inc(inc_pc), .pc(pc));

  load_register #(.WIDTH(DATA_W)) u_ir  (.clk, .rst_n, .load(load_ir),  .d(bus2), .q(ir));
  load_register #(.WIDTH(DATA_W)) u_src (.clk, .rst_n, .load(load_src), .d(bus1), .q(src_q));
  load_register #(.WIDTH(DATA_W)) u_dst (.clk, .rst_n, .load(load_dst), .d(bus1), .q(dst_q));
  load_register #(.WIDTH(ADDR_W)) u_add (.clk, .rst_n, .load(load_add), .d(bus2), .q(add_q));
  load_register #(.WIDTH(1))      u_z   (.clk, .rst_n, .load(load_zero), .d(alu_zero), .q(zero_flag));
  load_register #(.WIDTH(DATA_W)) u_out (.clk, .rst_n, .load(|load_r), .d(bus2), .q(data_out));

  mux1 #(.WIDTH(DATA_W)) u_mux1 (
    .sel(sel1), .r0(regs[0]), .r1(regs[1]), .r2(regs[2]), .r3(regs[3]), .pc(pc), .bus1(bus1)
  );

  alu #(.WIDTH(DATA_W)) u_alu (
    .op(opcode_e'(ir[3:0])), .src(src_q), .dst(dst_q), .result(alu_out), .zero(alu_zero)
  );

  mux2 #(.WIDTH(DATA_W)) u_mux2 (
    .sel(sel2), .alu_out(alu_out), .mem_out(mem_out), .bus1(bus1), .bus2(bus2)
  );

  risc_memory #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_mem (
    .clk, .addr(add_q), .rdata(mem_out),
    .host_we, .host_addr, .host_wdata
  );
endmodule
