// 8-bit RISC & DSP system: a small RISC core with four general purpose
// registers and a 16-instruction set (eleven arithmetic/logic operations,
// READ, and four DSP operations) plus a DSP subsystem that computes an
// 8-point FFT, IFFT, DCT or IDCT on a block held in its own data memory.
// The control unit fetches an 8-bit instruction from the RISC memory at
// PC, decodes its opcode (bits 3:0) and either runs it on the datapath or,
// for a DSP opcode, raises RISC_DSP to hand the DSP data memory to the DSP
// unit and waits until the transform has been written back.
// Interface: rst_n is the active-low reset; the core runs while rd_wb is
// high. While rd_wb is low (after reset, or once the current instruction
// ends) a host may write the program with prog_*; the DSP data memory is
// reached through dsp_host_* whenever no DSP instruction runs. data_out is
// the 8-bit output: the last value written to a register. The registers,
// PC, IR and zero flag are brought out for observation; instr_done pulses
// at the end of each instruction.
// Lint note: the bus-ownership assertion below samples rst_n synchronously
// (disable iff) while the flops use it as an asynchronous reset; the mixed
// use is intended and only affects the assertion.
module risc_dsp_top
  import risc_dsp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_wb,
  // program loading
  input  logic              prog_we,
  input  logic [ADDR_W-1:0] prog_addr,
  input  logic [DATA_W-1:0] prog_wdata,
  // DSP data memory, host side
  input  logic [2:0]        dsp_host_addr,
  input  logic              dsp_host_we,
  input  cplx_t             dsp_host_wdata,
  output cplx_t             dsp_host_rdata,
  // observation
  output logic [DATA_W-1:0] data_out,
  output logic [DATA_W-1:0] regs [NREGS],
  output logic [ADDR_W-1:0] pc,
  output logic [DATA_W-1:0] ir,
  output logic              zero_flag,
  output logic              risc_dsp,
  output logic              instr_done
);
  logic [NREGS-1:0] load_r;
  logic load_ir, inc_pc, load_src, load_dst, load_add, load_zero;
  sel1_e sel1;
  sel2_e sel2;
  logic dsp_start, dsp_done, dsp_busy;
  dsp_op_e dsp_op;

  logic [2:0] dsp_mem_addr;
  logic       dsp_mem_we;
  cplx_t      dsp_mem_wdata, dsp_mem_rdata;

  control_unit u_cu (
    .clk, .rst_n, .rd_wb, .ir, .dsp_done,
    .load_r, .load_ir, .inc_pc, .load_src, .load_dst, .load_add, .load_zero,
    .sel1, .sel2, .risc_dsp, .dsp_start, .dsp_op, .instr_done
  );

  datapath u_dp (
    .clk, .rst_n,
    .load_r, .load_ir, .inc_pc, .load_src, .load_dst, .load_add, .load_zero,
    .sel1, .sel2,
    .ir, .zero_flag, .pc, .regs, .data_out,
    .host_we(prog_we), .host_addr(prog_addr), .host_wdata(prog_wdata)
  );

  dsp_unit u_dsp (
    .clk, .rst_n,
    .start(dsp_start), .op(dsp_op), .busy(dsp_busy), .done(dsp_done),
    .mem_addr(dsp_mem_addr), .mem_we(dsp_mem_we),
    .mem_wdata(dsp_mem_wdata), .mem_rdata(dsp_mem_rdata)
  );

  dsp_data_memory #(.DEPTH(NPOINT)) u_dmem (
    .clk, .risc_dsp,
    .dsp_addr(dsp_mem_addr), .dsp_we(dsp_mem_we),
    .dsp_wdata(dsp_mem_wdata), .dsp_rdata(dsp_mem_rdata),
    .host_addr(dsp_host_addr), .host_we(dsp_host_we),
    .host_wdata(dsp_host_wdata), .host_rdata(dsp_host_rdata)
  );

  // The DSP unit may only be busy while RISC_DSP gives it the DSP data
  // memory, i.e. while the control unit runs a DSP instruction.
  assert property (@(posedge clk) disable iff (!rst_n) dsp_busy |-> risc_dsp)
    else $error("DSP unit busy outside a DSP instruction");
endmodule
