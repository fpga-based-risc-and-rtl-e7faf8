// Arithmetic logic unit of the RISC core. Combinational.
// Two-operand operations combine the destination operand (Dst Reg) with the
// source operand (Src Reg) and the result is written back to the
// destination register: OR, AND, NAND, NOR, XOR, XNOR, ADD, SUBTRACT
// (dst - src). One-operand operations NOT, INCREMENT and DECREMENT work on
// the source operand. Additions wrap modulo 2^WIDTH. The opcodes follow the
// instruction set table; the operand order of SUBTRACT and the choice of the
// source register as operand of one-operand operations are this design's.
// zero is the condition signal returned to the control unit: high when the
// result is zero. DSP and READ opcodes are not ALU operations and give 0.
module alu
  import risc_dsp_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  opcode_e          op,
  input  logic [WIDTH-1:0] src,
  input  logic [WIDTH-1:0] dst,
  output logic [WIDTH-1:0] result,
  output logic             zero
);
  always_comb begin
    unique case (op)
      OP_OR:   result = dst | src;
      OP_AND:  result = dst & src;
      OP_NAND: result = ~(dst & src);
      OP_NOR:  result = ~(dst | src);
      OP_XOR:  result = dst ^ src;
      OP_XNOR: result = ~(dst ^ src);
      OP_ADD:  result = dst + src;
      OP_SUB:  result = dst - src;
      OP_NOT:  result = ~src;
      OP_INC:  result = src + 1'b1;
      OP_DEC:  result = src - 1'b1;
      default: result = '0;
    endcase
    zero = (result == '0);
  end
endmodule
