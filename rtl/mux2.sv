// MUX2: drives Bus2 with the ALU result, the word read from memory or the
// value on Bus1, chosen by Sel2. Bus2 feeds the registers and Add_reg.
// Purely combinational. The unused Sel2 code drives zero. The inputs follow
// the system's block diagram; the select encoding (sel2_e) is this design's
// choice.
module mux2
  import risc_dsp_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  sel2_e            sel,
  input  logic [WIDTH-1:0] alu_out,
  input  logic [WIDTH-1:0] mem_out,
  input  logic [WIDTH-1:0] bus1,
  output logic [WIDTH-1:0] bus2
);
  always_comb begin
    unique case (sel)
      SEL2_ALU:  bus2 = alu_out;
      SEL2_MEM:  bus2 = mem_out;
      SEL2_BUS1: bus2 = bus1;
      default:   bus2 = '0;
    endcase
  end
endmodule
