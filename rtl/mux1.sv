// MUX1: drives Bus1 with one of the general purpose registers R0..R3 or the
// program counter, chosen by Sel1. Purely combinational. An unused Sel1
// code drives zero. The inputs follow the system's block diagram; the
// select encoding (sel1_e) is this design's choice.
module mux1
  import risc_dsp_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  sel1_e            sel,
  input  logic [WIDTH-1:0] r0,
  input  logic [WIDTH-1:0] r1,
  input  logic [WIDTH-1:0] r2,
  input  logic [WIDTH-1:0] r3,
  input  logic [WIDTH-1:0] pc,
  output logic [WIDTH-1:0] bus1
);
  always_comb begin
    unique case (sel)
      SEL1_R0: bus1 = r0;
      SEL1_R1: bus1 = r1;
      SEL1_R2: bus1 = r2;
      SEL1_R3: bus1 = r3;
      SEL1_PC: bus1 = pc;
      default: bus1 = '0;
    endcase
  end
endmodule
