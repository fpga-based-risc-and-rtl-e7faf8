// Register with a load enable. Used for the general purpose registers
// R0..R3, the instruction register, the ALU operand registers (Src Reg,
// Dst Reg) and the memory address register (Add_reg).
// Interface: d is captured into q on the rising clock edge when load is high.
// Timing: one cycle from load to q. Reset (active low, asynchronous) clears
// q; the document gives the low-active reset, the asynchronous form is this
// design's choice.
module load_register #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end
endmodule
