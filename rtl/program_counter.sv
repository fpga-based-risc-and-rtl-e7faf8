// Program counter: holds the address of the next instruction or data word.
// It starts at zero after reset and counts up by one whenever the control
// unit raises inc (Inc PC); it wraps from all ones to zero.
// Timing: the new value shows one cycle after inc. Reset is active low and
// asynchronous. The design has no jump instructions, so there is no parallel
// load path.
module program_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inc,
  output logic [WIDTH-1:0] pc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   pc <= '0;
    else if (inc) pc <= pc + 1'b1;
  end
endmodule
