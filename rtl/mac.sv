// Multiply-accumulate unit: acc <= acc + a*b in one clock cycle, or
// acc <= a*b when clear is high (starts a new sum). en gates both.
// a is a signed sample, b a signed coefficient; acc is wide enough for
// 8 products without overflow (ACC_W >= A_W + B_W + 3). A single-cycle MAC
// in the datapath is what the document names as the key DSP feature; the
// widths are this design's choice.
module mac #(
  parameter int unsigned A_W   = 16,
  parameter int unsigned B_W   = 16,
  parameter int unsigned ACC_W = 35
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clear,
  input  logic signed [A_W-1:0]   a,
  input  logic signed [B_W-1:0]   b,
  output logic signed [ACC_W-1:0] acc
);
  logic signed [A_W+B_W-1:0] prod;
  assign prod = a * b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (en) begin
      if (clear)    acc <= ACC_W'(prod);
      else          acc <= acc + ACC_W'(prod);
    end
  end
endmodule
