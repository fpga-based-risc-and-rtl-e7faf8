// Self-checking testbench for program_counter: reset to zero, increment only
// on inc, wrap-around from 255 to 0.
module tb_program_counter;
  logic clk = 0, rst_n = 0, inc = 0;
  logic [7:0] pc;
  logic [7:0] model;
  int checks = 0, failures = 0;

  program_counter #(.WIDTH(8)) dut (.clk, .rst_n, .inc, .pc);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++; if (pc !== 8'd0) failures++;
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      inc = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (inc) model = model + 8'd1;
      checks++;
      if (pc !== model) begin failures++; $display("cycle %0d pc=%0d exp=%0d", i, pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
