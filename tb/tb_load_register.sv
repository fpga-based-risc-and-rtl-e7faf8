// Self-checking testbench for load_register: random loads and holds against
// a reference copy, plus asynchronous reset.
module tb_load_register;
  logic clk = 0, rst_n = 0, load = 0;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;

  load_register #(.WIDTH(8)) dut (.clk, .rst_n, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 8'h5a;
    #12;
    checks++; if (q !== 8'h00) begin failures++; $display("reset value %h", q); end
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      load = $urandom_range(0, 1);
      d    = 8'($urandom);
      @(posedge clk); #1;
      if (load) model = d;
      checks++;
      if (q !== model) begin failures++; $display("cycle %0d q=%h exp=%h", i, q, model); end
    end
    @(negedge clk); rst_n = 0; #1;
    checks++; if (q !== 8'h00) begin failures++; $display("async reset failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
