// Self-checking testbench for mac: random sequences of clear/accumulate,
// one product per cycle, against a 64-bit integer model.
module tb_mac;
  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  logic signed [15:0] a, b;
  logic signed [34:0] acc;
  longint model;
  int checks = 0, failures = 0;

  mac #(.A_W(16), .B_W(16), .ACC_W(35)) dut (.clk, .rst_n, .en, .clear, .a, .b, .acc);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0; model = 0;
    #12 rst_n = 1;
    checks++; if (acc !== 0) failures++;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 7) != 0);
      clear = (i % 8 == 0);
      a = 16'($urandom); b = 16'($urandom);
      @(posedge clk); #1;
      if (en) model = clear ? longint'(a) * longint'(b) : model + longint'(a) * longint'(b);
      checks++;
      if (longint'(acc) !== model) begin failures++; $display("cycle %0d acc=%0d exp=%0d", i, acc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
