// Self-checking testbench for mux2: every Sel2 code with random inputs.
module tb_mux2;
  import risc_dsp_pkg::*;
  sel2_e sel;
  logic [7:0] alu_out, mem_out, bus1, bus2, exp_v;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(8)) dut (.sel, .alu_out, .mem_out, .bus1, .bus2);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 150; i++) begin
      alu_out = 8'($urandom); mem_out = 8'($urandom); bus1 = 8'($urandom);
      sel = sel2_e'(i % 3);
      #1;
      case (i % 3)
        0: exp_v = alu_out;
        1: exp_v = mem_out;
        default: exp_v = bus1;
      endcase
      checks++;
      if (bus2 !== exp_v) begin failures++; $display("sel %0d bus2=%h exp=%h", i % 3, bus2, exp_v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
