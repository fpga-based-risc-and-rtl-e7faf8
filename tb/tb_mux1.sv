// Self-checking testbench for mux1: every Sel1 code with random register
// and PC values.
module tb_mux1;
  import risc_dsp_pkg::*;
  sel1_e sel;
  logic [7:0] r0, r1, r2, r3, pc, bus1, exp_v;
  int checks = 0, failures = 0;

  mux1 #(.WIDTH(8)) dut (.sel, .r0, .r1, .r2, .r3, .pc, .bus1);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      r0 = 8'($urandom); r1 = 8'($urandom); r2 = 8'($urandom); r3 = 8'($urandom);
      pc = 8'($urandom);
      sel = sel1_e'(i % 5);
      #1;
      case (i % 5)
        0: exp_v = r0;
        1: exp_v = r1;
        2: exp_v = r2;
        3: exp_v = r3;
        default: exp_v = pc;
      endcase
      checks++;
      if (bus1 !== exp_v) begin failures++; $display("sel %0d bus1=%h exp=%h", i % 5, bus1, exp_v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
