// Self-checking testbench for alu: all eleven ALU opcodes with random
// operands against an independent model, the zero flag, and the worked
// values of the example program (OR of 10000001 and 11100001 = 11100001).
module tb_alu;
  import risc_dsp_pkg::*;
  opcode_e op;
  logic [7:0] src, dst, result, exp_v;
  logic zero;
  int checks = 0, failures = 0;

  alu #(.WIDTH(8)) dut (.op, .src, .dst, .result, .zero);

  function automatic logic [7:0] model(input int o, input logic [7:0] s, input logic [7:0] d);
    int unsigned su = s, du = d;
    case (o)
      0:  return d | s;
      1:  return d & s;
      2:  return ~(d & s);
      3:  return ~(d | s);
      4:  return d ^ s;
      5:  return ~(d ^ s);
      6:  return 8'((du + su) % 256);
      7:  return 8'((du + 256 - su) % 256);
      8:  return 8'(255 - su);
      9:  return 8'((su + 1) % 256);
      10: return 8'((su + 255) % 256);
      default: return 8'h00;
    endcase
  endfunction

  task automatic check(input int o, input logic [7:0] s, input logic [7:0] d);
    op = opcode_e'(o); src = s; dst = d;
    #1;
    exp_v = model(o, s, d);
    checks++;
    if (result !== exp_v || zero !== (exp_v == 0)) begin
      failures++;
      $display("op %0d src=%h dst=%h result=%h zero=%b exp=%h", o, s, d, result, zero, exp_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 16; o++)
      for (int i = 0; i < 40; i++)
        check(o, 8'($urandom), 8'($urandom));
    // corner cases
    check(6, 8'hff, 8'h01);   // ADD wraps to zero
    check(7, 8'h05, 8'h05);   // SUB gives zero
    check(9, 8'hff, 8'h00);   // INC wraps
    check(10, 8'h00, 8'h00);  // DEC wraps to ff
    check(0, 8'b11100001, 8'b10000001);
    checks++;
    if (result !== 8'b11100001) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
