// Self-checking testbench for risc_memory: host writes to every address,
// asynchronous reads back, and overwrites.
module tb_risc_memory;
  logic clk = 0;
  logic [7:0] addr, rdata, host_addr, host_wdata;
  logic host_we = 0;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  risc_memory #(.DATA_W(8), .ADDR_W(8)) dut (.clk, .addr, .rdata, .host_we, .host_addr, .host_wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0; host_addr = 0; host_wdata = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      host_we = 1; host_addr = 8'(a); host_wdata = 8'($urandom); model[a] = host_wdata;
    end
    @(negedge clk); host_we = 0;
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("addr %0d rdata=%h exp=%h", a, rdata, model[a]); end
    end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      host_we = $urandom_range(0, 1); host_addr = 8'($urandom); host_wdata = 8'($urandom);
      addr = 8'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("read %0d rdata=%h exp=%h", addr, rdata, model[addr]); end
      @(posedge clk);
      if (host_we) model[host_addr] = host_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
