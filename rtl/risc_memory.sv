// RISC memory: one RAM holding the program and its data (instructions and
// the words that READ instructions load). Read is asynchronous from the
// address held in Add_reg, so the word is on Bus2's memory input in the
// cycle after Add_reg is loaded. A synchronous write port lets an outside
// host load the program while the core is held (rd_wb low); the core itself
// never writes, as the instruction set has no store. 2^ADDR_W words of
// DATA_W bits; the size follows from the 8-bit program counter, the
// asynchronous read and the host port are this design's choice.
module risc_memory #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] rdata,
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [DATA_W-1:0] host_wdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
  end

  assign rdata = mem[addr];
endmodule
