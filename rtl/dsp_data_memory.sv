// DSP data memory: holds one block of NPOINT complex samples that the DSP
// operations read and overwrite with their result. Two ports with one
// owner at a time: when risc_dsp is high (a DSP instruction is running) the
// DSP unit owns the memory, otherwise an outside host does. Each owner has
// a synchronous write and an asynchronous read. The RISC_DSP select is the
// document's; one block, in-place update and the host port are this
// design's choice.
module dsp_data_memory
  import risc_dsp_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     risc_dsp,
  // DSP unit port
  input  logic [$clog2(DEPTH)-1:0] dsp_addr,
  input  logic                     dsp_we,
  input  cplx_t                    dsp_wdata,
  output cplx_t                    dsp_rdata,
  // host port
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  logic                     host_we,
  input  cplx_t                    host_wdata,
  output cplx_t                    host_rdata
);
  cplx_t mem [DEPTH];

  logic [$clog2(DEPTH)-1:0] addr;
  logic                     we;
  cplx_t                    wdata;

  always_comb begin
    addr  = risc_dsp ? dsp_addr  : host_addr;
    we    = risc_dsp ? dsp_we    : host_we;
    wdata = risc_dsp ? dsp_wdata : host_wdata;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign dsp_rdata  = mem[dsp_addr];
  assign host_rdata = mem[host_addr];
endmodule
