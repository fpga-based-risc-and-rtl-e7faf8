// Control unit: a hardwired Moore state machine that steps the datapath
// through fetch, decode and execute.
//   FETCH1  Bus1 <- PC, Add_reg <- Bus2 (= Bus1)
//   FETCH2  IR <- memory, PC <- PC + 1
//   DECODE  look at IR[3:0] and branch to the execute states
//   EX_SRC  Src Reg <- source register        (ALU instructions)
//   EX_DST  Dst Reg <- destination register
//   EX_WB   destination register <- ALU, zero flag <- ALU condition
//   RD1     Add_reg <- PC                     (READ)
//   RD2     destination register <- memory, PC <- PC + 1
//   DSP1    RISC_DSP high, start the DSP unit (FFT, IFFT, DCT, IDCT)
//   DSP2    RISC_DSP high, wait for the DSP unit's done
// IR[7:6] selects the destination and IR[5:4] the source register.
// The core runs while rd_wb is high; with rd_wb low it finishes the current
// instruction and waits in IDLE before the next fetch, so a host can load
// the memory. Reset (active low) returns to IDLE.
// Timing: an ALU instruction takes 6 cycles, READ 5, a DSP instruction
// 4 + the DSP unit's run. Fetch/decode/execute, the opcodes, rd_wb and
// RISC_DSP are the document's; the state split and cycle counts are this
// design's choice.
module control_unit
  import risc_dsp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_wb,
  input  logic [DATA_W-1:0] ir,
  input  logic              dsp_done,
  output logic [NREGS-1:0]  load_r,
  output logic              load_ir,
  output logic              inc_pc,
  output logic              load_src,
  output logic              load_dst,
  output logic              load_add,
  output logic              load_zero,
  output sel1_e             sel1,
  output sel2_e             sel2,
  output logic              risc_dsp,
  output logic              dsp_start,
  output dsp_op_e           dsp_op,
  output logic              instr_done
);
  typedef enum logic [3:0] {
    S_IDLE, S_FETCH1, S_FETCH2, S_DECODE, S_EX_SRC, S_EX_DST, S_EX_WB,
    S_RD1, S_RD2, S_DSP1, S_DSP2
  } state_e;

  state_e state, next;
  opcode_e op;
  logic [1:0] dst_sel, src_sel;

  assign op      = opcode_e'(ir[3:0]);
  assign dst_sel = ir[7:6];
  assign src_sel = ir[5:4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= next;
  end

  always_comb begin
    next = state;
    unique case (state)
      S_IDLE:   if (rd_wb) next = S_FETCH1;
      S_FETCH1: next = S_FETCH2;
      S_FETCH2: next = S_DECODE;
      S_DECODE: begin
        unique case (op)
          OP_READ:                         next = S_RD1;
          OP_FFT, OP_IFFT, OP_DCT, OP_IDCT: next = S_DSP1;
          default:                         next = S_EX_SRC;
        endcase
      end
      S_EX_SRC: next = S_EX_DST;
      S_EX_DST: next = S_EX_WB;
      S_EX_WB:  next = rd_wb ? S_FETCH1 : S_IDLE;
      S_RD1:    next = S_RD2;
      S_RD2:    next = rd_wb ? S_FETCH1 : S_IDLE;
      S_DSP1:   next = S_DSP2;
      S_DSP2:   if (dsp_done) next = rd_wb ? S_FETCH1 : S_IDLE;
      default:  next = S_IDLE;
    endcase
  end

  always_comb begin
    load_r     = '0;
    load_ir    = 1'b0;
    inc_pc     = 1'b0;
    load_src   = 1'b0;
    load_dst   = 1'b0;
    load_add   = 1'b0;
    load_zero  = 1'b0;
    sel1       = SEL1_PC;
    sel2       = SEL2_BUS1;
    risc_dsp   = 1'b0;
    dsp_start  = 1'b0;
    instr_done = 1'b0;
    unique case (state)
      S_FETCH1, S_RD1: begin
        sel1     = SEL1_PC;
        sel2     = SEL2_BUS1;
        load_add = 1'b1;
      end
      S_FETCH2: begin
        sel2    = SEL2_MEM;
        load_ir = 1'b1;
        inc_pc  = 1'b1;
      end
      S_EX_SRC: begin
        sel1     = sel1_e'({1'b0, src_sel});
        load_src = 1'b1;
      end
      S_EX_DST: begin
        sel1     = sel1_e'({1'b0, dst_sel});
        load_dst = 1'b1;
      end
      S_EX_WB: begin
        sel2            = SEL2_ALU;
        load_r[dst_sel] = 1'b1;
        load_zero       = 1'b1;
        instr_done      = 1'b1;
      end
      S_RD2: begin
        sel2            = SEL2_MEM;
        load_r[dst_sel] = 1'b1;
        inc_pc          = 1'b1;
        instr_done      = 1'b1;
      end
      S_DSP1: begin
        risc_dsp  = 1'b1;
        dsp_start = 1'b1;
      end
      S_DSP2: begin
        risc_dsp   = 1'b1;
        instr_done = dsp_done;
      end
      default: ;
    endcase
  end

  always_comb begin
    unique case (op)
      OP_IFFT: dsp_op = DSP_IFFT;
      OP_DCT:  dsp_op = DSP_DCT;
      OP_IDCT: dsp_op = DSP_IDCT;
      default: dsp_op = DSP_FFT;
    endcase
  end
endmodule
