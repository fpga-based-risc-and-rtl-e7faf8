// Shared types and constants of the 8-bit RISC & DSP system.
//
// Instruction word (8 bits): [7:6] destination register, [5:4] source
// register, [3:0] opcode. Register field 00..11 selects R0..R3. The sixteen
// opcodes are the instruction set of the design; READ loads the word that
// follows the instruction into the destination register. The four DSP
// opcodes transform the 8-point block held in the DSP data memory.
//
// DSP samples are complex, each part a signed fixed-point number of DSP_W
// bits with 8 fraction bits (Q8.8); this number format, and the Q1.14
// constants below, are this design's choice.
package risc_dsp_pkg;

  localparam int unsigned DATA_W = 8;    // register, bus and memory word width
  localparam int unsigned ADDR_W = 8;    // PC / Add_reg width
  localparam int unsigned NREGS  = 4;    // R0..R3

  typedef enum logic [3:0] {
    OP_OR   = 4'b0000,
    OP_AND  = 4'b0001,
    OP_NAND = 4'b0010,
    OP_NOR  = 4'b0011,
    OP_XOR  = 4'b0100,
    OP_XNOR = 4'b0101,
    OP_ADD  = 4'b0110,
    OP_SUB  = 4'b0111,
    OP_NOT  = 4'b1000,
    OP_INC  = 4'b1001,
    OP_DEC  = 4'b1010,
    OP_FFT  = 4'b1011,
    OP_IFFT = 4'b1100,
    OP_DCT  = 4'b1101,
    OP_IDCT = 4'b1110,
    OP_READ = 4'b1111
  } opcode_e;

  // Bus1 source (MUX1, Sel1)
  typedef enum logic [2:0] {
    SEL1_R0 = 3'd0, SEL1_R1 = 3'd1, SEL1_R2 = 3'd2, SEL1_R3 = 3'd3, SEL1_PC = 3'd4
  } sel1_e;

  // Bus2 source (MUX2, Sel2)
  typedef enum logic [1:0] {
    SEL2_ALU = 2'd0, SEL2_MEM = 2'd1, SEL2_BUS1 = 2'd2
  } sel2_e;

  // Operation requested from the DSP unit
  typedef enum logic [1:0] {
    DSP_FFT = 2'd0, DSP_IFFT = 2'd1, DSP_DCT = 2'd2, DSP_IDCT = 2'd3
  } dsp_op_e;

  // DSP sample format
  localparam int unsigned DSP_W    = 16;
  localparam int unsigned NPOINT   = 8;

  typedef struct packed {
    logic signed [DSP_W-1:0] re;
    logic signed [DSP_W-1:0] im;
  } cplx_t;

  // Constants in Q1.14: cos(pi/4) = sqrt(2)/2 for the twiddle W8^1 and W8^3.
  localparam int unsigned COEF_FRAC = 14;
  localparam logic signed [15:0] COS_PI4_Q14 = 16'sd11585;   // round(0.70710678 * 2^14)

  // Multiply a sample part by a Q1.14 constant, rounding to nearest.
  function automatic logic signed [DSP_W-1:0] mul_q14(input logic signed [DSP_W-1:0] a,
                                                      input logic signed [15:0] c);
    logic signed [DSP_W+15:0] p;
    p = a * c + (DSP_W+16)'(signed'(1 <<< (COEF_FRAC-1)));
    return DSP_W'(p >>> COEF_FRAC);
  endfunction

  // DCT-II basis coefficient a(k,j) = sqrt(2/N) C(k) cos((2j+1) k pi / 2N) for
  // N = 8, in Q1.14. sqrt(2/8) = 1/2, so the values are round(8192 cos(m pi/16))
  // for m = 0..8, with 1/sqrt(2) folded in for k = 0.
  function automatic logic signed [15:0] dct_coef(input int unsigned k, input int unsigned j);
    logic signed [15:0] half_cos [0:8];
    int unsigned m;
    logic neg;
    half_cos[0] = 16'sd8192; half_cos[1] = 16'sd8035; half_cos[2] = 16'sd7568;
    half_cos[3] = 16'sd6811; half_cos[4] = 16'sd5793; half_cos[5] = 16'sd4551;
    half_cos[6] = 16'sd3135; half_cos[7] = 16'sd1598; half_cos[8] = 16'sd0;
    if (k == 0) return 16'sd5793;            // 0.5 / sqrt(2)
    m   = ((2*j + 1) * k) % 32;              // angle in units of pi/16, period 2 pi
    if (m > 16) m = 32 - m;                  // cos(2 pi - t) = cos(t)
    neg = 1'b0;
    if (m > 8) begin                         // cos(pi - t) = -cos(t)
      m   = 16 - m;
      neg = 1'b1;
    end
    return neg ? -half_cos[m] : half_cos[m];
  endfunction

endpackage
