# 8-bit RISC core with an 8-point FFT/DCT engine

This is a small teaching-scale processor that combines two ideas. The first is a
register-based RISC core: fixed-length 8-bit instructions, four general purpose
registers and a hardwired control unit. The second is a DSP subsystem that the
same instruction stream drives. Eleven opcodes are ordinary logic and arithmetic
operations and one loads a constant. The remaining four opcodes run an 8-point
FFT, inverse FFT, DCT or inverse DCT on a block of samples kept in a separate
DSP data memory.

Everything is synthesizable SystemVerilog. The top module is `risc_dsp_top`.

## Instruction word and instruction set

```
  7     6 5     4 3           0
 +-------+-------+-------------+
 |  dst  |  src  |   opcode    |
 +-------+-------+-------------+
```

`dst` and `src` select R0..R3 (`00`..`11`).

| opcode | instruction | effect                            |
|--------|-------------|-----------------------------------|
| 0000   | OR          | dst = dst \| src                  |
| 0001   | AND         | dst = dst & src                   |
| 0010   | NAND        | dst = ~(dst & src)                |
| 0011   | NOR         | dst = ~(dst \| src)               |
| 0100   | XOR         | dst = dst ^ src                   |
| 0101   | XNOR        | dst = ~(dst ^ src)                |
| 0110   | ADD         | dst = dst + src (mod 256)         |
| 0111   | SUBTRACT    | dst = dst - src (mod 256)         |
| 1000   | NOT         | dst = ~src                        |
| 1001   | INCREMENT   | dst = src + 1                     |
| 1010   | DECREMENT   | dst = src - 1                     |
| 1011   | FFT         | DSP block = FFT(DSP block)        |
| 1100   | IFFT        | DSP block = IFFT(DSP block)       |
| 1101   | DCT         | DSP block = DCT(real parts)       |
| 1110   | IDCT        | DSP block = IDCT(real parts)      |
| 1111   | READ        | dst = next memory word; PC skips it |

- The ALU instructions also update a zero flag, which is set when the result is zero.
- DSP instructions ignore the register fields.
- There are no jumps and no stores. A program runs straight through memory, and
  the PC wraps from 255 to 0.

The opcode table, the field layout and the READ semantics are the published
ones. These points are this design's own choices:
- the operand order of SUBTRACT;
- the use of `src` as the operand of NOT, INCREMENT and DECREMENT;
- what the DSP instructions do with their data (see below).

## How an instruction runs

The control unit (`control_unit`) is a Moore FSM. It steps the datapath through
separate fetch, decode and execute states. There is no pipelining: one
instruction finishes before the next is fetched.

| state  | action                                         | used by    |
|--------|------------------------------------------------|------------|
| FETCH1 | Bus1 = PC, Add_reg <- Bus2 (= Bus1)            | all        |
| FETCH2 | IR <- mem[Add_reg], PC <- PC+1                 | all        |
| DECODE | branch on IR[3:0]                              | all        |
| EX_SRC | Src Reg <- R[src] (via Bus1)                   | ALU ops    |
| EX_DST | Dst Reg <- R[dst]                              | ALU ops    |
| EX_WB  | R[dst] <- ALU, zero flag <- ALU zero           | ALU ops    |
| RD1    | Add_reg <- PC                                  | READ       |
| RD2    | R[dst] <- mem[Add_reg], PC <- PC+1             | READ       |
| DSP1   | RISC_DSP = 1, start DSP unit                   | DSP ops    |
| DSP2   | RISC_DSP = 1, wait for DSP done                | DSP ops    |

Instruction lengths are as follows:

| instruction | cycles |
|-------------|--------|
| ALU         | 6      |
| READ        | 5      |
| FFT, IFFT   | 22     |
| DCT, IDCT   | 88     |

`instr_done` is high in the last cycle of each instruction. The register write
of that instruction lands on the clock edge that ends the cycle.

### Datapath

`datapath` is built around two buses:

```
 R0..R3, PC --> MUX1 (Sel1) --> Bus1 --+--> Src Reg --+
                                       +--> Dst Reg --+--> ALU --+
                                       |                         |
 RISC memory[Add_reg] -----------------+-----> MUX2 (Sel2) <-----+
                                               |
                                              Bus2 --> R0..R3, IR, Add_reg
```

- All storage is `load_register` instances, except the PC (`program_counter`,
  which only increments) and the memory (`risc_memory`).
- The memory has 256 words of 8 bits, read asynchronously at Add_reg. It holds
  instructions and READ constants side by side.
- Two registers are extras of this design: the zero flag, and an output register
  `data_out` that holds the last value written to any of R0..R3. The latter is
  the system's 8-bit output.

## The DSP subsystem

### Memory ownership: RISC_DSP

`dsp_data_memory` holds one block of 8 complex samples. Each sample is 32 bits:
16-bit real and imaginary parts in Q8.8 (signed, 8 fraction bits).

The memory has two ports, and the control unit's RISC_DSP signal picks which one
may write:
- While a DSP instruction runs (RISC_DSP = 1), the DSP unit owns it.
- Otherwise the host port at the top level owns it. The host loads input samples
  and reads results through this port.
- Reads on both ports are asynchronous and always allowed.

### Sequencing

`dsp_unit` works in three phases after a start pulse:
1. It copies the 8 samples into a local buffer, one per cycle.
2. It computes the transform.
3. It writes the 8 results back to the same addresses, one per cycle. The
   operation is in place.

`done` comes 18 cycles after start for FFT/IFFT and 84 cycles after start for
DCT/IDCT.

### FFT: 2-point to 4-point to 8-point

The FFT is radix-2 decimation-in-time. It is built up recursively, and all of it
is combinational:

- `fft2` is a butterfly without twiddle: x0+x1 and x0-x1.
- `fft4` uses two `fft2` on the even and odd samples. It then combines them with
  W4^1 = -j, which only swaps and negates parts, so it is exact.
- `fft8` uses two `fft4` and then a last stage with W8^0..W8^3:
  - W8^2 = -j is exact.
  - W8^1 and W8^3 need cos(pi/4). This is held as the Q1.14 constant 11585, and
    each product is rounded.

This even/odd recursion computes the same thing as the usual three-stage
8-point flow graph with bit-reversed inputs. The ports of `fft8` are in natural
order.

Numeric limits:
- No stage scales, so outputs can be up to 8 times the largest input. Inputs
  must stay below 16.0 in magnitude, or the result wraps.
- The error against an exact DFT is at most a few LSB (1 LSB = 1/256).

Example: the ramp 0, 1, ..., 7 gives X0 = 28 and Xk = -4 + j4cot(k pi/8). That is
(-4, 9.657), (-4, 4), (-4, 1.657), (-4, 0) and the conjugates. The hardware
reproduces these within 0.02.

### IFFT

`ifft8` does not have its own butterflies. It computes
IDFT(X) = conj(DFT(conj X)) / 8 with a second `fft8` instance:
- The imaginary parts are negated on the way in and on the way out.
- The result is divided by 8 with an arithmetic shift, which truncates toward
  minus infinity.

An FFT followed by an IFFT returns the block within 3 LSB.

### DCT and IDCT

`dct8` evaluates the orthonormal 8-point DCT-II and its inverse:

```
X(k) = 1/2 C(k) sum_j y(j) cos((2j+1) k pi / 16)
y(j) = 1/2 sum_k C(k) X(k) cos((2j+1) k pi / 16),  C(0) = 1/sqrt2, else 1
```

It does not use a fast algorithm. It is a serial engine around one single-cycle
multiply-accumulate unit (`mac`), doing 8 MACs per output and 64 per transform.

- The 64 coefficients a(k,j) come from one table of nine values, round(8192
  cos(m pi/16)) for m = 0..8, folded by the cosine's symmetries. For k = 0 the
  value is 0.5/sqrt2. This is done by the function `dct_coef` in
  `risc_dsp_pkg`.
- The IDCT reads the same table transposed.
- Results are rounded from the 35-bit accumulator to Q8.8 and saturated.
- Only the real parts of the block are used, and the imaginary parts of the
  result are written as zero.

## Using the top level

| port | meaning |
|------|---------|
| `clk`, `rst_n` | clock; active-low asynchronous reset. Reset clears PC, IR, R0..R3, the flags and all FSMs, but not the memories. |
| `rd_wb` | run enable. The core leaves IDLE and fetches while it is high. When it goes low, the current instruction completes and the core waits in IDLE. |
| `prog_we`, `prog_addr`, `prog_wdata` | write port of the RISC memory. Use it while the core is idle. |
| `dsp_host_*` | host port of the DSP data memory. It writes only while no DSP instruction runs. |
| `data_out`, `regs`, `pc`, `ir`, `zero_flag`, `risc_dsp`, `instr_done` | observation outputs |

A typical session:
1. Hold `rd_wb` low after reset.
2. Write the program from address 0.
3. Write the 8 input samples to the DSP memory.
4. Raise `rd_wb`.

`tb/tb_example_program.sv` is the smallest complete example. It runs a 13-word
program: READ 10000001, 11100001, 00001001 and 11111111 into R0..R3, then OR,
AND, NAND, NOR and AND. It ends with R0 = 11100001, R1 = 00011110, R2 = 00001001
and R3 = 0. Then one FFT instruction transforms the ramp.

## Where this design departs from, or adds to, its source

- **Instruction width.** The source describes the system in two places as having
  a 20-bit instruction: a 4-bit opcode plus two 8-bit register fields. Its
  detailed instruction format and its example program use the 8-bit word
  described above. This RTL implements the 8-bit form. The 20-bit variant is
  not described in enough detail to build.
- **Operation count.** The count is given both as 15 and as 16 operations. The
  opcode table has 16 entries including READ, and all 16 are implemented.
- **Choices made here.** The source says nothing about the following, and each
  was chosen for this design:
  - where DSP results go (written back in place);
  - the sample number format (Q8.8);
  - how memories are loaded (host ports);
  - the DCT length (8, matching the FFT);
  - the DCT structure (serial MAC);
  - the IFFT structure (conjugation through the FFT).
- **Only the FFT has a detailed design.** Its structure (2-point into 4-point
  into 8-point) follows the source. The IFFT, DCT and IDCT are given there only
  as formulas.
- **Condition signal.** The ALU's condition signal is described as going back
  to the control unit. No instruction branches, so here it is stored as a zero
  flag and brought out.
- **No PC load.** A "Load PC" control exists in the block diagram, but with no
  jump instruction nothing would drive it, so the PC only increments.
- **No pipelining.** The general RISC discussion mentions overlapping fetch,
  decode and execute. The system itself is described, and built here, as a
  sequential fetch-decode-execute machine.

## Files

| file | content |
|------|---------|
| `rtl/risc_dsp_pkg.sv` | widths, opcode/select enums, complex sample struct, Q1.14 helpers, DCT coefficients |
| `rtl/risc_dsp_top.sv` | top level |
| `rtl/control_unit.sv` | fetch/decode/execute FSM |
| `rtl/datapath.sv` | registers, buses, ALU, RISC memory |
| `rtl/load_register.sv`, `rtl/program_counter.sv`, `rtl/mux1.sv`, `rtl/mux2.sv`, `rtl/alu.sv`, `rtl/risc_memory.sv` | datapath parts |
| `rtl/dsp_unit.sv` | DSP sequencer |
| `rtl/dsp_data_memory.sv` | DSP block memory with RISC_DSP ownership |
| `rtl/fft2.sv`, `rtl/fft4.sv`, `rtl/fft8.sv`, `rtl/ifft8.sv` | transforms |
| `rtl/dct8.sv`, `rtl/mac.sv` | DCT/IDCT engine |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_example_program.sv` | the example program and ramp FFT |

## Verification

Every module has a self-checking testbench. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- The reference values are computed independently in the testbench. DFT, IDFT,
  DCT and IDCT use `real` arithmetic with tolerances of 2 to 3 LSB. The ALU and
  registers are checked against small models.
- The DSP and control testbenches also check latencies in cycles.
- `tb_risc_dsp_top` runs the whole system at its default parameters:
  - the example program, every other opcode and all four DSP operations on the
    ramp, then about 200 random instructions;
  - an instruction-set model running in lockstep, which checks every register,
    PC, flag and instruction length;
  - a pause and resume through `rd_wb`.

  It counts each mechanism (every opcode, a zero result, the `rd_wb` hold and the
  RISC_DSP hand-over) and fails if any of them never happened.

To simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/risc_dsp_pkg.sv tb/tb_risc_dsp_top.sv --top-module tb_risc_dsp_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other module's test. The code uses
two-state-safe resets, so every register that is read is initialised.
