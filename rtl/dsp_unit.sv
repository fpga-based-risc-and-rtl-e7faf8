// DSP unit: runs one of the four DSP operations (FFT, IFFT, DCT, IDCT) on
// the 8-point block in the DSP data memory and writes the result back to
// the same 8 locations.
// How it works: after a one-cycle start pulse with op, a small FSM reads the
// 8 samples into a local buffer (LOAD, one word per cycle), computes the
// transform (COMPUTE) and writes the 8 results back (STORE, one word per
// cycle), then pulses done. The FFT and IFFT are combinational (fft8,
// ifft8) and take one cycle in COMPUTE; the DCT and IDCT use the serial
// MAC engine dct8, work on the real parts only and write zero imaginary
// parts.
// Timing: done is high 8 + 1 + 8 + 1 = 18 cycles after start for FFT/IFFT
// (load, compute, store, done) and 8 + 1 + 66 + 8 + 1 = 84 cycles for
// DCT/IDCT, where 66 is the dct8 run. mem_* is the DSP side of the DSP data
// memory.
// The operations are the document's; the in-place block processing, the
// sequencing and the number format are this design's choice.
module dsp_unit
  import risc_dsp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  dsp_op_e op,
  output logic    busy,
  output logic    done,
  // DSP data memory port
  output logic [2:0] mem_addr,
  output logic       mem_we,
  output cplx_t      mem_wdata,
  input  cplx_t      mem_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_COMPUTE, S_WAIT_DCT, S_STORE, S_DONE} state_e;
  state_e state;

  dsp_op_e op_q;
  logic [2:0] cnt;
  cplx_t buf_in [8];
  cplx_t res    [8];
  cplx_t fft_y  [8], ifft_y [8];

  logic signed [DSP_W-1:0] dct_x [8], dct_y [8];
  logic dct_start, dct_busy, dct_done;

  fft8  u_fft  (.x(buf_in), .y(fft_y));
  ifft8 u_ifft (.x(buf_in), .y(ifft_y));

  always_comb begin
    for (int i = 0; i < 8; i++) dct_x[i] = buf_in[i].re;
  end

  dct8 u_dct (
    .clk, .rst_n,
    .start  (dct_start),
    .inverse(op_q == DSP_IDCT),
    .x      (dct_x),
    .y      (dct_y),
    .busy   (dct_busy),
    .done   (dct_done)
  );

  assign dct_start = (state == S_COMPUTE) && (op_q == DSP_DCT || op_q == DSP_IDCT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      op_q  <= DSP_FFT;
      cnt   <= '0;
      for (int i = 0; i < 8; i++) begin
        buf_in[i] <= '0;
        res[i]    <= '0;
      end
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          op_q  <= op;
          cnt   <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          buf_in[cnt] <= mem_rdata;
          cnt <= cnt + 1'b1;
          if (cnt == 3'd7) state <= S_COMPUTE;
        end
        S_COMPUTE: begin
          if (op_q == DSP_FFT) begin
            res   <= fft_y;
            state <= S_STORE;
          end else if (op_q == DSP_IFFT) begin
            res   <= ifft_y;
            state <= S_STORE;
          end else begin
            state <= S_WAIT_DCT;
          end
        end
        S_WAIT_DCT: if (dct_done) begin
          for (int i = 0; i < 8; i++) begin
            res[i].re <= dct_y[i];
            res[i].im <= '0;
          end
          state <= S_STORE;
        end
        S_STORE: begin
          cnt <= cnt + 1'b1;
          if (cnt == 3'd7) state <= S_DONE;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign mem_addr  = cnt;
  assign mem_we    = (state == S_STORE);
  assign mem_wdata = res[cnt];
  assign done      = (state == S_DONE);
  assign busy      = (state != S_IDLE) || dct_busy;
endmodule
