// 8-point 1-D DCT and IDCT engine built around one multiply-accumulate unit.
//   DCT : X(k) = sqrt(2/8) C(k) sum_j y(j) cos((2j+1) k pi / 16)
//   IDCT: y(j) = sqrt(2/8) sum_k C(k) X(k) cos((2j+1) k pi / 16)
// with C(0) = 1/sqrt2 and C(k) = 1 otherwise; both transforms share the
// coefficient table a(k,j) (Q1.14, from risc_dsp_pkg::dct_coef), the IDCT
// reading it transposed. The definitions are the document's; the MAC-based
// serial structure is this design's choice.
// Interface: x holds the 8 real input samples (Q8.8) and must stay stable
// from start until done. A one-cycle start pulse, with inverse selecting the
// IDCT, starts a run; done pulses for one cycle when y holds the 8 results,
// rounded to Q8.8 and kept until the next run. Results saturate to the
// 16-bit range.
// Timing: one MAC per cycle, 8 per output; done is high after the 66th
// clock edge counted from the edge that samples start.
module dct8
  import risc_dsp_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    inverse,
  input  logic signed [DSP_W-1:0] x [8],
  output logic signed [DSP_W-1:0] y [8],
  output logic                    busy,
  output logic                    done
);
  localparam int unsigned ACC_W = 2*DSP_W + 3;

  logic signed [15:0] coef_rom [64];
  always_comb begin
    for (int k = 0; k < 8; k++)
      for (int j = 0; j < 8; j++)
        coef_rom[k*8+j] = dct_coef(k, j);
  end

  logic [2:0]  o_idx, i_idx;       // output and input index of the current MAC
  logic        running;
  logic        store;              // acc holds the finished sum of store_idx
  logic [2:0]  store_idx;
  logic        inv_q;
  logic signed [ACC_W-1:0] acc;
  logic signed [15:0]      coef;

  assign coef = inv_q ? coef_rom[{i_idx, o_idx}] : coef_rom[{o_idx, i_idx}];

  mac #(.A_W(DSP_W), .B_W(16), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n,
    .en   (running),
    .clear(i_idx == 3'd0),
    .a    (x[i_idx]),
    .b    (coef),
    .acc  (acc)
  );

  // Round the Q9.22 sum to Q8.8 and saturate.
  function automatic logic signed [DSP_W-1:0] to_sample(input logic signed [ACC_W-1:0] s);
    logic signed [ACC_W-1:0] r;
    r = (s + ACC_W'(1 << (COEF_FRAC-1))) >>> COEF_FRAC;
    if (r > ACC_W'(2**(DSP_W-1) - 1))        return {1'b0, {(DSP_W-1){1'b1}}};
    else if (r < -ACC_W'(2**(DSP_W-1)))      return {1'b1, {(DSP_W-1){1'b0}}};
    else                                     return r[DSP_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_idx     <= '0;
      i_idx     <= '0;
      running   <= 1'b0;
      store     <= 1'b0;
      store_idx <= '0;
      inv_q     <= 1'b0;
      done      <= 1'b0;
      for (int n = 0; n < 8; n++) y[n] <= '0;
    end else begin
      done  <= 1'b0;
      store <= running && (i_idx == 3'd7);
      store_idx <= o_idx;
      if (store) begin
        y[store_idx] <= to_sample(acc);
        if (store_idx == 3'd7) done <= 1'b1;
      end
      if (start && !running) begin
        running <= 1'b1;
        inv_q   <= inverse;
        o_idx   <= '0;
        i_idx   <= '0;
      end else if (running) begin
        i_idx <= i_idx + 1'b1;
        if (i_idx == 3'd7) begin
          o_idx <= o_idx + 1'b1;
          if (o_idx == 3'd7) running <= 1'b0;
        end
      end
    end
  end

  assign busy = running || store;
endmodule
