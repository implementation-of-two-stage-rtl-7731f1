// dfir_polyphase: second filter stage, the order-7 equiripple low-pass
// H(z) merged with decimation by M = 4 in polyphase form.
//
// H removes the pass-band images left by the interpolated first stage
// (pass band 4.14 MHz, stop band from 8.42 MHz at 40 Msps). Only every
// M-th filter output is kept, so the filter is split into M polyphase
// branches E_p(z) with coefficients h[p], h[p+M], ... (two taps each for
// 8 taps and M = 4), and the arithmetic runs once per output sample,
// i.e. at 10 Msps instead of 40 Msps.
//
// Structure: a commutator (2-bit phase counter) collects M input samples
// in a block buffer. When the last sample of a block arrives, the block
// and the previous blocks are latched into the history registers
// hist[k] = x[n-k] (n = index of that last sample). On the next clock each
// branch p, a small distributed-arithmetic core, forms
// h[p]*x[n-p] + h[p+M]*x[n-p-M]; the branch sums are added, rounded to a
// Q1.15 sample, saturated and registered.
//
// Output: y[m] = sum_k h[k] * x[M*m + M-1 - k], i.e. the full-rate filter
// output at every input whose index is M-1 modulo M (counted from reset).
//
// Interface and timing: in_valid/in_data accept at most one sample per
// clock; out_valid pulses for one clock one cycle after each M-th accepted
// sample. `reset` (asynchronous, active high) clears the history and the
// phase. The polyphase decomposition follows the design; the output
// phase, widths, rounding, handshake and reset are this design's own.
module dfir_polyphase #(
  parameter int DATA_W = fir_pkg::DATA_W,
  parameter int COEF_W = fir_pkg::COEF_W,
  parameter int TAPS   = fir_pkg::H_TAPS,
  parameter int M      = fir_pkg::DECIM_M,
  parameter logic signed [COEF_W-1:0] COEF [TAPS] = fir_pkg::H_COEF,
  parameter int OUT_W  = fir_pkg::DATA_W,
  parameter int SHIFT  = fir_pkg::COEF_FRAC
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_data,
  output logic                     out_sat     // this output was clamped
);

  localparam int SUB   = (TAPS + M - 1) / M;          // taps per branch
  localparam int HIST  = SUB * M;                      // history length
  localparam int BR_W  = DATA_W + COEF_W + $clog2(SUB) + 1;
  localparam int ACC_W = BR_W + $clog2(M) + 1;
  localparam int PH_W  = (M > 1) ? $clog2(M) : 1;

  typedef logic signed [COEF_W-1:0] bcoef_t [SUB];

  // Coefficients of branch p: h[p], h[p+M], ... (zero past the end).
  function automatic bcoef_t branch_coef(int p);
    bcoef_t c;
    for (int s = 0; s < SUB; s++)
      c[s] = (p + s * M < TAPS) ? COEF[p + s * M] : '0;
    return c;
  endfunction

  initial begin
    assert (M >= 1 && TAPS >= 1)
      else $error("dfir_polyphase: M and TAPS must be positive");
  end

  // Commutator and block buffer.
  logic [PH_W-1:0]          phase;
  logic signed [DATA_W-1:0] blk  [M];      // blk[c] = sample of phase c
  logic signed [DATA_W-1:0] hist [HIST];   // hist[k] = x[n-k]
  logic                     block_done;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      phase      <= '0;
      block_done <= 1'b0;
      for (int c = 0; c < M; c++)    blk[c]  <= '0;
      for (int k = 0; k < HIST; k++) hist[k] <= '0;
    end else begin
      block_done <= 1'b0;
      if (in_valid) begin
        blk[phase] <= in_data;
        if (phase == PH_W'(M - 1)) begin
          phase      <= '0;
          block_done <= 1'b1;
          // Newest block: x[n] = in_data, x[n-k] = blk[M-1-k].
          hist[0] <= in_data;
          for (int k = 1; k < M; k++)    hist[k] <= blk[M-1-k];
          // Older blocks move down by one block.
          for (int k = M; k < HIST; k++) hist[k] <= hist[k-M];
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

  // Polyphase branches, evaluated once per block.
  logic signed [BR_W-1:0] br_out [M];

  for (genvar p = 0; p < M; p++) begin : g_branch
    logic signed [DATA_W-1:0] bx [SUB];
    always_comb begin
      for (int s = 0; s < SUB; s++) bx[s] = hist[p + s * M];
    end
    da_fir_core #(
      .NTAPS(SUB), .DATA_W(DATA_W), .COEF_W(COEF_W), .PART(SUB),
      .COEF(branch_coef(p)), .ACC_W(BR_W)
    ) u_da (
      .x(bx),
      .y(br_out[p])
    );
  end

  logic signed [ACC_W-1:0] acc;
  always_comb begin
    acc = '0;
    for (int p = 0; p < M; p++) acc += ACC_W'(br_out[p]);
  end

  logic signed [OUT_W-1:0] q;
  logic                    q_sat;

  round_sat #(.IN_W(ACC_W), .OUT_W(OUT_W), .SHIFT(SHIFT)) u_rq (
    .din(acc), .dout(q), .sat(q_sat)
  );

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sat   <= 1'b0;
    end else begin
      out_valid <= block_done;
      if (block_done) begin
        out_data <= q;
        out_sat  <= q_sat;
      end
    end
  end

endmodule
