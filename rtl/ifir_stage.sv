// ifir_stage: first filter stage, the interpolated FIR I(z) = G(z^L).
//
// G is an order-29 equiripple low-pass prototype designed with all band
// edges multiplied by L = 3 (pass band 12.42 MHz, stop band 14.64 MHz at
// 40 Msps). Replacing every unit delay of G by L delays compresses its
// response by L: the main pass band ends at 4.14 MHz with a steep
// transition to 4.88 MHz, at the price of images of the pass band
// around multiples of fs/L, which the second stage removes.
//
// Structure: a delay line of (G_TAPS-1)*L+1 = 88 samples; only every L-th
// position carries a non-zero coefficient, so the 30 taps line[0],
// line[L], ..., line[29*L] feed a distributed-arithmetic core that holds
// the 30 prototype coefficients. The product sum is rounded to a Q1.15
// sample and saturated.
//
// Interface and timing: one sample per clock at most. A sample presented
// with in_valid at a rising edge enters the delay line on that edge; its
// filtered output appears with out_valid one clock later (latency 1).
// Gaps in in_valid simply hold the delay line. `reset` (asynchronous,
// active high) clears the delay line. The structure follows the design;
// the widths, the rounding, the handshake and the reset are this
// design's own choices.
module ifir_stage #(
  parameter int DATA_W = fir_pkg::DATA_W,
  parameter int COEF_W = fir_pkg::COEF_W,
  parameter int TAPS   = fir_pkg::G_TAPS,     // prototype taps
  parameter int L      = fir_pkg::IFIR_L,     // interpolation factor
  parameter logic signed [COEF_W-1:0] COEF [TAPS] = fir_pkg::G_COEF,
  parameter int PART   = fir_pkg::DA_PART,
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

  localparam int LINE  = (TAPS - 1) * L + 1;
  localparam int ACC_W = DATA_W + COEF_W + $clog2(TAPS) + 1;

  // line[0] is the newest sample, line[k] the sample k inputs older.
  logic signed [DATA_W-1:0] line [LINE];
  logic                     line_new;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      for (int k = 0; k < LINE; k++) line[k] <= '0;
      line_new <= 1'b0;
    end else begin
      line_new <= in_valid;
      if (in_valid) begin
        line[0] <= in_data;
        for (int k = 1; k < LINE; k++) line[k] <= line[k-1];
      end
    end
  end

  // Only every L-th position of the line has a coefficient.
  logic signed [DATA_W-1:0] taps [TAPS];
  always_comb begin
    for (int k = 0; k < TAPS; k++) taps[k] = line[k * L];
  end

  logic signed [ACC_W-1:0] acc;

  da_fir_core #(
    .NTAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .PART(PART),
    .COEF(COEF), .ACC_W(ACC_W)
  ) u_da (
    .x(taps),
    .y(acc)
  );

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
      out_valid <= line_new;
      if (line_new) begin
        out_data <= q;
        out_sat  <= q_sat;
      end
    end
  end

endmodule
