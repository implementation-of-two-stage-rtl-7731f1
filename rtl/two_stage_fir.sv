// two_stage_fir: two-stage low-pass equiripple channel filter for the
// complex baseband (I/Q) samples of an IEEE 802.11p / ITS-G5 receiver.
//
// Raw I and Q samples arrive at 40 Msps. Each component passes through
//   stage 1, ifir_stage:     I(z) = G(z^3), a steep low-pass with pass
//                            band 4.14 MHz and stop band from 4.88 MHz,
//                            which suppresses the adjacent 10 MHz channels
//                            but leaves pass-band images near 13.3 MHz;
//   stage 2, dfir_polyphase: H(z), order 7, which removes those images,
//                            merged with decimation by 4 in polyphase form;
// and leaves at 10 Msps for the receiver chain. I and Q use identical,
// independent chains driven by one shared valid strobe, so their outputs
// are always aligned.
//
// Interface and timing: at most one I/Q pair per clock with in_valid (a
// 40 MHz clock with in_valid held high gives the 40 Msps input rate).
// out_valid pulses once per 4 accepted pairs, 3 clocks after the rising
// edge that accepts the pair completing a block of 4 (1 clock in stage 1,
// 2 in stage 2). `reset` is asynchronous, active high. sat_i / sat_q are
// sticky flags, set once any sample of that component was clamped to the
// 16-bit range in either stage, and cleared only by reset. The
// stage order, rates and filter specifications follow the design;
// carrying I and Q in two parallel chains, the widths and the flags are
// this design's own choices.
module two_stage_fir #(
  parameter int DATA_W = fir_pkg::DATA_W
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_i,
  input  logic signed [DATA_W-1:0] in_q,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_i,
  output logic signed [DATA_W-1:0] out_q,
  output logic                     sat_i,
  output logic                     sat_q
);

  logic                     s1_valid_i, s1_valid_q;
  logic signed [DATA_W-1:0] s1_i, s1_q;
  logic                     s1_sat_i, s1_sat_q;
  logic                     s2_sat_i, s2_sat_q;
  logic                     out_valid_q;

  // Stage 1: interpolated FIR, 40 Msps.
  ifir_stage #(.DATA_W(DATA_W), .OUT_W(DATA_W)) u_ifir_i (
    .clk, .reset, .in_valid, .in_data(in_i),
    .out_valid(s1_valid_i), .out_data(s1_i), .out_sat(s1_sat_i)
  );
  ifir_stage #(.DATA_W(DATA_W), .OUT_W(DATA_W)) u_ifir_q (
    .clk, .reset, .in_valid, .in_data(in_q),
    .out_valid(s1_valid_q), .out_data(s1_q), .out_sat(s1_sat_q)
  );

  // Stage 2: polyphase decimating FIR, 40 Msps in, 10 Msps out.
  dfir_polyphase #(.DATA_W(DATA_W), .OUT_W(DATA_W)) u_dfir_i (
    .clk, .reset, .in_valid(s1_valid_i), .in_data(s1_i),
    .out_valid(out_valid), .out_data(out_i), .out_sat(s2_sat_i)
  );
  dfir_polyphase #(.DATA_W(DATA_W), .OUT_W(DATA_W)) u_dfir_q (
    .clk, .reset, .in_valid(s1_valid_q), .in_data(s1_q),
    .out_valid(out_valid_q), .out_data(out_q), .out_sat(s2_sat_q)
  );

  // Sticky clamp flags: set by any clamped sample of either stage.
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      sat_i <= 1'b0;
      sat_q <= 1'b0;
    end else begin
      if ((s1_valid_i && s1_sat_i) || (out_valid && s2_sat_i))   sat_i <= 1'b1;
      if ((s1_valid_q && s1_sat_q) || (out_valid_q && s2_sat_q)) sat_q <= 1'b1;
    end
  end

  // Both chains see the same strobe, so they must stay in lock step.
  assert property (@(posedge clk) disable iff (reset) out_valid == out_valid_q)
    else $error("two_stage_fir: I and Q chains out of step");

endmodule
