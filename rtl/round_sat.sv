// round_sat: requantizes a wide signed accumulator to an OUT_W-bit sample.
//
// The input is divided by 2^SHIFT with round-half-up (add 2^(SHIFT-1),
// then arithmetic shift right), and the result is clamped to the OUT_W-bit
// two's-complement range. `sat` is high when clamping happened. Used at
// the output of each filter stage to bring the Q2.30 product sum back to a
// Q1.15 sample. Combinational; the rounding mode and the saturation are
// this design's own choices.
module round_sat #(
  parameter int IN_W  = 40,
  parameter int OUT_W = 16,
  parameter int SHIFT = 15
) (
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    sat
);

  localparam logic signed [IN_W:0] MAXV = (IN_W+1)'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [IN_W:0] MINV = -(IN_W+1)'(64'sd1 <<< (OUT_W - 1));

  logic signed [IN_W:0] rounded;
  logic signed [IN_W:0] shifted;

  always_comb begin
    rounded = (IN_W+1)'(din) + (IN_W+1)'(64'sd1 <<< (SHIFT - 1));
    shifted = rounded >>> SHIFT;
    sat     = 1'b0;
    if (shifted > MAXV) begin
      dout = OUT_W'(MAXV);
      sat  = 1'b1;
    end else if (shifted < MINV) begin
      dout = OUT_W'(MINV);
      sat  = 1'b1;
    end else begin
      dout = OUT_W'(shifted);
    end
  end

endmodule
