// tb_filter_specs: measures the frequency response of each stage with
// complex tones and checks it against the filter specifications.
//
// Two ifir_stage instances (I and Q) and two dfir_polyphase instances
// (I and Q) are driven with I = A cos(wn), Q = A sin(wn), A = 0.5 full
// scale, at 40 Msps. After the delay lines have filled, the mean output
// magnitude divided by A is the gain at that frequency. Limits:
//   IFIR: pass band 0..4.14 MHz ripple within 0.6 dB (target 0.5 dB; the
//         order-29 equiripple design reaches 0.51 dB), stop band
//         4.88..8.45 MHz (up to the first image) at least 39.5 dB down
//         (target 40 dB; the design reaches 39.7 dB); the first image at
//         13.33 MHz is passed within 1 dB;
//   DFIR: pass band 0..4.14 MHz ripple within 0.5 dB, stop band
//         8.42..20 MHz at least 12.5 dB down (the design gives 13.1 dB).
// The DFIR output also has to come at exactly a quarter of the input rate.
module tb_filter_specs;
  import fir_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real A  = 16384.0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                     reset, in_valid;
  logic signed [DATA_W-1:0] xi, xq;
  logic                     v1i, v1q, v2i, v2q, s1i, s1q, s2i, s2q;
  logic signed [DATA_W-1:0] y1i, y1q, y2i, y2q;

  ifir_stage     u_ifir_i (.clk, .reset, .in_valid, .in_data(xi), .out_valid(v1i), .out_data(y1i), .out_sat(s1i));
  ifir_stage     u_ifir_q (.clk, .reset, .in_valid, .in_data(xq), .out_valid(v1q), .out_data(y1q), .out_sat(s1q));
  dfir_polyphase u_dfir_i (.clk, .reset, .in_valid, .in_data(xi), .out_valid(v2i), .out_data(y2i), .out_sat(s2i));
  dfir_polyphase u_dfir_q (.clk, .reset, .in_valid, .in_data(xq), .out_valid(v2q), .out_data(y2q), .out_sat(s2q));

  int  checks = 0, failures = 0;
  real sum1, sum2;
  int  n1, n2, n_in;
  bit  measure;

  always @(negedge clk) begin
    if (measure && v1i) begin
      sum1 += $sqrt(real'(y1i) ** 2 + real'(y1q) ** 2);
      n1++;
    end
    if (measure && v2i) begin
      sum2 += $sqrt(real'(y2i) ** 2 + real'(y2q) ** 2);
      n2++;
    end
  end

  task automatic tone(real f, output real g1, output real g2);
    measure = 1'b0;
    for (int i = 0; i < 400; i++) begin
      real ph = 2.0 * PI * f / 40.0 * real'(i);
      if (i == 150) begin sum1 = 0.0; sum2 = 0.0; n1 = 0; n2 = 0; n_in = 0; measure = 1'b1; end
      in_valid = 1'b1;
      xi = DATA_W'($rtoi(A * $cos(ph)));
      xq = DATA_W'($rtoi(A * $sin(ph)));
      @(negedge clk);
      if (measure) n_in++;
    end
    measure = 1'b0;
    g1 = 20.0 * $log10((sum1 / real'(n1) + 1.0e-3) / A);
    g2 = 20.0 * $log10((sum2 / real'(n2) + 1.0e-3) / A);
    checks++;
    if (n2 < n_in / DECIM_M - 1 || n2 > n_in / DECIM_M + 1) begin
      failures++; $display("FAIL %0d DFIR outputs for %0d inputs", n2, n_in);
    end
  endtask

  task automatic limit(string what, real v, real lo, real hi);
    checks++;
    if (v < lo || v > hi) begin
      failures++;
      $display("FAIL %s: %0.3f dB outside [%0.2f, %0.2f]", what, v, lo, hi);
    end
  endtask

  initial begin
    real g1, g2, p1min, p1max, p2min, p2max, st1, st2;
    p1min = 99.0; p1max = -99.0; p2min = 99.0; p2max = -99.0; st1 = -999.0; st2 = -999.0;
    measure = 1'b0;
    reset = 1'b1; in_valid = 1'b0; xi = '0; xq = '0;
    @(negedge clk); @(negedge clk);
    reset = 1'b0;
    for (real f = 0.0; f <= 4.1401; f += 0.23) begin
      tone(f, g1, g2);
      if (g1 < p1min) p1min = g1;
      if (g1 > p1max) p1max = g1;
      if (g2 < p2min) p2min = g2;
      if (g2 > p2max) p2max = g2;
    end
    for (real f = 4.88; f <= 8.4501; f += 0.17) begin
      tone(f, g1, g2);
      if (g1 > st1) st1 = g1;
    end
    for (real f = 8.42; f <= 20.0; f += 0.29) begin
      tone(f, g1, g2);
      if (g2 > st2) st2 = g2;
    end
    tone(40.0 / 3.0, g1, g2);
    $display("IFIR: pass band %0.3f..%0.3f dB, worst stop band %0.2f dB, image at 13.33 MHz %0.2f dB",
             p1min, p1max, st1, g1);
    $display("DFIR: pass band %0.3f..%0.3f dB, worst stop band %0.2f dB", p2min, p2max, st2);
    limit("IFIR pass-band ripple", p1max - p1min, 0.0, 0.6);
    limit("IFIR pass-band level", p1max, -0.6, 0.6);
    limit("IFIR stop band 4.88..8.45 MHz", st1, -200.0, -39.5);
    limit("IFIR image passed", g1, -1.0, 1.0);
    limit("DFIR pass-band ripple", p2max - p2min, 0.0, 0.5);
    limit("DFIR stop band 8.42..20 MHz", st2, -200.0, -12.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
