// tb_two_stage_fir: end-to-end test of the two-stage I/Q channel filter at
// its default (full) size.
//
// A bit-exact model of the chain (direct-form I(z) = G(z^3), round and
// clamp to Q1.15, direct-form H(z), round and clamp, keep every 4th
// output) runs beside the design; every output pair must match it and
// arrive 3 clocks after the edge that accepts the pair completing its block.
// The stimulus exercises what the design is for:
//   - complex tones (I = A cos, Q = A sin, A = 0.5 full scale, 40 Msps):
//     1 MHz in the pass band must keep its level; 6 MHz, just outside
//     the 5 MHz channel edge, must drop by 40 dB or more; 10 MHz, the
//     centre of the adjacent channel, and 13.33 MHz, the first pass-band
//     image of the interpolated stage, are passed by stage 1 and must be
//     removed by stage 2 (15 dB or more);
//   - random samples with random gaps in in_valid;
//   - a worst-case pattern on I that must raise the sticky sat_i flag,
//     while sat_q stays low.
// Each mechanism (decimation, valid gap, image passed by stage 1 and
// removed by stage 2, adjacent-channel rejection, clamp) is counted and
// must occur at least once.
module tb_two_stage_fir;
  import fir_pkg::*;

  localparam int LINE = (G_TAPS - 1) * IFIR_L + 1;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                     reset, in_valid, out_valid, sat_i, sat_q;
  logic signed [DATA_W-1:0] in_i, in_q, out_i, out_q;

  two_stage_fir dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0, n_in = 0, n_out = 0, gaps = 0;
  int n_image = 0, n_adjacent = 0, n_clamp = 0;

  // ---------------- bit-exact model ----------------
  longint h1 [2][LINE];
  longint h2 [2][H_TAPS];
  int     exp_i[$], exp_q[$], exp_t[$];

  function automatic int rq(longint s);
    longint r = (s + (64'sd1 <<< 14)) >>> 15;
    if (r > 32767)  r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  function automatic int chain(int c, longint x);
    longint s = 0;
    int     y1;
    for (int k = LINE - 1; k > 0; k--) h1[c][k] = h1[c][k-1];
    h1[c][0] = x;
    for (int k = 0; k < G_TAPS; k++) s += longint'(G_COEF[k]) * h1[c][k * IFIR_L];
    y1 = rq(s);
    for (int k = H_TAPS - 1; k > 0; k--) h2[c][k] = h2[c][k-1];
    h2[c][0] = longint'(y1);
    s = 0;
    for (int k = 0; k < H_TAPS; k++) s += longint'(H_COEF[k]) * h2[c][k];
    return rq(s);
  endfunction

  // ---------------- measurement ----------------
  real mag_sum, s1_max;
  int  mag_n;

  always @(posedge clk) begin
    if (!reset && dut.s1_valid_i) begin
      real m;
      m = $sqrt(real'(dut.s1_i) ** 2 + real'(dut.s1_q) ** 2);
      if (cycle > 150 && m > s1_max) s1_max = m;
    end
  end

  task automatic step(bit v, int xi, int xq);
    int ei, eq;
    if (out_valid) begin
      checks++; n_out++;
      if (exp_t.size() == 0) begin
        failures++; $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        int t;
        ei = exp_i.pop_front(); eq = exp_q.pop_front(); t = exp_t.pop_front();
        if (int'(out_i) != ei || int'(out_q) != eq || t != cycle) begin
          failures++;
          $display("FAIL cycle %0d: got (%0d,%0d) expected (%0d,%0d) due %0d",
                   cycle, out_i, out_q, ei, eq, t);
        end
        mag_sum += $sqrt(real'(out_i) ** 2 + real'(out_q) ** 2);
        mag_n++;
      end
    end else if (exp_t.size() != 0 && exp_t[0] <= cycle) begin
      checks++; failures++;
      $display("FAIL output missing at cycle %0d", cycle);
      void'(exp_i.pop_front()); void'(exp_q.pop_front()); void'(exp_t.pop_front());
    end
    in_valid = v;
    in_i = DATA_W'(xi);
    in_q = DATA_W'(xq);
    if (v) begin
      ei = chain(0, longint'(xi));
      eq = chain(1, longint'(xq));
      if (n_in % DECIM_M == DECIM_M - 1) begin
        exp_i.push_back(ei); exp_q.push_back(eq); exp_t.push_back(cycle + 4);   // accepting edge + 3 clocks
      end
      n_in++;
    end else gaps++;
    @(negedge clk);
    cycle++;
  endtask

  // Complex tone at f_mhz (40 Msps), 0.5 full scale; returns the mean
  // output magnitude relative to the input amplitude, in dB.
  task automatic tone(real f_mhz, output real gain_db, output real s1_db);
    real a = 16384.0;
    int  start = n_in;
    for (int i = 0; i < 800; i++) begin
      real ph = 2.0 * PI * f_mhz / 40.0 * real'(n_in - start);
      if (i == 200) begin mag_sum = 0.0; mag_n = 0; s1_max = 0.0; end
      step(1, int'($rtoi(a * $cos(ph))), int'($rtoi(a * $sin(ph))));
    end
    gain_db = 20.0 * $log10((mag_sum / real'(mag_n) + 1.0e-3) / a);
    s1_db   = 20.0 * $log10((s1_max + 1.0e-3) / a);
    $display("tone %6.2f MHz: chain %7.2f dB, stage-1 peak %7.2f dB", f_mhz, gain_db, s1_db);
  endtask

  task automatic expect_db(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    real g, s1;
    for (int c = 0; c < 2; c++) begin
      for (int k = 0; k < LINE; k++)   h1[c][k] = 0;
      for (int k = 0; k < H_TAPS; k++) h2[c][k] = 0;
    end
    reset = 1'b1; in_valid = 1'b0; in_i = '0; in_q = '0;
    @(negedge clk); @(negedge clk);
    reset = 1'b0;

    tone(1.0, g, s1);
    expect_db("1 MHz pass band level", g > -0.7 && g < 0.4);
    tone(6.0, g, s1);
    expect_db("6 MHz rejected by 40 dB", g < -40.0);
    if (g < -40.0) n_adjacent++;
    tone(10.0, g, s1);
    expect_db("10 MHz adjacent channel rejected", g < -15.0 && s1 > -1.5);
    if (g < -15.0) n_adjacent++;
    tone(13.333333, g, s1);
    expect_db("13.33 MHz image passed by stage 1, removed by stage 2", g < -15.0 && s1 > -1.5);
    if (g < -15.0 && s1 > -1.5) n_image++;

    expect_db("no clamp during tones", !sat_i && !sat_q);

    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 4) == 0) step(0, 0, 0);
      step(1, int'($signed(DATA_W'($urandom))) / 2, int'($signed(DATA_W'($urandom))) / 2);
    end

    // Worst case for stage 1 on I only.
    for (int r = 0; r < 2; r++)
      for (int k = LINE - 1; k >= 0; k--)
        step(1, (k % IFIR_L == 0 && G_COEF[k / IFIR_L] < 0) ? -32768 : 32767, 0);
    for (int i = 0; i < 8; i++) step(0, 0, 0);
    expect_db("sat_i raised by worst-case pattern", sat_i);
    expect_db("sat_q stays low", !sat_q);
    if (sat_i) n_clamp++;

    checks++;
    if (exp_t.size() != 0) begin failures++; $display("FAIL %0d outputs never came", exp_t.size()); end
    checks++;
    if (n_out != n_in / DECIM_M || n_out == 0) begin
      failures++; $display("FAIL decimation: %0d outputs for %0d inputs", n_out, n_in);
    end
    $display("mechanisms: decimated outputs %0d (inputs %0d), valid gaps %0d, image removed %0d, adjacent rejected %0d, clamp %0d",
             n_out, n_in, gaps, n_image, n_adjacent, n_clamp);
    checks += 5;
    if (n_out == 0)      begin failures++; $display("FAIL no decimation seen"); end
    if (gaps == 0)       begin failures++; $display("FAIL no valid gap seen"); end
    if (n_image == 0)    begin failures++; $display("FAIL image removal not seen"); end
    if (n_adjacent == 0) begin failures++; $display("FAIL adjacent rejection not seen"); end
    if (n_clamp == 0)    begin failures++; $display("FAIL clamp not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
