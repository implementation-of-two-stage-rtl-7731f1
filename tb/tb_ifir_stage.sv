// tb_ifir_stage: self-checking test of the interpolated FIR stage.
//
// Phase 1 drives a -32768 impulse: the output must be the 88-sample
// stretched impulse response, -G[k/3] at every third position and zero in
// between. Phase 2 drives a worst-case pattern that must clamp. Phase 3
// drives random samples with random gaps in in_valid. Every output is
// compared with a direct-form model of I(z) = G(z^3) computed here
// (round-half-up of the Q2.30 sum to Q1.15, then clamp), and must appear
// exactly one clock after the edge that accepted its input. Inputs are driven and
// outputs sampled on the falling clock edge.
module tb_ifir_stage;
  import fir_pkg::*;

  localparam int LINE = (G_TAPS - 1) * IFIR_L + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                     reset, in_valid, out_valid, out_sat;
  logic signed [DATA_W-1:0] in_data, out_data;

  ifir_stage dut (.*);

  int checks = 0, failures = 0, sat_seen = 0, gaps = 0;
  int cycle = 0;
  longint hist [LINE];            // hist[k] = x[n-k] of the model
  int     exp_q[$];               // expected outputs
  int     exp_t[$];               // cycle in which each must appear

  function automatic longint coef_i(int k);
    return (k % IFIR_L == 0) ? longint'(G_COEF[k / IFIR_L]) : 0;
  endfunction

  function automatic int model(longint x, output bit sat);
    longint s = 0, r;
    for (int k = LINE - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    for (int k = 0; k < LINE; k++) s += coef_i(k) * hist[k];
    r = (s + (64'sd1 <<< 14)) >>> 15;
    sat = (r > 32767) || (r < -32768);
    if (r > 32767)  r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  task automatic step(bit v, int x);
    bit s;
    // outputs of the previous rising edge
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        int e, t;
        e = exp_q.pop_front(); t = exp_t.pop_front();
        if (int'(out_data) != e || t != cycle) begin
          failures++;
          $display("FAIL cycle %0d: got %0d expected %0d (due cycle %0d)", cycle, out_data, e, t);
        end
        if (out_sat) sat_seen++;
      end
    end else if (exp_t.size() != 0 && exp_t[0] <= cycle) begin
      checks++; failures++;
      $display("FAIL output missing at cycle %0d", cycle);
      void'(exp_q.pop_front()); void'(exp_t.pop_front());
    end
    in_valid = v;
    in_data  = DATA_W'(x);
    if (v) begin
      exp_q.push_back(model(longint'(x), s));
      exp_t.push_back(cycle + 2);   // accepting edge + 1 clock
    end else gaps++;
    @(negedge clk);
    cycle++;
  endtask

  initial begin
    for (int k = 0; k < LINE; k++) hist[k] = 0;
    reset = 1'b1; in_valid = 1'b0; in_data = '0;
    @(negedge clk); @(negedge clk);
    reset = 1'b0;
    // 1: impulse response
    step(1, -32768);
    for (int k = 1; k < LINE + 4; k++) step(1, 0);
    // 2: worst-case pattern, sign of the tap coefficient, full scale
    for (int r = 0; r < 2; r++)
      for (int k = LINE - 1; k >= 0; k--)
        step(1, (coef_i(k) < 0) ? -32768 : 32767);
    // 3: random samples with random valid gaps
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 3) == 0) step(0, 0);
      step(1, int'($signed(DATA_W'($urandom))) / (($urandom_range(0, 1) == 1) ? 1 : 4));
    end
    for (int i = 0; i < 3; i++) step(0, 0);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs never came", exp_q.size()); end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL clamp never exercised"); end
    $display("clamped outputs: %0d, valid gaps: %0d", sat_seen, gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
