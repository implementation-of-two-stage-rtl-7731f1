// tb_dfir_polyphase: self-checking test of the polyphase decimator.
//
// The model is the plain full-rate filter y[n] = sum_k h[k] x[n-k]
// (round-half-up to Q1.15, then clamp) of which every output with
// n = 3 (mod 4) is kept. The test drives -32768 impulses at each of the
// four input phases (so every branch and both taps of every branch are
// seen alone), a worst-case pattern that must clamp, and random samples
// with random gaps in in_valid. Each output must match the model and
// appear one clock after the edge that accepted the last sample of its
// block; the number of outputs must be a quarter of the inputs.
module tb_dfir_polyphase;
  import fir_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                     reset, in_valid, out_valid, out_sat;
  logic signed [DATA_W-1:0] in_data, out_data;

  dfir_polyphase dut (.*);

  int checks = 0, failures = 0, sat_seen = 0, gaps = 0;
  int cycle = 0, n_in = 0, n_out = 0;
  longint hist [H_TAPS];
  int     exp_q[$];
  int     exp_t[$];

  function automatic int model(longint x, output bit sat);
    longint s = 0, r;
    for (int k = H_TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    for (int k = 0; k < H_TAPS; k++) s += longint'(H_COEF[k]) * hist[k];
    r = (s + (64'sd1 <<< 14)) >>> 15;
    sat = (r > 32767) || (r < -32768);
    if (r > 32767)  r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  task automatic step(bit v, int x);
    bit s;
    int e;
    if (out_valid) begin
      checks++; n_out++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        int t;
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
      e = model(longint'(x), s);
      if (n_in % DECIM_M == DECIM_M - 1) begin
        exp_q.push_back(e);
        exp_t.push_back(cycle + 2);
      end
      n_in++;
    end else gaps++;
    @(negedge clk);
    cycle++;
  endtask

  initial begin
    for (int k = 0; k < H_TAPS; k++) hist[k] = 0;
    reset = 1'b1; in_valid = 1'b0; in_data = '0;
    @(negedge clk); @(negedge clk);
    reset = 1'b0;
    // impulses at each input phase
    for (int ph = 0; ph < DECIM_M; ph++) begin
      for (int k = 0; k < ph; k++) step(1, 0);
      step(1, -32768);
      for (int k = ph + 1; k < 4 * DECIM_M; k++) step(1, 0);
    end
    // worst case: full scale with the sign of each coefficient
    for (int r = 0; r < 4; r++)
      for (int k = H_TAPS - 1; k >= 0; k--)
        step(1, (H_COEF[k] < 0) ? -32768 : 32767);
    for (int i = 0; i < 4000; i++) begin
      if ($urandom_range(0, 3) == 0) step(0, 0);
      step(1, int'($signed(DATA_W'($urandom))));
    end
    for (int i = 0; i < 4; i++) step(0, 0);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs never came", exp_q.size()); end
    checks++;
    if (n_out != n_in / DECIM_M) begin
      failures++; $display("FAIL %0d outputs for %0d inputs", n_out, n_in);
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL clamp never exercised"); end
    $display("inputs %0d, outputs %0d, clamped %0d, valid gaps %0d", n_in, n_out, sat_seen, gaps);
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
