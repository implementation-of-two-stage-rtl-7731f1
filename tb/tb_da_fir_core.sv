// tb_da_fir_core: self-checking test of the distributed-arithmetic core.
//
// Two instances: the 8-tap H set with 4-tap tables (two full groups) and
// the 30-tap G set with 4-tap tables (last group padded). Each gets
// directed vectors (all zero, single full-scale taps, all -32768, all
// +32767) and random vectors; the result is compared with a plain
// multiply-accumulate reference computed here. A watchdog ends the run.
module tb_da_fir_core;
  import fir_pkg::*;

  localparam int ACC_H = DATA_W + COEF_W + $clog2(H_TAPS) + 1;
  localparam int ACC_G = DATA_W + COEF_W + $clog2(G_TAPS) + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [DATA_W-1:0] xh [H_TAPS];
  logic signed [DATA_W-1:0] xg [G_TAPS];
  logic signed [ACC_H-1:0]  yh;
  logic signed [ACC_G-1:0]  yg;

  da_fir_core #(.NTAPS(H_TAPS), .COEF(H_COEF), .ACC_W(ACC_H)) dut_h (.x(xh), .y(yh));
  da_fir_core #(.NTAPS(G_TAPS), .COEF(G_COEF), .ACC_W(ACC_G)) dut_g (.x(xg), .y(yg));

  int checks = 0, failures = 0;

  function automatic longint ref_h();
    longint s = 0;
    for (int k = 0; k < H_TAPS; k++) s += longint'(xh[k]) * longint'(H_COEF[k]);
    return s;
  endfunction
  function automatic longint ref_g();
    longint s = 0;
    for (int k = 0; k < G_TAPS; k++) s += longint'(xg[k]) * longint'(G_COEF[k]);
    return s;
  endfunction

  task automatic check(string what);
    #1;
    checks += 2;
    if (longint'(yh) != ref_h()) begin
      failures++;
      $display("FAIL %s H: got %0d expected %0d", what, yh, ref_h());
    end
    if (longint'(yg) != ref_g()) begin
      failures++;
      $display("FAIL %s G: got %0d expected %0d", what, yg, ref_g());
    end
  endtask

  task automatic fill(int mode, int pos);
    // mode 0: zero, 1: single +32767 at pos, 2: single -32768 at pos,
    // 3: all -32768, 4: all +32767, 5: random
    for (int k = 0; k < G_TAPS; k++) begin
      case (mode)
        0: xg[k] = '0;
        1: xg[k] = (k == pos) ? 16'sh7fff : '0;
        2: xg[k] = (k == pos) ? -16'sh8000 : '0;
        3: xg[k] = -16'sh8000;
        4: xg[k] = 16'sh7fff;
        default: xg[k] = DATA_W'($urandom);
      endcase
      if (k < H_TAPS) xh[k] = xg[k];
    end
  endtask

  initial begin
    fill(0, 0); check("zero");
    for (int p = 0; p < G_TAPS; p++) begin
      fill(1, p); check("pos impulse");
      fill(2, p); check("neg impulse");
    end
    fill(3, 0); check("all min");
    fill(4, 0); check("all max");
    for (int i = 0; i < 2000; i++) begin
      fill(5, 0); check("random");
    end
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
