// da_fir_core: sum of products y = sum_k COEF[k] * x[k] computed by
// distributed arithmetic (DA), the multiplier-free technique the filter
// stages are built with.
//
// How it works: the NTAPS taps are split into groups of PART taps. Each
// group owns a constant look-up table of 2^PART entries; entry a holds the
// sum of the group's coefficients whose bit is set in a. For every bit
// position b of the two's-complement samples, bit b of each tap of a group
// forms the table address; the entry read is weighted by 2^b, and by -2^b
// for the sign bit. Adding all groups and all bit positions gives the
// exact product sum. The tables are built at elaboration from COEF, so
// any constant coefficient set can be used.
//
// All DATA_W bit positions are processed side by side (one table copy per
// bit), so the core delivers one full result per evaluation. The core is
// purely combinational; the surrounding stage registers its inputs and
// output. Grouping four taps per table and processing all bits in
// parallel are this design's own choices.
//
// Interface: x[NTAPS] signed taps in, y signed ACC_W-bit exact sum out.
module da_fir_core #(
  parameter int NTAPS  = fir_pkg::H_TAPS,
  parameter int DATA_W = fir_pkg::DATA_W,
  parameter int COEF_W = fir_pkg::COEF_W,
  parameter int PART   = fir_pkg::DA_PART,
  parameter logic signed [COEF_W-1:0] COEF [NTAPS] = fir_pkg::H_COEF,
  // Exact result width: room for DATA_W x COEF_W products summed NTAPS times.
  parameter int ACC_W  = DATA_W + COEF_W + $clog2(NTAPS) + 1
) (
  input  logic signed [DATA_W-1:0] x [NTAPS],
  output logic signed [ACC_W-1:0]  y
);

  localparam int NPART = (NTAPS + PART - 1) / PART;
  localparam int LUT_W = COEF_W + $clog2(PART) + 1;

  // Table entry `a` of group `p`: sum of the group's coefficients selected
  // by the set bits of `a`.
  function automatic logic signed [LUT_W-1:0] lut_entry(int p, int a);
    logic signed [LUT_W-1:0] s;
    s = '0;
    for (int j = 0; j < PART; j++) begin
      if (p * PART + j < NTAPS && a[j])
        s += LUT_W'(COEF[p * PART + j]);
    end
    return s;
  endfunction

  // Taps padded with zeros to a whole number of groups.
  logic signed [DATA_W-1:0] xp [NPART*PART];
  always_comb begin
    for (int k = 0; k < NPART * PART; k++)
      xp[k] = (k < NTAPS) ? x[k] : '0;
  end

  logic signed [ACC_W-1:0] part_sum [NPART];

  for (genvar p = 0; p < NPART; p++) begin : g_part
    logic signed [LUT_W-1:0] rom [2**PART];
    for (genvar a = 0; a < 2**PART; a++) begin : g_rom
      assign rom[a] = lut_entry(p, a);
    end

    always_comb begin
      logic [PART-1:0]         addr;
      logic signed [ACC_W-1:0] s;
      s = '0;
      for (int b = 0; b < DATA_W; b++) begin
        for (int j = 0; j < PART; j++)
          addr[j] = xp[p * PART + j][b];
        if (b == DATA_W - 1)
          s -= ACC_W'(rom[addr]) <<< b;   // sign bit carries weight -2^b
        else
          s += ACC_W'(rom[addr]) <<< b;
      end
      part_sum[p] = s;
    end
  end

  always_comb begin
    y = '0;
    for (int p = 0; p < NPART; p++)
      y += part_sum[p];
  end

endmodule
