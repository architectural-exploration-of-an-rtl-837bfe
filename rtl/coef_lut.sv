// coef_lut: constant look-up table that replaces one multiplier.
//
// Entry p holds the product of pixel value p (0..255) and the coefficient
// WEIGHT (unsigned Q0.F), as a Q(INT_W).F word: p*WEIGHT, exact because the
// pixel has no fractional part. The table is computed at elaboration, so it
// maps to a ROM or to logic equations. Read is combinational.
module coef_lut
  import gaussian_pkg::*;
#(
  parameter int unsigned F      = 8,
  parameter int unsigned INT_W  = 8,
  parameter int unsigned WEIGHT = 52
) (
  input  logic [PIX_W-1:0]   addr,
  output logic [INT_W+F-1:0] data
);
  localparam int unsigned DW      = INT_W + F;
  localparam int unsigned ENTRIES = 1 << PIX_W;

  typedef logic [DW-1:0] rom_t [ENTRIES];

  function automatic rom_t build_rom();
    rom_t r;
    for (int unsigned p = 0; p < ENTRIES; p++) r[p] = DW'(p * WEIGHT);
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  assign data = ROM[addr];
endmodule
