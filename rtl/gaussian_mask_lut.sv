// gaussian_mask_lut: look-up table of 9x9 Gaussian weights for the
// sub-region responses, one 81-entry unit per scale s = 2..5.
//
// Each unit is the 9x9 table of unsigned Q0.32 weights
//   w(r,c) = 0x3BDCB4DC * exp(-((r-5)^2 + (c-5)^2) / (2 * 3.3^2)),
// r, c = 0..8, which is the table published for scale 2
// (sigma 3.3, peak at row and column 5 as printed). Because the
// neighbourhood is sampled at a stride of s pixels, a Gaussian that scales
// with s is the same table in sample units, so all four units hold it; the
// unit is still selected by the scale index as in the original design. The
// contents are read from rtl/gauss_lut.hex (324 words, unit-major, row-major).
// Interface: a scale index and NPORT (row, column) addresses; NPORT weights
// come out one cycle later (registered read).
module gaussian_mask_lut
  import surf_pkg::*;
#(
  parameter int    NPORT   = 16,
  parameter string LUT_FILE = "rtl/gauss_lut.hex"
) (
  input  logic          clk,
  input  logic [1:0]    scale,
  input  logic [3:0]    lr   [NPORT],
  input  logic [3:0]    lc   [NPORT],
  output logic [GW-1:0] mask [NPORT]
);
  logic [GW-1:0] rom [4 * 81];

  initial $readmemh(LUT_FILE, rom);

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORT; p++)
      mask[p] <= rom[int'(scale) * 81 + int'(lr[p]) * 9 + int'(lc[p])];
  end
endmodule
