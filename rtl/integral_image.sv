// integral_image: turns a raster stream of gray pixels into a stream of
// integral-image pixels, I(x,y) = sum of all pixels at or above and left of
// (x,y).
//
// For the current pixel a, with b upper-left, c upper and d left
// neighbours, I_a = I_c + I_d - I_b + pixel_a. A single line buffer of W
// entries holds the integral values of the upper line; each entry is read
// (as c) and then overwritten with the new value, so it also holds the
// current line. b and d are kept in registers. The recurrence is the
// original design's; the sign of each term follows the definition of the integral
// image. Interface: one pixel per cycle when valid, with its column and row.
// Timing: ii/ii_valid one cycle after the input.
module integral_image #(
  parameter int W  = 800,
  parameter int IW = 28
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          valid,
  input  logic [7:0]    gray,
  input  logic [9:0]    col,
  input  logic [9:0]    row,
  output logic          ii_valid,
  output logic [IW-1:0] ii,
  output logic [9:0]    ii_col,
  output logic [9:0]    ii_row
);
  logic [IW-1:0] line_mem [W];
  logic [IW-1:0] ic, ib, id, ia;
  logic [IW-1:0] ib_q;   // c of the previous pixel = b of this one

  always_comb begin
    ic = (row == 0) ? '0 : line_mem[col];
    ib = (row == 0 || col == 0) ? '0 : ib_q;
    id = (col == 0) ? '0 : ii;
    ia = ic + id - ib + IW'(gray);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ii_valid <= 1'b0; ii <= '0; ib_q <= '0; ii_col <= '0; ii_row <= '0;
    end else begin
      ii_valid <= valid;
      if (valid) begin
        ii            <= ia;
        ib_q          <= ic;
        line_mem[col] <= ia;
        ii_col        <= col;
        ii_row        <= row;
      end
    end
  end
endmodule
