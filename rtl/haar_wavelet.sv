// haar_wavelet: Haar wavelet transformer at the entry of the descriptor
// extractor. It takes the NB x NB integral samples of an interest point's
// neighbourhood in row-major order and produces the (NB-2) x (NB-2) grid of
// horizontal and vertical responses dx, dy.
//
// A shift register of two lines plus two samples (2*NB+2 entries) gives a
// 3x3 window of integral values whose bottom-right corner is the arriving
// sample. With I(x,y) the value at column x, row y of the window centre:
//   S_t = I(x-1,y-1) + I(x+1,y)   - I(x+1,y-1) - I(x-1,y)
//   S_b = I(x-1,y)   + I(x+1,y+1) - I(x-1,y+1) - I(x+1,y)
//   S_l = I(x-1,y-1) + I(x,y+1)   - I(x,y-1)   - I(x-1,y+1)
//   S_r = I(x,y-1)   + I(x+1,y+1) - I(x,y+1)   - I(x+1,y-1)
//   dx = S_r - S_l,  dy = S_b - S_t
// as the original design describes (right minus left, bottom minus top). Two adder
// stages follow, so with a gap-free input the first response leaves 56
// cycles after the first sample (two lines of 26, two samples, two adder
// stages), the latency the original design gives. Gaps in in_valid simply pause
// the window. start clears the position counters for a new neighbourhood.
module haar_wavelet
  import surf_pkg::*;
#(
  parameter int NB = 26
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic                 in_valid,
  input  logic [IW-1:0]        ii,
  output logic                 out_valid,
  output logic signed [RW-1:0] dx,
  output logic signed [RW-1:0] dy
);
  localparam int SR = 2 * NB + 2;
  typedef logic signed [RW-1:0] r_t;

  logic [IW-1:0] sr [SR];
  logic [5:0]    r, c;

  // window value at (row offset a, column offset b) behind the new sample
  function automatic r_t wv(int a, int b);
    return r_t'({1'b0, sr[a * NB + b - 1]});
  endfunction

  r_t i00, i01, i02, i10, i12, i20, i21, i22;  // [row][col], 22 = newest; centre unused
  always_comb begin
    i00 = wv(2, 2); i01 = wv(2, 1); i02 = wv(2, 0);
    i10 = wv(1, 2); i12 = wv(1, 0);
    i20 = wv(0, 2); i21 = wv(0, 1); i22 = r_t'({1'b0, ii});
  end

  logic v1;
  r_t   st, sb, sl, srt;

  always_ff @(posedge clk) begin
    if (rst || start) begin
      r <= '0; c <= '0; v1 <= 1'b0; out_valid <= 1'b0;
      st <= '0; sb <= '0; sl <= '0; srt <= '0; dx <= '0; dy <= '0;
    end else begin
      v1 <= 1'b0;
      if (in_valid) begin
        sr[0] <= ii;
        for (int k = 1; k < SR; k++) sr[k] <= sr[k-1];
        if (c == 6'(NB - 1)) begin
          c <= '0; r <= r + 1'b1;
        end else c <= c + 1'b1;
        if (r >= 2 && c >= 2) begin
          v1  <= 1'b1;
          st  <= i00 + i12 - i02 - i10;
          sb  <= i10 + i22 - i20 - i12;
          sl  <= i00 + i21 - i01 - i20;
          srt <= i01 + i22 - i21 - i02;
        end
      end
      out_valid <= v1;
      if (v1) begin
        dx <= srt - sl;
        dy <= sb - st;
      end
    end
  end
endmodule
