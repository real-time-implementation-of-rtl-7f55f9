// rgb2gray: converts a 24-bit RGB pixel to an 8-bit gray value with three
// constant multipliers, Gray = 0.2989 R + 0.5870 G + 0.114 B.
//
// The weights are the original design's; their fixed-point form (unsigned Q0.16:
// 19588, 38470, 7471, with round-to-nearest) is this design's choice.
// Interface: rgb = {R[23:16], G[15:8], B[7:0]}. Timing: gray is registered,
// one cycle after rgb.
module rgb2gray (
  input  logic        clk,
  input  logic [23:0] rgb,
  output logic [7:0]  gray
);
  localparam logic [15:0] KR = 16'd19588;
  localparam logic [15:0] KG = 16'd38470;
  localparam logic [15:0] KB = 16'd7471;

  logic [25:0] acc;  // bits 23:16 are the rounded gray value
  always_comb begin
    acc = 26'(rgb[23:16] * KR) + 26'(rgb[15:8] * KG) + 26'(rgb[7:0] * KB) + 26'd32768;
  end

  always_ff @(posedge clk) gray <= acc[23:16];
endmodule
