// diff_compare: the compare block of the motion detector. A pixel whose
// gray value differs from the stored background pixel at the same position
// by at least THRESH is part of a moving object and is shown highlighted
// (pure red); every other pixel is shown as its gray value on all three
// colour channels. The comparison is the original design's; the threshold value,
// the >= reading of "meets the threshold" and the highlight colour are this
// design's. Timing: registered, one cycle.
module diff_compare #(
  parameter int THRESH = 30
) (
  input  logic        clk,
  input  logic [7:0]  cur,
  input  logic [7:0]  prev,
  output logic [23:0] rgb_out,
  output logic        moving
);
  logic [7:0] d;
  logic       m;
  always_comb begin
    d = (cur > prev) ? cur - prev : prev - cur;
    m = int'(d) >= THRESH;
  end

  always_ff @(posedge clk) begin
    moving  <= m;
    rgb_out <= m ? 24'hFF0000 : {cur, cur, cur};
  end
endmodule
