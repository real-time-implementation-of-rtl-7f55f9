// gaussian_weight: Gaussian weighting and sub-region accumulation of the
// Haar responses. For each of the 16 sub-regions it forms
// sum(dx*g), sum(dy*g), sum|dx*g| and sum|dy*g| over its 9x9 responses,
// giving the 64-element pre-descriptor.
//
// Multiplier sharing (the original design's multiplier multiplexing): sub-regions
// k and k+8 lie in row bands that never overlap, so a response is never in
// both; multiplier k therefore takes sub-region k or k+8, whichever is
// valid, and a selector steers the product back to that sub-region's
// accumulators. Each direction has 8 such multipliers. Products keep 8
// fractional bits (response * Q0.32 weight >>> 24, 36 bits); the
// accumulators are 48 bits. The absolute value is combinational and sits
// in front of its own accumulator. Sizes 36 and 48 are the original design's; the
// binary point is this design's choice.
// Output order: pred[0..15] = sum dx, [16..31] = sum dy, [32..47] = sum
// |dx|, [48..63] = sum |dy|, sub-region k = 4*row + column.
// Timing: inputs (port_valid, dx, dy and the matching mask) arrive
// together; one multiply stage and one accumulate stage follow, so done
// pulses two cycles after the input marked last. clear zeroes the sums.
module gaussian_weight
  import surf_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear,
  input  logic [NSUB-1:0]      port_valid,
  input  logic signed [RW-1:0] dx,
  input  logic signed [RW-1:0] dy,
  input  logic [GW-1:0]        mask [NSUB],
  input  logic                 last,
  output delem_t               pred [DLEN],
  output logic                 done
);
  localparam int NM = NSUB / 2;
  typedef logic signed [WW-1:0] w_t;

  w_t         px [NM], py [NM];
  logic       pv [NM];
  logic [3:0] pt [NM];
  logic       last1;

  function automatic w_t wmul(logic signed [RW-1:0] r, logic [GW-1:0] g);
    logic signed [RW+GW:0] p;
    p = (RW+GW+1)'(r) * $signed({1'b0, g});
    return w_t'(p >>> 24);
  endfunction

  function automatic delem_t absx(w_t v);
    return (v < 0) ? -delem_t'(v) : delem_t'(v);
  endfunction

  // stage 1: shared multipliers
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      last1 <= 1'b0;
      for (int k = 0; k < NM; k++) begin pv[k] <= 1'b0; pt[k] <= '0; px[k] <= '0; py[k] <= '0; end
    end else begin
      last1 <= last;
      for (int k = 0; k < NM; k++) begin
        logic [3:0] s;
        s = port_valid[k] ? 4'(k) : 4'(k + NM);
        pv[k] <= port_valid[k] || port_valid[k + NM];
        pt[k] <= s;
        px[k] <= wmul(dx, mask[s]);
        py[k] <= wmul(dy, mask[s]);
      end
    end
  end

  // stage 2: selector and accumulators
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      done <= 1'b0;
      for (int i = 0; i < DLEN; i++) pred[i] <= '0;
    end else begin
      done <= last1;
      for (int k = 0; k < NM; k++)
        if (pv[k]) begin
          int t;
          t = int'(pt[k]);
          pred[t]      <= pred[t]      + delem_t'(px[k]);
          pred[16 + t] <= pred[16 + t] + delem_t'(py[k]);
          pred[32 + t] <= pred[32 + t] + absx(px[k]);
          pred[48 + t] <= pred[48 + t] + absx(py[k]);
        end
    end
  end

  // rows of sub-regions k and k+8 are disjoint
  for (genvar k = 0; k < NM; k++) begin : g_chk
    assert property (@(posedge clk) disable iff (rst) !(port_valid[k] && port_valid[k + NM]));
  end
endmodule
