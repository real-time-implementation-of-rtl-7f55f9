// descriptor_extractor: builds the 64-element descriptor of one interest
// point from its neighbourhood of integral samples.
//
// Chain: haar_wavelet (26x26 integral samples -> 24x24 dx, dy),
// wavelet_reconstructor (routing to 16 overlapping 9x9 sub-regions and
// mask addresses), gaussian_mask_lut (weights for the point's scale),
// gaussian_weight (weighted sums per sub-region) and
// descriptor_normalizer (4x4 Gaussian scaling and L1 normalisation), as in
// the original design's block diagram. The reconstructor's outputs are delayed one
// cycle so that they meet the registered LUT output.
// Interface: start with scale begins a point (clears all position counters
// and sums); nb_valid/nb_data deliver the 676 samples in row-major order,
// with any gaps; desc_valid pulses with desc. busy is high from start until
// desc_valid. Timing with a gap-free input: 56 cycles to the first
// response, 576 responses, 4 cycles to the sums, 68 cycles to normalise.
module descriptor_extractor
  import surf_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [1:0]    scale,
  input  logic          nb_valid,
  input  logic [IW-1:0] nb_data,
  output logic          busy,
  output logic          desc_valid,
  output delem_t        desc [DLEN]
);
  logic [1:0]            sc;
  logic                  hv;
  logic signed [RW-1:0]  hdx, hdy;

  haar_wavelet #(.NB(26)) u_haar (
    .clk, .rst, .start, .in_valid(nb_valid), .ii(nb_data),
    .out_valid(hv), .dx(hdx), .dy(hdy));

  logic [NSUB-1:0]      pv;
  logic [3:0]           lr [NSUB];
  logic [3:0]           lc [NSUB];
  logic signed [RW-1:0] rdx, rdy;
  logic                 rlast;

  wavelet_reconstructor u_rec (
    .clk, .rst, .start, .in_valid(hv), .in_dx(hdx), .in_dy(hdy),
    .port_valid(pv), .lr, .lc, .dx(rdx), .dy(rdy), .last(rlast));

  logic [GW-1:0] mask [NSUB];
  gaussian_mask_lut #(.NPORT(NSUB)) u_lut (.clk, .scale(sc), .lr, .lc, .mask);

  logic [NSUB-1:0]      pv_q;
  logic signed [RW-1:0] dx_q, dy_q;
  logic                 last_q;
  always_ff @(posedge clk) begin
    if (rst || start) begin
      pv_q <= '0; dx_q <= '0; dy_q <= '0; last_q <= 1'b0;
    end else begin
      pv_q <= pv; dx_q <= rdx; dy_q <= rdy; last_q <= rlast;
    end
  end

  delem_t pred [DLEN];
  logic   wdone;
  gaussian_weight u_w (
    .clk, .rst, .clear(start), .port_valid(pv_q), .dx(dx_q), .dy(dy_q),
    .mask, .last(last_q), .pred, .done(wdone));

  descriptor_normalizer u_norm (
    .clk, .rst, .start(wdone), .pred, .desc_valid, .desc);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; sc <= '0;
    end else if (start) begin
      busy <= 1'b1; sc <= scale;
    end else if (desc_valid) begin
      busy <= 1'b0;
    end
  end
endmodule
