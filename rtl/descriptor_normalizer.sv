// descriptor_normalizer: Gaussian scaling and normalisation of the
// pre-descriptor, the last stage of the descriptor extractor.
//
// Step 1 weights the element of sub-region k = 4R+C in each of the four
// 16-element groups with a 4x4 Gaussian of sigma 1.5 centred on the middle
// of the 4x4 grid: exp(-d^2/(2*1.5^2)) with d^2 = (R-1.5)^2 + (C-1.5)^2,
// stored as unsigned Q0.16 (58644, 37602, 24109 for d^2 = 0.5, 2.5, 4.5).
// Step 2 forms the L1 norm (the sum of absolute values, which the original design
// uses in place of the square root of the sum of squares). Step 3 takes
// recip = floor(2^62 / norm) with seq_divider and multiplies every element
// by it: out = w * recip >>> 32, so the elements of the output have an
// absolute sum of about 2^30 (Q.30 unit vector). The 4x4 sigma-1.5 mask,
// the absolute-value norm and the reciprocal multiply are the original design's;
// the mask values and all binary points are this design's.
// Timing: start with pred valid; desc_valid pulses 64 + 4 cycles later.
module descriptor_normalizer
  import surf_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  delem_t pred [DLEN],
  output logic   desc_valid,
  output delem_t desc [DLEN]
);
  function automatic logic [15:0] gmask(int k);
    int r2, c2;
    r2 = (k / 4 == 0 || k / 4 == 3) ? 9 : 1;   // (2*(R-1.5))^2
    c2 = (k % 4 == 0 || k % 4 == 3) ? 9 : 1;
    case (r2 + c2)
      2:       return 16'd58644;
      10:      return 16'd37602;
      default: return 16'd24109;
    endcase
  endfunction

  delem_t w [DLEN];
  logic [63:0] norm_c, norm;
  logic        s1, s2;
  logic        dv_done;
  logic        dv_busy;
  logic [63:0] recip;

  always_comb begin
    norm_c = '0;
    for (int i = 0; i < DLEN; i++)
      norm_c = norm_c + 64'((w[i] < 0) ? delem_t'(-w[i]) : w[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= 1'b0; s2 <= 1'b0; norm <= '0;
      for (int i = 0; i < DLEN; i++) w[i] <= '0;
    end else begin
      s1 <= start;
      s2 <= s1;
      if (start)
        for (int i = 0; i < DLEN; i++)
          w[i] <= delem_t'((64'(pred[i]) * $signed(64'(gmask(i % 16)))) >>> 16);
      if (s1) norm <= norm_c;
    end
  end

  seq_divider #(.N(64)) u_div (
    .clk, .rst, .start(s2), .num(64'h4000_0000_0000_0000), .den(norm),
    .busy(dv_busy), .done(dv_done), .quo(recip));

  always_ff @(posedge clk) begin
    if (rst) begin
      desc_valid <= 1'b0;
      for (int i = 0; i < DLEN; i++) desc[i] <= '0;
    end else begin
      desc_valid <= dv_done;
      if (dv_done)
        for (int i = 0; i < DLEN; i++) begin
          logic signed [127:0] p;
          p = 128'(w[i]) * $signed({64'd0, (norm == 0) ? 64'd0 : recip});
          desc[i] <= delem_t'(p >>> 32);
        end
    end
  end

  logic unused_busy;
  assign unused_busy = dv_busy;
endmodule
