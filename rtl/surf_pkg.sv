// surf_pkg: widths, filter tables and small helper functions shared by the
// SURF detector blocks.
//
// Widths follow the block diagrams: 28-bit integral pixels, 36-bit Hessian
// determinants, 32-bit wavelet responses and Gaussian weights, 36-bit weighted
// responses and 48-bit descriptor elements. The six box-filter sizes are the
// standard SURF sizes of the first two octaves (9,15,21,27 and 15,27,39,51);
// the per-size normalisation constants are this design's fixed-point choice.
package surf_pkg;

  localparam int IW = 28;   // integral pixel
  localparam int HW = 36;   // Hessian determinant
  localparam int RW = 32;   // Haar wavelet response
  localparam int GW = 32;   // Gaussian mask weight (unsigned Q0.32)
  localparam int WW = 36;   // Gaussian-weighted response
  localparam int DW = 48;   // descriptor element
  localparam int NSIZE = 6; // distinct box-filter sizes
  localparam int NSUB = 16; // descriptor sub-regions
  localparam int DLEN = 64; // descriptor length

  typedef logic signed [HW-1:0] det_t;
  typedef logic signed [DW-1:0] delem_t;
  typedef delem_t desc_t [DLEN];

  // Box-filter side L for size index 0..5
  function automatic int filt_len(int k);
    case (k)
      0: return 9;  1: return 15; 2: return 21;
      3: return 27; 4: return 39; default: return 51;
    endcase
  endfunction

  // round(2^20 / L^2): multiplies a box response to normalise it by the area
  function automatic int filt_inv(int k);
    int l;
    l = filt_len(k);
    return ((1 << 20) + (l * l) / 2) / (l * l);
  endfunction

  // Interest point produced by the detector
  typedef struct packed {
    logic        marker;  // frame-end marker, no point
    logic        bank;    // frame bank the point belongs to
    logic [1:0]  scale;   // 0..3 for s = 2..5
    logic [9:0]  x;
    logic [9:0]  y;
  } ip_t;

  // sample stride in pixels for a scale index
  function automatic int scale_px(logic [1:0] s);
    return int'(s) + 2;
  endfunction

endpackage
