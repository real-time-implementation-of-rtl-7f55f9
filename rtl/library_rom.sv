// library_rom: the reference library of the matcher, NLIB descriptors of
// DLEN 48-bit elements split over NROM independent ROMs so that NROM
// elements are read per cycle.
//
// ROM b holds, for descriptor d and step t = 0..7, element 8t+b at address
// d*8+t; reading addresses d*8 .. d*8+7 in eight cycles returns the whole
// descriptor, eight times faster than one element per cycle. The split into
// eight ROMs and the sizes (128 descriptors, 48 bits) are the original design's.
// The contents are the descriptors of the object to detect, extracted off
// line. With LIB_FILE empty the ROMs are filled with a deterministic
// stand-in set, element e of descriptor d being
//   h = ((d*64 + e + 1) * 2654435761) mod 2^32,
//   value = (h[31:8] - 2^23) * 4      (signed, |value| < 2^25);
// otherwise LIB_FILE is read with $readmemh (NLIB*DLEN words, descriptor
// major). Timing: registered read, q one cycle after addr.
module library_rom
  import surf_pkg::*;
#(
  parameter int    NLIB     = 128,
  parameter int    NROM     = 8,
  parameter string LIB_FILE = ""
) (
  input  logic                            clk,
  input  logic [$clog2(NLIB*DLEN/NROM)-1:0] addr,
  output delem_t                          q [NROM]
);
  localparam int DEPTH = NLIB * DLEN / NROM;
  localparam int STEPS = DLEN / NROM;

  function automatic delem_t lib_value(int d, int e);
    logic [63:0] h;
    h = (64'(d * DLEN + e + 1) * 64'd2654435761) & 64'hFFFF_FFFF;  // only h[31:8] is used
    return delem_t'((48'(h[31:8]) - 48'sd8388608) * 4);
  endfunction

  for (genvar b = 0; b < NROM; b++) begin : g_rom
    delem_t rom [DEPTH];
    delem_t flat [NLIB * DLEN];

    initial begin
      if (LIB_FILE != "") begin
        $readmemh(LIB_FILE, flat);
        for (int a = 0; a < DEPTH; a++) rom[a] = flat[(a / STEPS) * DLEN + (a % STEPS) * NROM + b];
      end else begin
        for (int a = 0; a < DEPTH; a++) rom[a] = lib_value(a / STEPS, (a % STEPS) * NROM + b);
      end
    end

    always_ff @(posedge clk) q[b] <= rom[addr];
  end
endmodule
