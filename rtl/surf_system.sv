// surf_system: the hardware-only SURF object detector. RGB video goes in;
// once per frame a decision comes out whether the library object (a stop
// sign in the original design) is in the frame.
//
// Data flow: integral_image_gen (gray, position, integral image) feeds the
// interest_point_detector and the memory control logic, which stores the
// integral image in the external DDR3 memory (two frame banks). Interest
// points, tagged with their frame bank, wait in a FIFO; a frame-end marker
// follows each frame's points. mem_ctrl fetches each point's neighbourhood
// from memory into the descriptor_extractor; descriptors and markers go
// through a descriptor FIFO to the descriptor_matcher, which compares them
// with the library ROM and decides at each marker. The FIFO depths
// (IPF_DEPTH points, 4 descriptors), the marker scheme and the single clock
// domain are this design's; the block structure is the original design's.
// A frame's points wait in the FIFO until the frame is complete and are
// described while the next frame streams in; a matched descriptor costs
// 1026 cycles, so the 512 points of the default depth take about 525,000
// cycles, inside one 800x600 frame time (about 663,000 clocks with SVGA
// blanking). Points beyond the FIFO depth are dropped and counted
// (ip_dropped). The points of a frame must be done before the frame after
// next overwrites its memory bank; the matcher rate guarantees this at the
// default sizes, not at much smaller frame sizes.
// Interface: video (rgb, vsync, hsync, de); the memory write port
// (ddr_wr_*) and the in-order read port (ddr_rd_*) to an external memory
// controller; the decision (det_valid, detected, det_sum); counters of
// detected points, dropped points and descriptors for observation.
// Timing: a frame's descriptors are computed while the next frame streams
// in; its decision follows after its last descriptor has been matched.
module surf_system
  import surf_pkg::*;
#(
  parameter int          W           = 800,
  parameter int          H           = 600,
  parameter int          HESS_THRESH = 400,
  parameter logic [63:0] MATCH_THRESH = 64'd8053063680,
  parameter string       LIB_FILE    = "",
  parameter int          IPF_DEPTH   = 512
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [23:0]   rgb,
  input  logic          vsync,
  input  logic          hsync,
  input  logic          de,
  output logic          ddr_wr_en,
  output logic [20:0]   ddr_wr_addr,
  output logic [IW-1:0] ddr_wr_data,
  output logic          ddr_rd_req,
  output logic [20:0]   ddr_rd_addr,
  input  logic          ddr_rd_ready,
  input  logic          ddr_rd_valid,
  input  logic [IW-1:0] ddr_rd_data,
  output logic          det_valid,
  output logic          detected,
  output logic [63:0]   det_sum,
  output logic [15:0]   ip_count,
  output logic [15:0]   ip_dropped,
  output logic [15:0]   desc_count
);
  localparam int MARK_DLY = 8;

  logic          iv, ife;
  logic [IW-1:0] iiv;
  logic [9:0]    icol, irow;
  logic [19:0]   iaddr;

  integral_image_gen #(.W(W), .H(H)) u_iig (
    .clk, .rst, .rgb, .vsync, .hsync, .de,
    .ii_valid(iv), .ii(iiv), .ii_col(icol), .ii_row(irow), .ii_addr(iaddr),
    .ii_frame_end(ife));

  logic       pv;
  logic [9:0] px, py;
  logic [1:0] ps;
  logic       cand_seen, cand_ovf;

  interest_point_detector #(.W(W), .THRESH(HESS_THRESH)) u_ipd (
    .clk, .rst, .ii_valid(iv), .ii(iiv), .ii_col(icol), .ii_row(irow),
    .ip_valid(pv), .ip_x(px), .ip_y(py), .ip_scale(ps),
    .cand_seen, .cand_overflow(cand_ovf));

  // frame-end marker, delayed past the detector latency
  logic [MARK_DLY-1:0] fe_sr;
  logic                mark_pend, ip_bank;
  always_ff @(posedge clk) begin
    if (rst) fe_sr <= '0;
    else     fe_sr <= {fe_sr[MARK_DLY-2:0], ife};
  end

  ip_t  ipf_din, ipf_dout;
  logic ipf_wr, ipf_full, ipf_empty, ipf_pop, ipf_ovf;
  always_comb begin
    ipf_wr  = pv || mark_pend;
    ipf_din = '0;
    ipf_din.bank = ip_bank;
    if (pv) begin
      ipf_din.x = px; ipf_din.y = py; ipf_din.scale = ps;
    end else begin
      ipf_din.marker = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mark_pend <= 1'b0; ip_bank <= 1'b0; ip_count <= '0; ip_dropped <= '0;
    end else begin
      if (fe_sr[MARK_DLY-1]) mark_pend <= 1'b1;
      if (mark_pend && !pv && !ipf_full) begin
        mark_pend <= 1'b0;
        ip_bank   <= ~ip_bank;
      end
      if (pv) ip_count <= ip_count + 1'b1;
      if (pv && ipf_full) ip_dropped <= ip_dropped + 1'b1;
    end
  end

  sync_fifo #(.WIDTH($bits(ip_t)), .DEPTH(IPF_DEPTH)) u_ipf (
    .clk, .rst, .wr_en(ipf_wr), .din(ipf_din), .full(ipf_full),
    .rd_en(ipf_pop), .dout(ipf_dout), .empty(ipf_empty), .overflow(ipf_ovf));

  logic          ext_start, ext_busy, dvalid, nbv, mpush, dff_full, wbank;
  logic [1:0]    ext_scale;
  logic [IW-1:0] nbd;
  delem_t        desc [DLEN];

  mem_ctrl #(.W(W), .H(H), .NB(26)) u_mc (
    .clk, .rst, .ii_valid(iv), .ii(iiv), .ii_addr(iaddr), .ii_frame_end(ife),
    .wr_en(ddr_wr_en), .wr_addr(ddr_wr_addr), .wr_data(ddr_wr_data), .wr_bank(wbank),
    .rd_req(ddr_rd_req), .rd_addr(ddr_rd_addr), .rd_ready(ddr_rd_ready),
    .rd_valid(ddr_rd_valid), .rd_data(ddr_rd_data),
    .ip_empty(ipf_empty), .ip_head(ipf_dout), .ip_pop(ipf_pop),
    .ext_start, .ext_scale, .nb_valid(nbv), .nb_data(nbd),
    .ext_busy, .ext_done(dvalid), .dfifo_full(dff_full), .marker_push(mpush));

  descriptor_extractor u_ext (
    .clk, .rst, .start(ext_start), .scale(ext_scale), .nb_valid(nbv), .nb_data(nbd),
    .busy(ext_busy), .desc_valid(dvalid), .desc);

  // descriptor FIFO: {marker, 64 elements}
  localparam int DFW = 1 + DLEN * DW;
  logic [DFW-1:0] dff_din, dff_dout;
  logic           dff_empty, dff_pop, dff_ovf, m_ready;
  delem_t         mdesc [DLEN];
  always_comb begin
    dff_din[DFW-1] = mpush;
    for (int i = 0; i < DLEN; i++) begin
      dff_din[i*DW +: DW] = desc[i];
      mdesc[i] = dff_dout[i*DW +: DW];
    end
  end

  sync_fifo #(.WIDTH(DFW), .DEPTH(4)) u_dff (
    .clk, .rst, .wr_en(dvalid || mpush), .din(dff_din), .full(dff_full),
    .rd_en(dff_pop), .dout(dff_dout), .empty(dff_empty), .overflow(dff_ovf));

  assign dff_pop = !dff_empty && m_ready;

  descriptor_matcher #(.THRESH(MATCH_THRESH), .LIB_FILE(LIB_FILE)) u_match (
    .clk, .rst, .in_valid(!dff_empty), .in_marker(dff_dout[DFW-1]), .in_desc(mdesc),
    .in_ready(m_ready), .det_valid, .detected, .det_sum, .desc_count);

  logic unused;
  assign unused = cand_seen ^ cand_ovf ^ ipf_ovf ^ dff_ovf ^ wbank;
endmodule
