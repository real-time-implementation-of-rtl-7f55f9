// tb_descriptor_matcher: sends frames of descriptors and frame markers and
// checks the decision against a model: for every library descriptor the
// smallest L1 distance over the frame, the sum of the 30 smallest of those
// minima, detected = sum < THRESH. Frame 1 holds 30 exact library
// descriptors (sum 0, detected), frame 2 library descriptors with small
// noise (detected), frame 3 unrelated random descriptors (not detected),
// frame 4 is empty. Also checks the busy time per descriptor (NLIB*8+1
// cycles with in_ready low) and the descriptor count.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_descriptor_matcher;
  import surf_pkg::*;
  localparam longint THRESH = 64'd8053063680;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_marker = 0, in_ready, det_valid, detected;
  delem_t in_desc [DLEN];
  logic [63:0] det_sum;
  logic [15:0] desc_count;
  descriptor_matcher dut (.clk, .rst, .in_valid, .in_marker, .in_desc, .in_ready,
    .det_valid, .detected, .det_sum, .desc_count);
  `WATCHDOG(400000)
  longint lib [128][64];
  longint mind [128];
  int ndesc = 0;
  function automatic longint lv(int d, int e);
    longint h;
    h = (longint'(d * 64 + e + 1) * 64'd2654435761) & 64'hFFFF_FFFF;
    return ((h >> 8) - 8388608) * 4;
  endfunction
  task automatic send(longint v [64]);
    int busy;
    foreach (v[i]) in_desc[i] = DW'(v[i]);
    while (!in_ready) @(negedge clk);
    in_valid = 1; in_marker = 0; @(negedge clk); in_valid = 0;
    busy = 0;
    while (!in_ready) begin busy++; @(negedge clk); end
    `CHECK(busy == 128 * 8 + 1, $sformatf("busy %0d cycles", busy))
    for (int d = 0; d < 128; d++) begin
      longint s = 0;
      s = 0;
      for (int e = 0; e < 64; e++) s += (v[e] > lib[d][e]) ? v[e] - lib[d][e] : lib[d][e] - v[e];
      if (s < mind[d]) mind[d] = s;
    end
    ndesc++;
  endtask
  task automatic marker(bit expect_det, string name);
    longint m [$], sum;
    int wait_c;
    foreach (mind[d]) m.push_back(mind[d]);
    m.sort();
    sum = 0;
    for (int i = 0; i < 30; i++) sum += m[i];
    while (!in_ready) @(negedge clk);
    in_valid = 1; in_marker = 1; @(negedge clk); in_valid = 0; in_marker = 0;
    wait_c = 0;
    while (!det_valid && wait_c < 1000) begin wait_c++; @(negedge clk); end
    `CHECK(det_valid, {name, ": decision made"})
    `CHECK(det_sum == 64'(sum), $sformatf("%s: sum %0d vs %0d", name, det_sum, sum))
    `CHECK(detected == (sum < THRESH), $sformatf("%s: detected %0b", name, detected))
    `CHECK(detected == expect_det, $sformatf("%s: expected detected=%0b (sum %0d)", name, expect_det, sum))
    `CHECK(wait_c <= 128 + 4, $sformatf("%s: decision took %0d cycles", name, wait_c))
    `CHECK(int'(desc_count) == ndesc, $sformatf("%s: count %0d", name, desc_count))
    foreach (mind[d]) mind[d] = 64'h00FF_FFFF_FFFF_FFFF;
    @(negedge clk);
  endtask
  initial begin
    longint v [64];
    foreach (lib[d, e]) lib[d][e] = lv(d, e);
    foreach (mind[d]) mind[d] = 64'h00FF_FFFF_FFFF_FFFF;
    foreach (in_desc[i]) in_desc[i] = 0;
    repeat (2) @(negedge clk); rst = 0;
    // frame 1: exact library descriptors
    for (int d = 0; d < 30; d++) begin
      foreach (v[e]) v[e] = lib[d * 4][e];
      send(v);
    end
    marker(1, "exact");
    // frame 2: library descriptors plus noise
    for (int d = 0; d < 40; d++) begin
      foreach (v[e]) v[e] = lib[(d * 3) % 128][e] + longint'($urandom_range(0, 4000000)) - 2000000;
      send(v);
    end
    marker(1, "noisy");
    // frame 3: unrelated descriptors
    for (int d = 0; d < 20; d++) begin
      foreach (v[e]) v[e] = longint'($urandom_range(0, 32'd60000000)) - 30000000;
      send(v);
    end
    marker(0, "unrelated");
    // frame 4: nothing
    marker(0, "empty");
    `TB_FINISH
  end
endmodule
