// sbl_map_ctrl: cluster-to-segment mapping controller.
//
// Holds the configuration register map[c] = physical segment of cluster c
// and decides when and how it changes:
//   * static mapping: software loads a profiled mapping through static_map /
//     static_map_load; the hardware never changes it;
//   * dcf / dncf dynamic remapping: at the end of every REMAP_INTERVAL cycles
//     and at every context switch the clusters are ranked by their access
//     counts and the most accessed cluster goes to segment 0 (nearest the
//     sense amplifiers, lowest power), the next to segment 1, and so on.
//     Equal counts are ranked by cluster number. In dcf mode the counters are
//     flushed at each remap, in dncf mode they are not.
// Moving a cluster to another segment moves its rows, so every remap is
// paired with an invalidation of the whole cache.
//
// The ranking is a full comparison network: rank[i] = number of clusters j
// with count[j] > count[i], or count[j] == count[i] and j < i. The ranks form
// a permutation, so the new map is always a valid one-to-one mapping.
//
// Handshake with the cache: remap_req rises when a remap is pending and
// stays high until the cache answers remap_ack (it does so only when idle).
// In the cycle with both high (remap_fire) the new map is written at the
// clock edge, the cache clears its valid bits and, in dcf mode or on a
// static load, counter_flush clears the access counters. Reset (synchronous,
// active low) sets the identity map. The interval timer restarts after every
// remap. Triggering a remap on both the interval and a context switch follows
// the source design, which names both; the handshake, tie-break and timer
// restart are this design's choices.
module sbl_map_ctrl #(
  parameter int unsigned SEGMENTS       = sbl_pkg::SEGMENTS,
  parameter int unsigned CNT_W          = sbl_pkg::CNT_W,
  parameter int unsigned REMAP_INTERVAL = sbl_pkg::REMAP_INTERVAL,
  localparam int unsigned SEG_W         = $clog2(SEGMENTS),
  localparam int unsigned TMR_W         = $clog2(REMAP_INTERVAL + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  sbl_pkg::map_mode_e                        mode,
  input  logic                             context_switch,
  input  logic                             static_map_load,
  input  logic [SEGMENTS-1:0][SEG_W-1:0]   static_map,
  input  logic [SEGMENTS-1:0][CNT_W-1:0]   counts,
  input  logic                             remap_ack,
  output logic                             remap_req,
  output logic                             remap_fire,
  output logic                             counter_flush,
  output logic [SEGMENTS-1:0][SEG_W-1:0]   map
);

  logic                           pend_dyn, pend_load;
  logic [SEGMENTS-1:0][SEG_W-1:0] load_map;
  logic [SEGMENTS-1:0][SEG_W-1:0] rank_map;
  logic [TMR_W-1:0]               timer;
  logic                           dynamic;
  logic                           interval_end;

  assign dynamic      = (mode == sbl_pkg::MAP_DCF) || (mode == sbl_pkg::MAP_DNCF);
  assign interval_end = (timer == TMR_W'(REMAP_INTERVAL - 1));

  // Rank every cluster by its access count: rank 0 = most accessed.
  always_comb begin
    for (int unsigned i = 0; i < SEGMENTS; i++) begin
      logic [SEG_W:0] r;
      r = '0;
      for (int unsigned j = 0; j < SEGMENTS; j++) begin
        if (counts[j] > counts[i] || (counts[j] == counts[i] && j < i)) r = r + 1'b1;
      end
      rank_map[i] = r[SEG_W-1:0];
    end
  end

  assign remap_req     = pend_dyn || pend_load;
  assign remap_fire    = remap_req && remap_ack;
  assign counter_flush = remap_fire && (pend_load || mode == sbl_pkg::MAP_DCF);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned c = 0; c < SEGMENTS; c++) map[c] <= SEG_W'(c);
      load_map  <= '0;
      pend_dyn  <= 1'b0;
      pend_load <= 1'b0;
      timer     <= '0;
    end else begin
      timer <= interval_end ? '0 : timer + 1'b1;
      if (dynamic && (interval_end || context_switch)) pend_dyn <= 1'b1;
      if (!dynamic) pend_dyn <= 1'b0;
      if (static_map_load) begin
        pend_load <= 1'b1;
        load_map  <= static_map;
      end
      if (remap_fire) begin
        map       <= pend_load ? load_map : rank_map;
        pend_load <= static_map_load;
        pend_dyn  <= dynamic && context_switch;
        timer     <= '0;
      end
    end
  end

endmodule
