// sbl_remap_mux: cluster-to-segment remapping in front of the row decoder.
//
// Sets are clustered statically by the most significant bits of the set
// index: with 64 sets and 8 segments, set[5:3] names the cluster and set[2:0]
// the row inside it. The configuration register (held in sbl_map_ctrl)
// gives, for each cluster, the physical segment it lives in. This block is
// the multiplexer that replaces the cluster bits by that segment number, so
// the only delay added to the decoder path is one SEGMENTS:1 mux per segment
// address bit (SEG_W muxes in all), which is the structure the source design
// describes.
//
// Purely combinational. Interface: set_idx = logical set index, map =
// configuration register (map[c] = segment of cluster c), row = physical
// row, seg = its segment, cluster = the logical cluster of set_idx.
module sbl_remap_mux #(
  parameter int unsigned SETS     = sbl_pkg::SETS,
  parameter int unsigned SEGMENTS = sbl_pkg::SEGMENTS,
  localparam int unsigned SET_W   = $clog2(SETS),
  localparam int unsigned SEG_W   = $clog2(SEGMENTS)
) (
  input  logic [SET_W-1:0]                 set_idx,
  input  logic [SEGMENTS-1:0][SEG_W-1:0]   map,
  output logic [SET_W-1:0]                 row,
  output logic [SEG_W-1:0]                 seg,
  output logic [SEG_W-1:0]                 cluster
);

  assign cluster = set_idx[SET_W-1 -: SEG_W];
  assign seg     = map[cluster];
  assign row     = {seg, set_idx[SET_W-SEG_W-1:0]};

endmodule
