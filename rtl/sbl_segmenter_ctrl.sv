// sbl_segmenter_ctrl: drives the segmenter control lines (SC) of a
// segmented bitline.
//
// The bitline is cut into SEGMENTS segments; segment 0 is the one next to the
// precharge/sense/write circuitry. Segmenter k (SC line k, SC1 in the usual
// 1-based naming is sc[0]) sits between segment k and segment k+1. To reach a
// cell in segment s, segmenters 0..s-1 must conduct and all farther ones are
// opened, so only the bitline length up to segment s is charged and
// discharged. When no access is being evaluated (the precharge phase) every
// segmenter conducts so that the whole bitline is precharged, as the source
// design specifies.
//
// Purely combinational. Interface: access = an access is being evaluated in
// this cycle, seg = physical segment of the accessed row, sc = one bit per
// segmenter, 1 = transmission gate on. Treating every non-access cycle as the
// precharge phase is this design's synchronous abstraction of the
// clock-low precharge of the circuit.
module sbl_segmenter_ctrl #(
  parameter int unsigned SEGMENTS = sbl_pkg::SEGMENTS,
  localparam int unsigned SEG_W   = $clog2(SEGMENTS)
) (
  input  logic                access,
  input  logic [SEG_W-1:0]    seg,
  output logic [SEGMENTS-2:0] sc
);

  always_comb begin
    for (int unsigned k = 0; k < SEGMENTS - 1; k++) begin
      sc[k] = !access || (32'(seg) > k);
    end
  end

endmodule
