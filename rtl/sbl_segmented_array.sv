// sbl_segmented_array: SRAM array with segmented bitlines.
//
// ROWS wordlines by COLS columns; each column is a bitline pair (BL/nBL)
// split into SEGMENTS equal segments by SEGMENTS-1 segmenters (full CMOS
// transmission gates in the circuit). Segment 0 (rows 0..ROWS/SEGMENTS-1) is
// next to the precharge/read/write circuitry. A cell can only be read or
// written when every segmenter between its segment and that circuitry
// conducts; a cell cut off by an open segmenter cannot pull its bitline, so
// the sense amplifiers see the precharged level (read as all ones here) and
// the write drivers do not reach it (the write is lost). This is how the
// logic of the segmenters is modelled; the bitline voltages and the
// energy saving themselves are analogue and not modelled.
//
// Timing: synchronous, one access per clock. The cycle's wordline (one-hot
// or none), segmenter controls and write data are sampled at the rising
// edge; a read returns its row in rdata one cycle later, together with
// rd_ok (1 = the row was connected to the sense amplifiers). Writes use a
// per-column mask (wmask) standing for per-column write drivers. Reading
// all ones from an isolated row and the column write mask are this
// design's choices; the segment geometry follows the source design.
module sbl_segmented_array #(
  parameter int unsigned ROWS     = sbl_pkg::SETS,
  parameter int unsigned COLS     = 64,
  parameter int unsigned SEGMENTS = sbl_pkg::SEGMENTS,
  localparam int unsigned ROW_W   = $clog2(ROWS)
) (
  input  logic                clk,
  input  logic [ROWS-1:0]     wl,
  input  logic [SEGMENTS-2:0] sc,
  input  logic                we,
  input  logic [COLS-1:0]     wmask,
  input  logic [COLS-1:0]     wdata,
  output logic [COLS-1:0]     rdata,
  output logic                rd_ok
);

  localparam int unsigned ROWS_PER_SEG = ROWS / SEGMENTS;

  logic [COLS-1:0] mem [ROWS];

  logic [ROW_W-1:0] idx;
  logic             any;
  logic             connected;

  // Encode the wordline and find whether the row's segment is reachable.
  always_comb begin
    idx = '0;
    any = 1'b0;
    for (int unsigned r = 0; r < ROWS; r++) begin
      if (wl[r]) begin
        idx = ROW_W'(r);
        any = 1'b1;
      end
    end
    connected = 1'b1;
    for (int unsigned k = 0; k < SEGMENTS - 1; k++) begin
      if (k < 32'(idx) / ROWS_PER_SEG && !sc[k]) connected = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (any && we && connected) begin
      for (int unsigned b = 0; b < COLS; b++) begin
        if (wmask[b]) mem[idx][b] <= wdata[b];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (any && !we) begin
      rdata <= connected ? mem[idx] : '1;
      rd_ok <= connected;
    end
  end

  initial begin
    assert (ROWS % SEGMENTS == 0 && SEGMENTS >= 2)
      else $error("sbl_segmented_array: ROWS must split into SEGMENTS >= 2 equal segments");
  end

  // At most one wordline is raised per access.
  assert property (@(posedge clk) $onehot0(wl))
    else $error("sbl_segmented_array: more than one wordline raised");

endmodule
