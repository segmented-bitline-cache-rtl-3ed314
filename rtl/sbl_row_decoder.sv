// sbl_row_decoder: row (wordline) decoder of a segmented array.
//
// Turns the physical row address produced by the remap mux into one-hot
// wordlines WL[0..ROWS-1]; no wordline rises when en is low. Row r belongs
// to segment r / (ROWS/SEGMENTS), so rows 0..7 of a 64-row, 8-segment array
// sit next to the sense amplifiers. Purely combinational. The wordline
// count follows the source design; the plain one-hot structure is this
// design's choice, since only the remap mux in front of it is specified.
module sbl_row_decoder #(
  parameter int unsigned ROWS = sbl_pkg::SETS,
  localparam int unsigned ROW_W = $clog2(ROWS)
) (
  input  logic             en,
  input  logic [ROW_W-1:0] row,
  output logic [ROWS-1:0]  wl
);

  always_comb begin
    wl = '0;
    if (en) wl[row] = 1'b1;
  end

endmodule
