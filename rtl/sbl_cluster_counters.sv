// sbl_cluster_counters: one access counter per cluster of sets.
//
// Every cache access increments the counter of the cluster its set belongs
// to (the set-index MSBs). The counts guide the next remap: in dcf mode the
// map controller flushes them at every remap so they cover one interval, in
// dncf mode they are never flushed and accumulate from reset. Counters
// saturate at all ones rather than wrap (this design's choice, so a long
// dncf run cannot reverse the order of two clusters).
//
// Timing: counts update at the rising clock edge. When flush and inc arrive
// in the same cycle the counters restart from zero and the new access is
// counted into the new interval. Reset (rst_n low, synchronous) clears all.
module sbl_cluster_counters #(
  parameter int unsigned SEGMENTS = sbl_pkg::SEGMENTS,
  parameter int unsigned CNT_W    = sbl_pkg::CNT_W,
  localparam int unsigned SEG_W   = $clog2(SEGMENTS)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              inc,
  input  logic [SEG_W-1:0]                  inc_cluster,
  input  logic                              flush,
  output logic [SEGMENTS-1:0][CNT_W-1:0]    counts
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      counts <= '0;
    end else begin
      for (int unsigned c = 0; c < SEGMENTS; c++) begin
        if (flush) begin
          counts[c] <= (inc && 32'(inc_cluster) == c) ? CNT_W'(1) : '0;
        end else if (inc && 32'(inc_cluster) == c && counts[c] != '1) begin
          counts[c] <= counts[c] + 1'b1;
        end
      end
    end
  end

endmodule
