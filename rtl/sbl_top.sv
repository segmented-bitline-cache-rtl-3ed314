// sbl_top: segmented bitline L1 cache.
//
// A 16 KB, 4-way set-associative cache with 64-byte lines (64 sets) whose
// tag and data arrays have bitlines cut into 8 segments. Accessing a row
// near the sense amplifiers charges only the short piece of bitline up to
// it, so it costs less power than accessing a far row. Because a few sets
// receive most accesses, the design moves the busiest sets to the near
// segments:
//   * the sets are grouped into SEGMENTS clusters by the set-index MSBs;
//   * sbl_cluster_counters counts accesses per cluster;
//   * sbl_map_ctrl periodically (every REMAP_INTERVAL cycles) and at every
//     context switch ranks the clusters and rewrites the cluster-to-segment
//     configuration register (dcf or dncf mode), or holds a profiled mapping
//     loaded by software (static mode); each remap invalidates the cache;
//   * sbl_remap_mux replaces the cluster bits of the set index by the
//     segment from the configuration register, sbl_row_decoder raises the
//     wordline and sbl_segmenter_ctrl opens every segmenter beyond the
//     accessed segment;
//   * sbl_cache_ctrl runs the cache itself on sbl_segmented_array
//     instances (one tag array holding all ways, one data array per way).
//
// Interface: CPU request/response (req_*/resp_*; a read hit answers in the
// cycle after the request is accepted), memory port (mem_*, whole-line
// read responses, posted word writes), mapping control (mode,
// context_switch, static_map/static_map_load) and observation outputs: the
// configuration register, the cluster counts, a remap strobe and the
// physical segment of every array access (seg_access), which is the activity
// factor a power estimate is built from. Synchronous active-low reset.
module sbl_top #(
  parameter int unsigned SETS           = sbl_pkg::SETS,
  parameter int unsigned WAYS           = sbl_pkg::WAYS,
  parameter int unsigned LINE_BYTES     = sbl_pkg::LINE_BYTES,
  parameter int unsigned SEGMENTS       = sbl_pkg::SEGMENTS,
  parameter int unsigned ADDR_W         = sbl_pkg::ADDR_W,
  parameter int unsigned WORD_W         = sbl_pkg::WORD_W,
  parameter int unsigned CNT_W          = sbl_pkg::CNT_W,
  parameter int unsigned REMAP_INTERVAL = sbl_pkg::REMAP_INTERVAL,
  localparam int unsigned OFF_W         = $clog2(LINE_BYTES),
  localparam int unsigned SET_W         = $clog2(SETS),
  localparam int unsigned TAG_W         = ADDR_W - OFF_W - SET_W,
  localparam int unsigned LINE_W        = LINE_BYTES * 8,
  localparam int unsigned WSTRB_W       = WORD_W / 8,
  localparam int unsigned SEG_W         = $clog2(SEGMENTS)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // CPU side
  input  logic                           req_valid,
  output logic                           req_ready,
  input  logic                           req_we,
  input  logic [ADDR_W-1:0]              req_addr,
  input  logic [WORD_W-1:0]              req_wdata,
  input  logic [WSTRB_W-1:0]             req_wstrb,
  output logic                           resp_valid,
  output logic [WORD_W-1:0]              resp_rdata,
  output logic                           resp_hit,
  // Memory side
  output logic                           mem_req_valid,
  input  logic                           mem_req_ready,
  output logic                           mem_req_we,
  output logic [ADDR_W-1:0]              mem_req_addr,
  output logic [WORD_W-1:0]              mem_req_wdata,
  output logic [WSTRB_W-1:0]             mem_req_wstrb,
  input  logic                           mem_resp_valid,
  input  logic [LINE_W-1:0]              mem_resp_line,
  // Mapping control
  input  sbl_pkg::map_mode_e             mode,
  input  logic                           context_switch,
  input  logic                           static_map_load,
  input  logic [SEGMENTS-1:0][SEG_W-1:0] static_map,
  // Observation
  output logic [SEGMENTS-1:0][SEG_W-1:0] map,
  output logic [SEGMENTS-1:0][CNT_W-1:0] cluster_counts,
  output logic                           remap_event,
  output logic                           seg_access_valid,
  output logic [SEG_W-1:0]               seg_access,
  output logic [SEGMENTS-2:0]            sc
);

  logic                        arr_access;
  logic [SET_W-1:0]            arr_set;
  logic [SET_W-1:0]            row;
  logic [SEG_W-1:0]            seg;
  logic [SEG_W-1:0]            cluster;
  logic [SETS-1:0]             wl;
  logic                        tag_we;
  logic [WAYS*TAG_W-1:0]       tag_wmask, tag_wdata, tag_rdata;
  logic                        tag_rd_ok;
  logic [WAYS-1:0]             data_we;
  logic [LINE_W-1:0]           data_wmask, data_wdata;
  logic [WAYS-1:0][LINE_W-1:0] data_rdata;
  logic [WAYS-1:0]             data_rd_ok;
  logic                        remap_req, remap_ack, remap_fire, counter_flush;

  sbl_cache_ctrl #(
    .SETS(SETS), .WAYS(WAYS), .LINE_BYTES(LINE_BYTES), .ADDR_W(ADDR_W), .WORD_W(WORD_W)
  ) u_ctrl (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_wstrb,
    .resp_valid, .resp_rdata, .resp_hit,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_req_wstrb, .mem_resp_valid, .mem_resp_line,
    .remap_req, .remap_ack, .remap_fire,
    .arr_access, .arr_set,
    .tag_we, .tag_wmask, .tag_wdata, .tag_rdata,
    .data_we, .data_wmask, .data_wdata, .data_rdata
  );

  sbl_remap_mux #(.SETS(SETS), .SEGMENTS(SEGMENTS)) u_remap (
    .set_idx(arr_set), .map, .row, .seg, .cluster
  );

  sbl_row_decoder #(.ROWS(SETS)) u_dec (
    .en(arr_access), .row, .wl
  );

  sbl_segmenter_ctrl #(.SEGMENTS(SEGMENTS)) u_sc (
    .access(arr_access), .seg, .sc
  );

  sbl_segmented_array #(.ROWS(SETS), .COLS(WAYS*TAG_W), .SEGMENTS(SEGMENTS)) u_tag (
    .clk, .wl, .sc, .we(tag_we), .wmask(tag_wmask), .wdata(tag_wdata),
    .rdata(tag_rdata), .rd_ok(tag_rd_ok)
  );

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    sbl_segmented_array #(.ROWS(SETS), .COLS(LINE_W), .SEGMENTS(SEGMENTS)) u_data (
      .clk, .wl, .sc, .we(data_we[w]), .wmask(data_wmask), .wdata(data_wdata),
      .rdata(data_rdata[w]), .rd_ok(data_rd_ok[w])
    );
  end

  sbl_cluster_counters #(.SEGMENTS(SEGMENTS), .CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n,
    .inc(req_valid && req_ready), .inc_cluster(cluster),
    .flush(counter_flush), .counts(cluster_counts)
  );

  sbl_map_ctrl #(.SEGMENTS(SEGMENTS), .CNT_W(CNT_W), .REMAP_INTERVAL(REMAP_INTERVAL)) u_map (
    .clk, .rst_n, .mode, .context_switch, .static_map_load, .static_map,
    .counts(cluster_counts), .remap_ack, .remap_req, .remap_fire, .counter_flush, .map
  );

  assign remap_event      = remap_fire;
  assign seg_access_valid = arr_access;
  assign seg_access       = seg;

  // Every read of the arrays must reach its row through the segmenters.
  logic rd_check;
  always_ff @(posedge clk) begin
    if (!rst_n) rd_check <= 1'b0;
    else        rd_check <= arr_access && !tag_we && (data_we == '0);
  end
  assert property (@(posedge clk) disable iff (!rst_n) rd_check |-> tag_rd_ok && (&data_rd_ok))
    else $error("sbl_top: array read through an open segmenter");

endmodule
