// sbl_seg_variant: one sbl_top with a given segment count, its memory model
// and its driver, for testbenches that compare segment counts.
module sbl_seg_variant #(
  parameter int unsigned SEGMENTS = 4,
  localparam int unsigned SEG_W   = $clog2(SEGMENTS)
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  logic rst_n, req_valid, req_ready, req_we, resp_valid, resp_hit;
  logic [31:0] req_addr;
  logic [63:0] req_wdata, resp_rdata;
  logic [7:0]  req_wstrb;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr;
  logic [63:0] mem_req_wdata;
  logic [7:0]  mem_req_wstrb;
  logic [511:0] mem_resp_line;
  sbl_pkg::map_mode_e mode;
  logic context_switch, static_map_load, remap_event, seg_access_valid;
  logic [SEGMENTS-1:0][SEG_W-1:0] static_map, map;
  logic [SEGMENTS-1:0][31:0] cluster_counts;
  logic [SEG_W-1:0] seg_access;
  logic [SEGMENTS-2:0] sc;

  sbl_top #(.SEGMENTS(SEGMENTS), .REMAP_INTERVAL(2000)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_wstrb,
    .resp_valid, .resp_rdata, .resp_hit,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_req_wstrb, .mem_resp_valid, .mem_resp_line,
    .mode, .context_switch, .static_map_load, .static_map,
    .map, .cluster_counts, .remap_event, .seg_access_valid, .seg_access, .sc);

  sbl_mem_model #(.LINE_BYTES(64), .LAT(4)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata), .req_wstrb(mem_req_wstrb),
    .resp_valid(mem_resp_valid), .resp_line(mem_resp_line));

  sbl_top_driver #(.SEGMENTS(SEGMENTS), .DYN_REMAPS(3), .STATIC_REQS(400)) drv (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_wstrb,
    .resp_valid, .resp_rdata, .resp_hit, .mode, .context_switch, .static_map_load,
    .static_map, .map, .cluster_counts, .remap_event, .seg_access_valid, .seg_access, .sc,
    .done, .checks, .failures);
endmodule
