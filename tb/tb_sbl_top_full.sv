// tb_sbl_top_full: end-to-end run of the segmented bitline cache with every
// parameter at its default, including the 1,000,000-cycle remap interval:
// one dcf interval remap, a context switch, one dncf interval remap and a
// static map load (about 2.1 million cycles). Stimulus and checks are in
// sbl_top_driver.
module tb_sbl_top_full;
  logic clk = 1'b0;
  always #5 clk = ~clk;

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
  logic context_switch, static_map_load, remap_event, seg_access_valid, done;
  logic [7:0][2:0] static_map, map;
  logic [7:0][31:0] cluster_counts;
  logic [2:0] seg_access;
  logic [6:0] sc;
  int checks, failures;

  sbl_top dut (
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

  sbl_top_driver #(.DYN_REMAPS(1), .STATIC_REQS(400)) drv (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_wstrb,
    .resp_valid, .resp_rdata, .resp_hit, .mode, .context_switch, .static_map_load,
    .static_map, .map, .cluster_counts, .remap_event, .seg_access_valid, .seg_access, .sc,
    .done, .checks, .failures);

  initial begin
    repeat (2500000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
