// sbl_top_driver: stimulus and checking for end-to-end runs of sbl_top.
//
// Works for any power-of-two SEGMENTS from 2 to 8 (hot clusters scale with
// it). Drives a skewed request stream (most accesses go to one "hot" cluster of
// sets, the rest spread over the whole cache, a quarter of them writes)
// through four phases:
//   1. dcf mode, hot cluster 5 (of 8), until DYN_REMAPS interval remaps;
//   2. a context switch, which must cause a remap at once;
//   3. dncf mode, hot cluster 2 (of 8), until DYN_REMAPS more interval remaps;
//   4. static mode: a profile map is loaded, then STATIC_REQS requests run
//      without any further remap.
// Checks, independent of the design's internals:
//   * read data against a reference memory; hit/miss against a reference
//     LRU cache that is invalidated at every remap;
//   * the cluster counts the design reports against counts kept here
//     (flushed at each remap in dcf, kept in dncf);
//   * every new map is the ranking of those counts (most accessed cluster in
//     segment 0) or the loaded profile map;
//   * every array access uses the segment the current map gives for the
//     request's cluster, and the segmenter controls match that segment;
//   * after a remap the hot cluster sits in segment 0.
// It counts every mechanism (read/write hit/miss, eviction, interval remap
// in dcf and dncf, context-switch remap, static load, counter flush) and
// counts a failure for any that never occurred.
module sbl_top_driver #(
  parameter int unsigned SEGMENTS    = 8,
  parameter int unsigned DYN_REMAPS  = 3,
  parameter int unsigned STATIC_REQS = 400,
  localparam int unsigned SEG_W      = $clog2(SEGMENTS),
  localparam int unsigned SPC        = 64 / SEGMENTS   // sets per cluster
) (
  input  logic                 clk,
  output logic                 rst_n,
  output logic                 req_valid,
  input  logic                 req_ready,
  output logic                 req_we,
  output logic [31:0]          req_addr,
  output logic [63:0]          req_wdata,
  output logic [7:0]           req_wstrb,
  input  logic                 resp_valid,
  input  logic [63:0]          resp_rdata,
  input  logic                 resp_hit,
  output sbl_pkg::map_mode_e   mode,
  output logic                 context_switch,
  output logic                 static_map_load,
  output logic [SEGMENTS-1:0][SEG_W-1:0] static_map,
  input  logic [SEGMENTS-1:0][SEG_W-1:0] map,
  input  logic [SEGMENTS-1:0][31:0]      cluster_counts,
  input  logic                 remap_event,
  input  logic                 seg_access_valid,
  input  logic [SEG_W-1:0]     seg_access,
  input  logic [SEGMENTS-2:0]  sc,
  output logic                 done,
  output int                   checks,
  output int                   failures
);
  import sbl_tb_pkg::*;

  ref_mem   rmem;
  ref_cache rc;

  // Hot clusters of phases 1 and 3 (5 and 2 for 8 segments).
  localparam int HOT1 = SEGMENTS * 5 / 8;
  localparam int HOT2 = SEGMENTS * 2 / 8;

  int unsigned tb_cnt [SEGMENTS];
  int unsigned seg_hist [SEGMENTS];
  logic [SEGMENTS-1:0][SEG_W-1:0] exp_map;
  logic            map_pending;
  logic [5:0]      cur_set;
  int n_rd_hit, n_rd_miss, n_wr_hit, n_wr_miss;
  int n_remap_dcf, n_remap_dncf, n_remap_cs, n_static_load, n_flush_seen;
  int hot_in_seg0;
  bit cs_expected, load_expected;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic logic [SEGMENTS-1:0][SEG_W-1:0] rank(input int unsigned c [SEGMENTS]);
    int order [SEGMENTS];
    logic [SEGMENTS-1:0][SEG_W-1:0] m;
    for (int i = 0; i < SEGMENTS; i++) order[i] = i;
    for (int i = 1; i < SEGMENTS; i++) begin
      int j, key;
      key = order[i];
      j = i - 1;
      while (j >= 0 && (c[order[j]] < c[key] || (c[order[j]] == c[key] && order[j] > key))) begin
        order[j + 1] = order[j];
        j--;
      end
      order[j + 1] = key;
    end
    for (int p = 0; p < SEGMENTS; p++) m[order[p]] = SEG_W'(p);
    return m;
  endfunction

  // Sample everything half a cycle before the edge that acts on it.
  always @(negedge clk) begin
    if (rst_n) begin
      if (map_pending) begin
        check(map === exp_map, "map after remap");
        if (map !== exp_map) $display("  map=%h exp=%h", map, exp_map);
        map_pending <= 1'b0;
      end
      if (seg_access_valid) begin
        logic [SEGMENTS-2:0] exp_sc;
        int cl;
        // the access of the accepting cycle belongs to the new request
        cl = (req_valid && req_ready) ? int'(req_addr[11:6]) / SPC : int'(cur_set) / SPC;
        check(seg_access === map[cl], "access uses the mapped segment");
        exp_sc = '0;
        for (int k = 0; k < SEGMENTS - 1; k++) exp_sc[k] = (k < int'(map[cl]));
        check(sc === exp_sc, "segmenter controls for the accessed segment");
        seg_hist[seg_access]++;
      end
      if (remap_event) begin
        bit flushed;
        for (int c = 0; c < SEGMENTS; c++) check(cluster_counts[c] == tb_cnt[c], "cluster counts");
        if (load_expected) begin
          exp_map = static_map;
          n_static_load++;
          load_expected = 1'b0;
          flushed = 1'b1;
        end else begin
          exp_map = rank(tb_cnt);
          if (cs_expected) begin
            n_remap_cs++;
            cs_expected = 1'b0;
          end else if (mode == sbl_pkg::MAP_DCF) n_remap_dcf++;
          else n_remap_dncf++;
          flushed = (mode == sbl_pkg::MAP_DCF);
        end
        if (flushed) begin
          n_flush_seen++;
          foreach (tb_cnt[c]) tb_cnt[c] = 0;
        end
        map_pending <= 1'b1;
        rc.invalidate();
      end
      if (req_valid && req_ready) begin
        tb_cnt[int'(req_addr[11:6]) / SPC]++;
        cur_set = req_addr[11:6];
      end
    end
  end

  task automatic do_req(input logic [31:0] addr, input logic we, input logic [63:0] d,
                        input logic [7:0] strb);
    bit exp_hit;
    int n;
    req_valid = 1'b1; req_we = we; req_addr = addr; req_wdata = d; req_wstrb = strb;
    do @(posedge clk); while (!req_ready);
    #1 req_valid = 1'b0;
    exp_hit = rc.access(addr, we);
    n = 1;
    while (!resp_valid && n < 200) begin
      @(posedge clk); #1;
      n++;
    end
    check(resp_valid === 1'b1, "response arrives");
    check(resp_hit === exp_hit, "hit/miss as reference LRU cache");
    if (!we) begin
      check(resp_rdata === rmem.read(addr), "read data");
      if (exp_hit) begin
        check(n == 1, "read hit answered in the cycle after acceptance");
        n_rd_hit++;
      end else n_rd_miss++;
    end else begin
      rmem.write(addr, d, strb);
      if (exp_hit) n_wr_hit++; else n_wr_miss++;
    end
    @(posedge clk); #1;
  endtask

  task automatic random_req(input int hot);
    int st, tg;
    logic [31:0] a;
    if ($urandom_range(9, 0) < 6) begin
      st = hot * SPC + $urandom_range(SPC - 1, 0);
      tg = $urandom_range(4, 0);
    end else begin
      st = $urandom_range(63, 0);
      tg = $urandom_range(5, 0);
    end
    a = {12'(tg) + 12'h2A0, 8'h00, 6'(st), 3'($urandom_range(7, 0)), 3'b000};
    if ($urandom_range(3, 0) == 0) do_req(a, 1'b1, {$urandom, $urandom}, 8'($urandom));
    else do_req(a, 1'b0, '0, '0);
  endtask

  initial begin
    int target;
    rmem = new();
    rc = new(64, 4, 64);
    checks = 0; failures = 0; done = 1'b0;
    n_rd_hit = 0; n_rd_miss = 0; n_wr_hit = 0; n_wr_miss = 0;
    n_remap_dcf = 0; n_remap_dncf = 0; n_remap_cs = 0; n_static_load = 0; n_flush_seen = 0;
    hot_in_seg0 = 0;
    foreach (tb_cnt[c]) tb_cnt[c] = 0;
    foreach (seg_hist[c]) seg_hist[c] = 0;
    map_pending = 1'b0; cs_expected = 1'b0; load_expected = 1'b0; cur_set = '0;
    rst_n = 1'b0; req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_wstrb = 0;
    mode = sbl_pkg::MAP_DCF; context_switch = 0; static_map_load = 0; static_map = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. dcf, first hot cluster
    while (n_remap_dcf < int'(DYN_REMAPS)) random_req(HOT1);
    repeat (3) @(posedge clk);
    #1 check(map[HOT1] == '0, "first hot cluster mapped to segment 0 (dcf)");
    if (map[HOT1] == '0) hot_in_seg0++;

    // 2. context switch
    target = n_remap_cs + 1;
    cs_expected = 1'b1;
    context_switch = 1'b1;
    @(posedge clk); #1 context_switch = 1'b0;
    repeat (20) begin
      random_req(HOT1);
      if (n_remap_cs == target) break;
    end
    check(n_remap_cs == target, "context switch caused a remap");

    // 3. dncf, second hot cluster (the counters were last flushed by the
    //    context-switch remap, which happened in dcf mode)
    mode = sbl_pkg::MAP_DNCF;
    target = n_remap_dncf + int'(DYN_REMAPS);
    while (n_remap_dncf < target) random_req(HOT2);
    repeat (3) @(posedge clk);
    #1 check(map[HOT2] == '0, "second hot cluster mapped to segment 0 (dncf)");
    if (map[HOT2] == '0) hot_in_seg0++;

    // 4. static profile map: cluster c -> segment SEGMENTS-1-c
    mode = sbl_pkg::MAP_STATIC;
    for (int c = 0; c < SEGMENTS; c++) static_map[c] = SEG_W'(SEGMENTS - 1 - c);
    load_expected = 1'b1;
    static_map_load = 1'b1;
    @(posedge clk); #1 static_map_load = 1'b0;
    begin
      int n_before;
      n_before = n_remap_dcf + n_remap_dncf + n_remap_cs;
      for (int i = 0; i < int'(STATIC_REQS); i++) random_req(SEGMENTS - 1);
      check(n_remap_dcf + n_remap_dncf + n_remap_cs == n_before, "no dynamic remap in static mode");
    end
    check(map[SEGMENTS-1] == '0, "static profile map applied");

    $display("read hits %0d misses %0d, write hits %0d misses %0d, evictions %0d",
             n_rd_hit, n_rd_miss, n_wr_hit, n_wr_miss, rc.evictions);
    $display("remaps: dcf %0d dncf %0d context-switch %0d static-load %0d, counter flushes %0d",
             n_remap_dcf, n_remap_dncf, n_remap_cs, n_static_load, n_flush_seen);
    $write("array accesses per segment (%0d segments):", SEGMENTS);
    for (int c = 0; c < SEGMENTS; c++) $write(" %0d", seg_hist[c]);
    $write("\n");
    check(n_rd_hit > 0,  "read hits occurred");
    check(n_rd_miss > 0, "read misses occurred");
    check(n_wr_hit > 0,  "write hits occurred");
    check(n_wr_miss > 0, "write misses occurred");
    check(rc.evictions > 0, "evictions occurred");
    check(n_remap_dcf > 0, "dcf interval remap occurred");
    check(n_remap_dncf > 0, "dncf interval remap occurred");
    check(n_remap_cs > 0, "context switch remap occurred");
    check(n_static_load > 0, "static map load occurred");
    check(n_flush_seen > 0, "counter flush occurred");
    check(hot_in_seg0 == 2, "hot clusters moved to segment 0");
    check(seg_hist[0] > seg_hist[SEGMENTS-1], "near segment used more than the far one");
    done = 1'b1;
  end
endmodule
