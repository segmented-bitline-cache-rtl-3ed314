// tb_sbl_map_ctrl: checks the mapping controller with a short interval.
//  - identity map after reset;
//  - a dynamic remap is requested exactly REMAP_INTERVAL cycles after reset
//    and after each remap;
//  - the new map ranks clusters by count (sorted independently here);
//  - dcf flushes the counters at a remap, dncf does not;
//  - a context switch requests a remap in dynamic modes only;
//  - the request waits for remap_ack and the map holds until then;
//  - a static map load is applied and no dynamic remap follows in static mode.
module tb_sbl_map_ctrl;
  import sbl_pkg::*;
  localparam int unsigned SEGMENTS = 8, CNT_W = 16, INTERVAL = 20;

  logic clk = 1'b0, rst_n;
  map_mode_e mode;
  logic context_switch, static_map_load, remap_ack;
  logic [7:0][2:0]  static_map, map;
  logic [7:0][15:0] counts;
  logic remap_req, remap_fire, counter_flush;
  int checks = 0, failures = 0;

  sbl_map_ctrl #(.SEGMENTS(SEGMENTS), .CNT_W(CNT_W), .REMAP_INTERVAL(INTERVAL)) dut (
    .clk, .rst_n, .mode, .context_switch, .static_map_load, .static_map, .counts,
    .remap_ack, .remap_req, .remap_fire, .counter_flush, .map);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Expected map: sort clusters by count (descending), ties by index.
  function automatic logic [7:0][2:0] expected_map(input logic [7:0][15:0] c);
    int order [8];
    logic [7:0][2:0] m;
    for (int i = 0; i < 8; i++) order[i] = i;
    for (int i = 1; i < 8; i++) begin
      int j, key;
      key = order[i];
      j = i - 1;
      while (j >= 0 && (c[order[j]] < c[key] || (c[order[j]] == c[key] && order[j] > key))) begin
        order[j + 1] = order[j];
        j--;
      end
      order[j + 1] = key;
    end
    for (int p = 0; p < 8; p++) m[order[p]] = 3'(p);
    return m;
  endfunction

  task automatic random_counts();
    for (int c = 0; c < 8; c++) counts[c] = ($urandom_range(3, 0) == 0) ? 16'd7 : 16'($urandom_range(1000, 0));
  endtask

  // Wait for remap_req and return the number of cycles waited.
  task automatic wait_req(output int n);
    n = 0;
    while (!remap_req && n < 1000) begin
      @(posedge clk); #1;
      n++;
    end
  endtask

  task automatic do_ack(input logic exp_flush, input logic [7:0][2:0] exp_map);
    remap_ack = 1'b1;
    #1;
    check(remap_fire === 1'b1, "remap_fire with ack");
    check(counter_flush === exp_flush, "counter_flush matches mode");
    @(posedge clk); #1;
    remap_ack = 1'b0;
    check(map === exp_map, "map after remap");
    if (map !== exp_map) $display("  map=%h exp=%h", map, exp_map);
    check(remap_req === 1'b0, "request dropped after remap");
  endtask

  initial begin
    int n;
    logic [7:0][2:0] ident, held;
    rst_n = 1'b0; mode = MAP_DCF; context_switch = 0; static_map_load = 0; remap_ack = 0;
    static_map = '0; counts = '0;
    for (int c = 0; c < 8; c++) ident[c] = 3'(c);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(map === ident, "identity map after reset");
    random_counts();
    wait_req(n);
    check(n == INTERVAL, "first dynamic remap after REMAP_INTERVAL cycles");
    if (n != INTERVAL) $display("  waited %0d", n);
    // hold off the ack: request stays, map stays
    held = map;
    repeat (5) @(posedge clk);
    #1;
    check(remap_req === 1'b1 && map === held, "request waits for ack");
    do_ack(1'b1, expected_map(counts));
    // interval restarts after the remap
    random_counts();
    wait_req(n);
    check(n == INTERVAL, "next interval counted from the remap");
    if (n != INTERVAL) $display("  waited %0d", n);
    do_ack(1'b1, expected_map(counts));
    // dncf: no flush
    mode = MAP_DNCF;
    for (int t = 0; t < 20; t++) begin
      random_counts();
      wait_req(n);
      do_ack(1'b0, expected_map(counts));
    end
    // context switch request in dynamic mode
    random_counts();
    repeat (3) @(posedge clk);
    #1 context_switch = 1'b1;
    @(posedge clk); #1 context_switch = 1'b0;
    check(remap_req === 1'b1, "context switch requests remap");
    do_ack(1'b0, expected_map(counts));
    // dcf random
    mode = MAP_DCF;
    for (int t = 0; t < 20; t++) begin
      random_counts();
      wait_req(n);
      do_ack(1'b1, expected_map(counts));
    end
    // static: load a profile map
    mode = MAP_STATIC;
    for (int c = 0; c < 8; c++) static_map[c] = 3'(7 - c);
    @(posedge clk); #1;
    static_map_load = 1'b1;
    @(posedge clk); #1 static_map_load = 1'b0;
    static_map = '0;
    check(remap_req === 1'b1, "static load requests remap");
    for (int c = 0; c < 8; c++) held[c] = 3'(7 - c);
    do_ack(1'b1, held);
    // no dynamic remap in static mode, even on a context switch
    context_switch = 1'b1;
    @(posedge clk); #1 context_switch = 1'b0;
    n = 0;
    repeat (3 * INTERVAL) begin
      @(posedge clk); #1;
      if (remap_req) n++;
    end
    check(n == 0 && map === held, "static mode keeps its map");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
