// tb_sbl_cache_ctrl: the cache controller on plain (unsegmented) reference
// arrays and the behavioural memory, driven by a random read/write stream
// confined to a few tags per set so that hits, misses and LRU evictions all
// occur, with whole-cache invalidations (remaps) in between.
// Checks: read data against a reference memory, hit/miss against a
// reference LRU cache, read-hit latency (response in the cycle after
// acceptance), write-through traffic, and that no request is accepted while
// a remap is pending.
module tb_sbl_cache_ctrl;
  import sbl_tb_pkg::*;
  localparam int unsigned SETS = 64, WAYS = 4, LINE_BYTES = 64, TAG_W = 20, LINE_W = 512;

  logic clk = 1'b0, rst_n;
  logic req_valid, req_ready, req_we;
  logic [31:0] req_addr;
  logic [63:0] req_wdata, resp_rdata;
  logic [7:0]  req_wstrb;
  logic resp_valid, resp_hit;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr;
  logic [63:0] mem_req_wdata;
  logic [7:0]  mem_req_wstrb;
  logic [LINE_W-1:0] mem_resp_line;
  logic remap_req, remap_ack, remap_fire;
  logic arr_access, tag_we;
  logic [5:0] arr_set;
  logic [WAYS*TAG_W-1:0] tag_wmask, tag_wdata, tag_rdata;
  logic [WAYS-1:0] data_we;
  logic [LINE_W-1:0] data_wmask, data_wdata;
  logic [WAYS-1:0][LINE_W-1:0] data_rdata;

  sbl_cache_ctrl dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_wstrb,
    .resp_valid, .resp_rdata, .resp_hit,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_req_wstrb, .mem_resp_valid, .mem_resp_line,
    .remap_req, .remap_ack, .remap_fire,
    .arr_access, .arr_set, .tag_we, .tag_wmask, .tag_wdata, .tag_rdata,
    .data_we, .data_wmask, .data_wdata, .data_rdata);

  sbl_mem_model #(.LINE_BYTES(LINE_BYTES), .LAT(4)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata), .req_wstrb(mem_req_wstrb),
    .resp_valid(mem_resp_valid), .resp_line(mem_resp_line));

  // Reference arrays: plain synchronous-read memories.
  logic [WAYS*TAG_W-1:0] tag_mem [SETS];
  logic [LINE_W-1:0]     data_mem [WAYS][SETS];
  always_ff @(posedge clk) begin
    if (arr_access) begin
      if (tag_we) tag_mem[arr_set] <= (tag_mem[arr_set] & ~tag_wmask) | (tag_wdata & tag_wmask);
      else        tag_rdata <= tag_mem[arr_set];
      for (int w = 0; w < WAYS; w++) begin
        if (data_we[w])
          data_mem[w][arr_set] <= (data_mem[w][arr_set] & ~data_wmask) | (data_wdata & data_wmask);
        else
          data_rdata[w] <= data_mem[w][arr_set];
      end
    end
  end

  assign remap_fire = remap_req && remap_ack;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_rd_hit = 0, n_rd_miss = 0, n_wr_hit = 0, n_wr_miss = 0, n_inval = 0;
  ref_mem   rmem;
  ref_cache rc;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic do_req(input logic [31:0] addr, input logic we, input logic [63:0] d,
                        input logic [7:0] strb);
    bit exp_hit;
    int n;
    req_valid = 1'b1; req_we = we; req_addr = addr; req_wdata = d; req_wstrb = strb;
    do @(posedge clk); while (!req_ready);
    #1 req_valid = 1'b0;
    exp_hit = rc.access(addr, we);
    n = 1;
    while (!resp_valid && n < 100) begin
      @(posedge clk); #1;
      n++;
    end
    check(resp_valid === 1'b1, "response arrives");
    check(resp_hit === exp_hit, "hit/miss as reference LRU cache");
    if (resp_hit !== exp_hit) $display("  addr=%h we=%0d hit=%0d exp=%0d", addr, we, resp_hit, exp_hit);
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

  // Memory writes must match the CPU's writes (write-through).
  int mem_writes = 0, cpu_writes = 0;
  always @(posedge clk) if (mem_req_valid && mem_req_ready && mem_req_we) mem_writes++;
  always @(posedge clk) if (req_valid && req_ready && req_we) cpu_writes++;
  // No request accepted while a remap is pending.
  always @(posedge clk) if (rst_n && remap_req && req_valid && req_ready) begin
    failures++;
    $display("FAIL request accepted during remap");
  end

  initial begin
    rmem = new();
    rc = new(SETS, WAYS, LINE_BYTES);
    rst_n = 1'b0; req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_wstrb = 0;
    remap_req = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      logic [31:0] a;
      int tg, st;
      tg = $urandom_range(5, 0);
      st = ($urandom_range(1, 0) == 0) ? $urandom_range(3, 0) : $urandom_range(63, 0);
      a = {12'(tg) + 12'h100, 8'h00, 6'(st), 3'($urandom_range(7, 0)), 3'b000};
      if ($urandom_range(3, 0) == 0) do_req(a, 1'b1, {$urandom, $urandom}, 8'($urandom));
      else do_req(a, 1'b0, '0, '0);
      if ($urandom_range(499, 0) == 0 || t == 2000) begin
        // a remap: request it while a CPU request is also waiting
        remap_req = 1'b1;
        req_valid = 1'b1; req_we = 1'b0; req_addr = a;
        @(posedge clk); #1;
        check(remap_ack === 1'b1, "idle controller acknowledges remap");
        remap_req = 1'b0; req_valid = 1'b0;
        rc.invalidate();
        n_inval++;
        do_req(a, 1'b0, '0, '0);   // must miss now
      end
    end
    check(mem_writes == cpu_writes, "every write goes through to memory");
    check(rc.evictions > 0, "evictions happened");
    check(n_rd_hit > 0 && n_rd_miss > 0 && n_wr_hit > 0 && n_wr_miss > 0 && n_inval > 0,
          "all cases exercised");
    $display("read hits %0d misses %0d, write hits %0d misses %0d, evictions %0d, invalidations %0d",
             n_rd_hit, n_rd_miss, n_wr_hit, n_wr_miss, rc.evictions, n_inval);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
