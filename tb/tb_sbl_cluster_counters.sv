// tb_sbl_cluster_counters: random increments and flushes against a
// reference model, then saturation with 4-bit counters.
module tb_sbl_cluster_counters;
  logic clk = 1'b0, rst_n;
  logic inc, flush, inc4, flush4;
  logic [2:0] inc_cluster, inc_cluster4;
  logic [7:0][15:0] counts;
  logic [7:0][3:0]  counts4;
  int unsigned ref_c [8];
  int unsigned ref4 [8];
  int checks = 0, failures = 0;

  sbl_cluster_counters #(.SEGMENTS(8), .CNT_W(16)) dut (
    .clk, .rst_n, .inc, .inc_cluster, .flush, .counts);
  sbl_cluster_counters #(.SEGMENTS(8), .CNT_W(4)) dut4 (
    .clk, .rst_n, .inc(inc4), .inc_cluster(inc_cluster4), .flush(flush4), .counts(counts4));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; inc = 0; flush = 0; inc_cluster = 0; inc4 = 0; flush4 = 0; inc_cluster4 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (ref_c[i]) begin ref_c[i] = 0; ref4[i] = 0; end
    for (int t = 0; t < 3000; t++) begin
      inc = ($urandom_range(3, 0) != 0);
      inc_cluster = ($urandom_range(1, 0) == 0) ? 3'd5 : 3'($urandom_range(7, 0));
      flush = ($urandom_range(199, 0) == 0);
      inc4 = 1'b1; inc_cluster4 = 3'($urandom_range(7, 0)); flush4 = 1'b0;
      @(posedge clk); #1;
      for (int c = 0; c < 8; c++) begin
        if (flush) ref_c[c] = (inc && inc_cluster == 3'(c)) ? 1 : 0;
        else if (inc && inc_cluster == 3'(c)) ref_c[c]++;
        if (inc4 && inc_cluster4 == 3'(c) && ref4[c] < 15) ref4[c]++;
        checks++;
        if (counts[c] != 16'(ref_c[c]) || counts4[c] != 4'(ref4[c])) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d c=%0d cnt=%0d exp=%0d cnt4=%0d exp4=%0d",
                                      t, c, counts[c], ref_c[c], counts4[c], ref4[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
