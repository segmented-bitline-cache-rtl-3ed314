// tb_sbl_top_segments: the segment-count variants of the cache, run end to
// end side by side: one instance with 4 segments (16 rows each, clusters
// from set[5:4]) and one with 2 segments (32 rows each, cluster = set[5]),
// both with a 2000-cycle remap interval. Each gets the same phases and
// checks as the 8-segment runs (see sbl_top_driver). The run passes when
// both drivers finish without failures.
module tb_sbl_top_segments;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks4, failures4, checks2, failures2;
  logic done4, done2;

  sbl_seg_variant #(.SEGMENTS(4)) v4 (.clk, .done(done4), .checks(checks4), .failures(failures4));
  sbl_seg_variant #(.SEGMENTS(2)) v2 (.clk, .done(done2), .checks(checks2), .failures(failures2));

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks2, failures4 + failures2 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done4 && done2);
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks2, failures4 + failures2);
    $finish;
  end
endmodule
