// tb_sbl_remap_mux: checks the cluster-to-segment row remapping for every
// set index under the identity map, a reversed map and random permutations.
module tb_sbl_remap_mux;
  localparam int unsigned SETS = 64, SEGMENTS = 8;
  logic [5:0]      set_idx;
  logic [7:0][2:0] map;
  logic [5:0]      row;
  logic [2:0]      seg, cluster;
  int checks = 0, failures = 0;

  sbl_remap_mux #(.SETS(SETS), .SEGMENTS(SEGMENTS)) dut (.set_idx, .map, .row, .seg, .cluster);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int s = 0; s < SETS; s++) begin
      int c, e;
      set_idx = 6'(s);
      #1;
      c = s / 8;
      e = int'(map[c]) * 8 + (s % 8);
      checks++;
      if (row != 6'(e) || seg != map[c] || cluster != 3'(c)) begin
        failures++;
        $display("FAIL set=%0d row=%0d exp=%0d", s, row, e);
      end
    end
  endtask

  initial begin
    for (int c = 0; c < 8; c++) map[c] = 3'(c);
    check_all();
    for (int c = 0; c < 8; c++) map[c] = 3'(7 - c);
    check_all();
    for (int t = 0; t < 20; t++) begin
      // random permutation by swaps
      for (int c = 0; c < 8; c++) map[c] = 3'(c);
      for (int c = 7; c > 0; c--) begin
        int j;
        logic [2:0] tmp;
        j = $urandom_range(c, 0);
        tmp = map[c]; map[c] = map[j]; map[j] = tmp;
      end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
