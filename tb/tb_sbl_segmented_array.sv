// tb_sbl_segmented_array: checks the segmented SRAM array against a
// reference memory.
//  1. Every row is written and read back with the segmenters set for its
//     segment; the read appears one cycle after the access.
//  2. Masked writes change only the masked columns.
//  3. A row whose path to the sense amplifiers crosses an open segmenter
//     reads as the precharged level (all ones, rd_ok low) and cannot be
//     written; rows on the near side of the open segmenter still work.
//  4. With all segmenters on every row is reachable.
module tb_sbl_segmented_array;
  localparam int unsigned ROWS = 64, COLS = 32, SEGMENTS = 8, RPS = ROWS / SEGMENTS;

  logic            clk = 1'b0;
  logic [ROWS-1:0] wl;
  logic [6:0]      sc;
  logic            we;
  logic [COLS-1:0] wmask, wdata, rdata;
  logic            rd_ok;
  logic [COLS-1:0] ref_mem [ROWS];
  int checks = 0, failures = 0;

  sbl_segmented_array #(.ROWS(ROWS), .COLS(COLS), .SEGMENTS(SEGMENTS)) dut (
    .clk, .wl, .sc, .we, .wmask, .wdata, .rdata, .rd_ok);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] sc_for(input int r);
    logic [6:0] v;
    v = '0;
    for (int k = 0; k < r / RPS; k++) v[k] = 1'b1;
    return v;
  endfunction

  task automatic access(input int r, input logic [6:0] s, input logic w,
                        input logic [COLS-1:0] m, input logic [COLS-1:0] d);
    wl = '0; wl[r] = 1'b1; sc = s; we = w; wmask = m; wdata = d;
    @(posedge clk); #1;
    wl = '0; we = 1'b0;
  endtask

  task automatic read_check(input int r, input logic [6:0] s, input logic [COLS-1:0] exp,
                            input logic exp_ok);
    access(r, s, 1'b0, '0, '0);
    checks++;
    if (rdata !== exp || rd_ok !== exp_ok) begin
      failures++;
      $display("FAIL read row=%0d sc=%b data=%h exp=%h ok=%0d", r, s, rdata, exp, rd_ok);
    end
  endtask

  initial begin
    wl = '0; sc = '1; we = 1'b0; wmask = '0; wdata = '0;
    @(posedge clk); #1;
    // 1. full-row writes and reads with the right segmenter setting
    for (int r = 0; r < ROWS; r++) begin
      ref_mem[r] = $urandom;
      access(r, sc_for(r), 1'b1, '1, ref_mem[r]);
    end
    for (int r = 0; r < ROWS; r++) read_check(r, sc_for(r), ref_mem[r], 1'b1);
    // 2. masked writes
    for (int t = 0; t < 64; t++) begin
      int r;
      logic [COLS-1:0] m, d;
      r = $urandom_range(ROWS - 1, 0);
      m = $urandom; d = $urandom;
      ref_mem[r] = (ref_mem[r] & ~m) | (d & m);
      access(r, sc_for(r), 1'b1, m, d);
      read_check(r, sc_for(r), ref_mem[r], 1'b1);
    end
    // 3. isolation: open one segmenter on the path of each far segment
    for (int s = 1; s < SEGMENTS; s++) begin
      for (int k = 0; k < s; k++) begin
        int r;
        logic [6:0] bad;
        r = s * RPS + $urandom_range(RPS - 1, 0);
        bad = sc_for(r);
        bad[k] = 1'b0;
        read_check(r, bad, '1, 1'b0);
        access(r, bad, 1'b1, '1, ~ref_mem[r]);          // lost write
        read_check(r, sc_for(r), ref_mem[r], 1'b1);
        // a row on the near side of segmenter k is unaffected
        read_check(k * RPS, bad, ref_mem[k * RPS], 1'b1);
      end
    end
    // 4. all segmenters on: every row reachable
    for (int r = 0; r < ROWS; r++) read_check(r, '1, ref_mem[r], 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
