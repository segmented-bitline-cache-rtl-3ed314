// tb_sbl_segmenter_ctrl: exhaustive check of the segmenter controls.
// For every segment and both phases, segmenter k must conduct exactly when
// the bitline is being precharged (no access) or the accessed segment lies
// beyond it (seg > k).
module tb_sbl_segmenter_ctrl;
  localparam int unsigned SEGMENTS = 8;
  logic         access;
  logic [2:0]   seg;
  logic [6:0]   sc;
  int checks = 0, failures = 0;

  sbl_segmenter_ctrl #(.SEGMENTS(SEGMENTS)) dut (.access, .seg, .sc);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2; a++) begin
      for (int s = 0; s < SEGMENTS; s++) begin
        logic [6:0] exp;
        access = a[0];
        seg    = 3'(s);
        #1;
        exp = '1;
        if (a == 1) begin
          exp = '0;
          for (int k = 0; k < s; k++) exp[k] = 1'b1;
        end
        checks++;
        if (sc !== exp) begin
          failures++;
          $display("FAIL access=%0d seg=%0d sc=%b exp=%b", a, s, sc, exp);
        end
      end
    end
    // Number of gates on equals the accessed segment number (bitline length).
    access = 1'b1;
    for (int s = 0; s < SEGMENTS; s++) begin
      seg = 3'(s);
      #1;
      checks++;
      if ($countones(sc) != s) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
