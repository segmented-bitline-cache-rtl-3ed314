// tb_sbl_row_decoder: every row address raises exactly its own wordline, and
// none rises while the decoder is disabled.
module tb_sbl_row_decoder;
  logic        en;
  logic [5:0]  row;
  logic [63:0] wl;
  int checks = 0, failures = 0;

  sbl_row_decoder #(.ROWS(64)) dut (.en, .row, .wl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int r = 0; r < 64; r++) begin
        en = e[0]; row = 6'(r);
        #1;
        checks++;
        if (wl !== (e == 1 ? (64'd1 << r) : 64'd0)) begin
          failures++;
          $display("FAIL en=%0d row=%0d wl=%h", e, r, wl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
