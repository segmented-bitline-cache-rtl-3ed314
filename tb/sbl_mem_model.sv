// sbl_mem_model: behavioural model of the next memory level (L2 / main
// memory) behind the cache, for testbenches only.
//
// Accepts one request at a time (req_ready is high when idle). A read
// returns the whole LINE_BYTES line at the line-aligned address LAT cycles
// after acceptance with resp_valid for one cycle. A write is a posted
// 64-bit word write with byte strobes. Words never written read as
// sbl_tb_pkg::init_word(word address). Counts reads and writes.
module sbl_mem_model #(
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned LAT        = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid,
  output logic                    req_ready,
  input  logic                    req_we,
  input  logic [31:0]             req_addr,
  input  logic [63:0]             req_wdata,
  input  logic [7:0]              req_wstrb,
  output logic                    resp_valid,
  output logic [LINE_BYTES*8-1:0] resp_line
);

  localparam int unsigned WPL = LINE_BYTES / 8;

  logic [63:0] store [logic [31:0]];
  int unsigned busy;
  logic [31:0] line_addr;
  int unsigned n_reads, n_writes;

  function automatic logic [63:0] rd_word(input logic [31:0] waddr);
    if (store.exists(waddr)) return store[waddr];
    return sbl_tb_pkg::init_word(waddr);
  endfunction

  assign req_ready = rst_n && (busy == 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 0;
      resp_valid <= 1'b0;
      n_reads    <= 0;
      n_writes   <= 0;
    end else begin
      resp_valid <= 1'b0;
      if (busy > 1) busy <= busy - 1;
      else if (busy == 1) begin
        busy <= 0;
        resp_valid <= 1'b1;
        for (int unsigned w = 0; w < WPL; w++)
          resp_line[w*64 +: 64] <= rd_word((line_addr >> 3) + w);
      end
      if (req_valid && req_ready) begin
        if (req_we) begin
          logic [63:0] d;
          d = rd_word(req_addr >> 3);
          for (int b = 0; b < 8; b++) if (req_wstrb[b]) d[b*8 +: 8] = req_wdata[b*8 +: 8];
          store[req_addr >> 3] = d;
          n_writes <= n_writes + 1;
        end else begin
          line_addr <= req_addr & ~32'(LINE_BYTES - 1);
          busy      <= LAT;
          n_reads   <= n_reads + 1;
        end
      end
    end
  end

endmodule
