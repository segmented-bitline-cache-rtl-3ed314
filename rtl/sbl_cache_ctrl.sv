// sbl_cache_ctrl: controller of the set-associative cache built on the
// segmented arrays.
//
// Blocking cache with one outstanding request. A request is accepted in
// IDLE; in the same cycle the logical set index is sent (through the remap
// mux, outside this block) to the tag array and all data arrays, which are
// read. In LOOKUP the tags of all ways are compared:
//   read hit   : the word is returned (resp_valid) in the cycle after the
//                request is accepted;
//   read miss  : the line is fetched from memory (MISS_REQ, MISS_WAIT) and
//                written into the victim way together with its tag, and the
//                requested word is returned in the same cycle;
//   write      : write-through without allocation; on a hit the word is
//                first written into the line (WR_HIT), then the write goes to
//                memory (WR_MEM) and is acknowledged with resp_valid.
// Victim: the first invalid way, otherwise the least recently used way (true
// LRU from a 2-bit age per way for 4 ways).
//
// The remap handshake: while remap_req is high no new request is accepted;
// when idle the controller answers remap_ack, and in the cycle where
// remap_fire is high all valid bits are cleared at the clock edge, because a
// remap moves sets to other rows.
//
// Cache size, associativity and line size follow the source design. It does
// not describe the controller itself: the blocking organisation, the
// write policy, the memory interface and the replacement policy are this
// design's choices. Memory interface: request handshake mem_req_valid /
// mem_req_ready; a read request returns the whole line with mem_resp_valid
// some cycles later; a write is posted and complete when accepted.
module sbl_cache_ctrl #(
  parameter int unsigned SETS       = sbl_pkg::SETS,
  parameter int unsigned WAYS       = sbl_pkg::WAYS,
  parameter int unsigned LINE_BYTES = sbl_pkg::LINE_BYTES,
  parameter int unsigned ADDR_W     = sbl_pkg::ADDR_W,
  parameter int unsigned WORD_W     = sbl_pkg::WORD_W,
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES),
  localparam int unsigned SET_W     = $clog2(SETS),
  localparam int unsigned TAG_W     = ADDR_W - OFF_W - SET_W,
  localparam int unsigned LINE_W    = LINE_BYTES * 8,
  localparam int unsigned WSTRB_W   = WORD_W / 8,
  localparam int unsigned WAY_W     = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // CPU side
  input  logic                         req_valid,
  output logic                         req_ready,
  input  logic                         req_we,
  input  logic [ADDR_W-1:0]            req_addr,
  input  logic [WORD_W-1:0]            req_wdata,
  input  logic [WSTRB_W-1:0]           req_wstrb,
  output logic                         resp_valid,
  output logic [WORD_W-1:0]            resp_rdata,
  output logic                         resp_hit,
  // Memory side
  output logic                         mem_req_valid,
  input  logic                         mem_req_ready,
  output logic                         mem_req_we,
  output logic [ADDR_W-1:0]            mem_req_addr,
  output logic [WORD_W-1:0]            mem_req_wdata,
  output logic [WSTRB_W-1:0]           mem_req_wstrb,
  input  logic                         mem_resp_valid,
  input  logic [LINE_W-1:0]            mem_resp_line,
  // Remap handshake
  input  logic                         remap_req,
  output logic                         remap_ack,
  input  logic                         remap_fire,
  // Array side
  output logic                         arr_access,
  output logic [SET_W-1:0]             arr_set,
  output logic                         tag_we,
  output logic [WAYS*TAG_W-1:0]        tag_wmask,
  output logic [WAYS*TAG_W-1:0]        tag_wdata,
  input  logic [WAYS*TAG_W-1:0]        tag_rdata,
  output logic [WAYS-1:0]              data_we,
  output logic [LINE_W-1:0]            data_wmask,
  output logic [LINE_W-1:0]            data_wdata,
  input  logic [WAYS-1:0][LINE_W-1:0]  data_rdata
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOOKUP, S_WR_HIT, S_WR_MEM, S_MISS_REQ, S_MISS_WAIT
  } state_e;

  localparam int unsigned WPL   = LINE_W / WORD_W;
  localparam int unsigned WSEL_W = (WPL > 1) ? $clog2(WPL) : 1;
  localparam int unsigned BOFF_W = $clog2(WSTRB_W);

  state_e state;

  logic [ADDR_W-1:0]  q_addr;
  logic               q_we;
  logic [WORD_W-1:0]  q_wdata;
  logic [WSTRB_W-1:0] q_wstrb;
  logic               q_hit;
  logic [WAY_W-1:0]   q_way;    // hit way or victim way

  logic [SETS-1:0][WAYS-1:0]             valid;
  logic [SETS-1:0][WAYS-1:0][WAY_W-1:0]  age;

  logic [SET_W-1:0]  q_set;
  logic [TAG_W-1:0]  q_tag;
  logic [WSEL_W-1:0] q_wsel;

  assign q_set  = q_addr[OFF_W +: SET_W];
  assign q_tag  = q_addr[ADDR_W-1 -: TAG_W];
  assign q_wsel = q_addr[BOFF_W +: WSEL_W];

  // Tag compare and victim choice (valid in LOOKUP).
  logic [WAYS-1:0]  hit_vec;
  logic             hit;
  logic [WAY_W-1:0] hit_way;
  logic [WAY_W-1:0] victim;
  logic             found_invalid;

  always_comb begin
    hit_vec = '0;
    hit     = 1'b0;
    hit_way = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      hit_vec[w] = valid[q_set][w] && (tag_rdata[w*TAG_W +: TAG_W] == q_tag);
      if (hit_vec[w] && !hit) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
    victim        = '0;
    found_invalid = 1'b0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (!valid[q_set][w] && !found_invalid) begin
        victim        = WAY_W'(w);
        found_invalid = 1'b1;
      end
    end
    if (!found_invalid) begin
      for (int unsigned w = 0; w < WAYS; w++) begin
        if (age[q_set][w] == WAY_W'(WAYS - 1)) victim = WAY_W'(w);
      end
    end
  end

  // Expanded byte strobes of the word inside the line.
  logic [LINE_W-1:0] word_mask;
  always_comb begin
    word_mask = '0;
    for (int unsigned b = 0; b < WSTRB_W; b++) begin
      if (q_wstrb[b]) word_mask[32'(q_wsel) * WORD_W + b * 8 +: 8] = 8'hFF;
    end
  end

  // LRU touch request.
  logic             touch;
  logic [WAY_W-1:0] touch_way;

  always_comb begin
    req_ready     = (state == S_IDLE) && !remap_req;
    remap_ack     = (state == S_IDLE);
    resp_valid    = 1'b0;
    resp_rdata    = '0;
    resp_hit      = 1'b0;
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = '0;
    mem_req_wdata = q_wdata;
    mem_req_wstrb = q_wstrb;
    arr_access    = 1'b0;
    arr_set       = q_set;
    tag_we        = 1'b0;
    tag_wmask     = '0;
    tag_wdata     = {WAYS{q_tag}};
    data_we       = '0;
    data_wmask    = '1;
    data_wdata    = mem_resp_line;
    touch         = 1'b0;
    touch_way     = q_way;

    unique case (state)
      S_IDLE: begin
        arr_set    = req_addr[OFF_W +: SET_W];
        arr_access = req_valid && req_ready;
      end
      S_LOOKUP: begin
        if (!q_we && hit) begin
          resp_valid = 1'b1;
          resp_hit   = 1'b1;
          resp_rdata = data_rdata[hit_way][32'(q_wsel) * WORD_W +: WORD_W];
          touch      = 1'b1;
          touch_way  = hit_way;
        end else if (q_we && hit) begin
          touch      = 1'b1;
          touch_way  = hit_way;
        end
      end
      S_WR_HIT: begin
        arr_access       = 1'b1;
        data_we[q_way]   = 1'b1;
        data_wmask       = word_mask;
        data_wdata       = {WPL{q_wdata}};
      end
      S_WR_MEM: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        mem_req_addr  = {q_addr[ADDR_W-1:BOFF_W], BOFF_W'(0)};
        if (mem_req_ready) begin
          resp_valid = 1'b1;
          resp_hit   = q_hit;
        end
      end
      S_MISS_REQ: begin
        mem_req_valid = 1'b1;
        mem_req_addr  = {q_addr[ADDR_W-1:OFF_W], OFF_W'(0)};
      end
      S_MISS_WAIT: begin
        if (mem_resp_valid) begin
          arr_access       = 1'b1;
          data_we[q_way]   = 1'b1;
          tag_we           = 1'b1;
          tag_wmask[32'(q_way) * TAG_W +: TAG_W] = '1;
          resp_valid       = 1'b1;
          resp_rdata       = mem_resp_line[32'(q_wsel) * WORD_W +: WORD_W];
          touch            = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      q_addr  <= '0;
      q_we    <= 1'b0;
      q_wdata <= '0;
      q_wstrb <= '0;
      q_hit   <= 1'b0;
      q_way   <= '0;
      valid   <= '0;
      for (int unsigned s = 0; s < SETS; s++)
        for (int unsigned w = 0; w < WAYS; w++)
          age[s][w] <= WAY_W'(w);
    end else begin
      if (touch) begin
        for (int unsigned w = 0; w < WAYS; w++) begin
          if (WAY_W'(w) == touch_way)
            age[q_set][w] <= '0;
          else if (age[q_set][w] < age[q_set][touch_way])
            age[q_set][w] <= age[q_set][w] + 1'b1;
        end
      end
      if (state == S_MISS_WAIT && mem_resp_valid) valid[q_set][q_way] <= 1'b1;
      if (remap_fire) valid <= '0;

      unique case (state)
        S_IDLE: begin
          if (req_valid && req_ready) begin
            q_addr  <= req_addr;
            q_we    <= req_we;
            q_wdata <= req_wdata;
            q_wstrb <= req_wstrb;
            state   <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          q_hit <= hit;
          q_way <= hit ? hit_way : victim;
          if (q_we)     state <= hit ? S_WR_HIT : S_WR_MEM;
          else if (hit) state <= S_IDLE;
          else          state <= S_MISS_REQ;
        end
        S_WR_HIT:    state <= S_WR_MEM;
        S_WR_MEM:    if (mem_req_ready)  state <= S_IDLE;
        S_MISS_REQ:  if (mem_req_ready)  state <= S_MISS_WAIT;
        S_MISS_WAIT: if (mem_resp_valid) state <= S_IDLE;
        default:     state <= S_IDLE;
      endcase
    end
  end

  // A remap is only carried out while the controller is idle.
  assert property (@(posedge clk) disable iff (!rst_n) remap_fire |-> state == S_IDLE)
    else $error("sbl_cache_ctrl: remap while busy");

endmodule
