// sbl_tb_pkg: reference models shared by the testbenches.
//
// init_word gives the contents memory holds at a word address before any
// write: a fixed mix of the address bits, so that every word of the address
// space is distinct and a testbench can predict it without storing it.
// ref_mem is the reference memory (word writes with byte strobes).
// ref_cache is a reference of the cache's tag state: a set-associative
// cache with true LRU replacement, allocation on read misses only
// (write-through, no write allocate) and whole-cache invalidation.
package sbl_tb_pkg;

  function automatic logic [63:0] init_word(input logic [31:0] word_addr);
    logic [31:0] a;
    a = word_addr * 32'h9E37_79B9 + 32'h7F4A_7C15;
    return {a ^ 32'hA5A5_5A5A, word_addr};
  endfunction

  class ref_mem;
    logic [63:0] store [logic [31:0]];

    function logic [63:0] read(input logic [31:0] byte_addr);
      logic [31:0] w;
      w = byte_addr >> 3;
      if (store.exists(w)) return store[w];
      return init_word(w);
    endfunction

    function void write(input logic [31:0] byte_addr, input logic [63:0] d,
                        input logic [7:0] strb);
      logic [63:0] v;
      v = read(byte_addr);
      for (int b = 0; b < 8; b++) if (strb[b]) v[b*8 +: 8] = d[b*8 +: 8];
      store[byte_addr >> 3] = v;
    endfunction
  endclass

  class ref_cache;
    int sets, ways, line_bytes;
    // lru[s] holds the tags of set s, most recently used first.
    int unsigned lru [][$];
    int evictions;

    function new(int sets_, int ways_, int line_bytes_);
      sets = sets_; ways = ways_; line_bytes = line_bytes_;
      lru = new[sets];
      evictions = 0;
    endfunction

    function void invalidate();
      for (int s = 0; s < sets; s++) lru[s].delete();
    endfunction

    // Returns 1 on a hit and updates the state as the cache must.
    function bit access(input logic [31:0] addr, input bit is_write);
      int unsigned line, s, tag;
      line = addr / line_bytes;
      s    = line % sets;
      tag  = line / sets;
      for (int i = 0; i < lru[s].size(); i++) begin
        if (lru[s][i] == tag) begin
          lru[s].delete(i);
          lru[s].push_front(tag);
          return 1'b1;
        end
      end
      if (!is_write) begin
        if (lru[s].size() == ways) begin
          void'(lru[s].pop_back());
          evictions++;
        end
        lru[s].push_front(tag);
      end
      return 1'b0;
    endfunction
  endclass

endpackage
