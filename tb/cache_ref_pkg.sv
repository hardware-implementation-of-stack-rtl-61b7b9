// Reference model of a set-associative cache directory with LRU or FIFO
// replacement, used by the cache testbenches. It keeps, per set, the tags,
// valid bits and a list of way numbers ordered from the top of the
// replacement stack (index 0) to the bottom; the bottom entry is the victim.
// Initial order: position k holds way ways-1-k.
// trace_gen produces a synthetic mixed instruction/data address stream.
package cache_ref_pkg;

  class cache_ref;
    int unsigned ways, sets, off_w, set_w;
    bit          is_lru;
    longint unsigned tags[][];
    bit          valid[][];
    int          order[][];
    int unsigned misses, accesses;

    function new(int unsigned ways, int unsigned sets, int unsigned block_bytes,
                 bit is_lru);
      this.ways = ways;
      this.sets = sets;
      this.is_lru = is_lru;
      off_w = $clog2(block_bytes);
      set_w = $clog2(sets);
      tags  = new[sets];
      valid = new[sets];
      order = new[sets];
      foreach (tags[s]) begin
        tags[s]  = new[ways];
        valid[s] = new[ways];
        order[s] = new[ways];
        foreach (order[s][k]) begin
          order[s][k] = ways - 1 - k;
          valid[s][k] = 1'b0;
        end
      end
      misses = 0;
      accesses = 0;
    endfunction

    // Looks up addr, returns what the directory should report for it
    // (hit, hit way, victim way), then applies the update.
    function void access(longint unsigned addr, output bit hit,
                         output int hit_way, output int victim,
                         output bit moved);
      int unsigned s = int'((addr >> off_w) % sets);
      longint unsigned t = addr >> (off_w + set_w);
      int pos = 0;
      hit = 1'b0;
      hit_way = 0;
      moved = 1'b0;
      victim = order[s][ways-1];
      accesses++;
      for (int w = 0; w < int'(ways); w++) begin
        if (valid[s][w] && tags[s][w] == t) begin
          hit = 1'b1;
          hit_way = w;
        end
      end
      if (hit) begin
        if (is_lru) begin
          for (int k = 0; k < int'(ways); k++) if (order[s][k] == hit_way) pos = k;
          if (pos != 0) begin
            moved = 1'b1;
            for (int k = pos; k > 0; k--) order[s][k] = order[s][k-1];
            order[s][0] = hit_way;
          end
        end
      end else begin
        misses++;
        tags[s][victim]  = t;
        valid[s][victim] = 1'b1;
        for (int k = int'(ways) - 1; k > 0; k--) order[s][k] = order[s][k-1];
        order[s][0] = victim;
      end
    endfunction
  endclass

  // Synthetic reference stream with locality, standing in for program
  // traces: 55% instruction fetches that step through a 4-byte sequential
  // stream and jump (1 in 16) to one of 64 loop heads inside a 64 KB code
  // region; 42% data accesses to a 24 KB hot region; 3% data accesses spread
  // over 1 MB. Deterministic for a given seed.
  class trace_gen;
    int unsigned pc;
    int unsigned state;

    function new(int unsigned seed);
      state = seed | 1;
      pc = 32'h0040_0000;
    endfunction

    // xorshift32
    function int unsigned rnd();
      state ^= state << 13;
      state ^= state >> 17;
      state ^= state << 5;
      return state;
    endfunction

    function int unsigned next();
      int unsigned r = rnd() % 100;
      if (r < 55) begin
        if (rnd() % 16 == 0) pc = 32'h0040_0000 + (rnd() % 64) * 1024;
        else                 pc += 4;
        if (pc >= 32'h0041_0000) pc = 32'h0040_0000;
        return pc;
      end else if (r < 97) begin
        return 32'h1000_0000 + (rnd() % (24 * 1024));
      end else begin
        return 32'h2000_0000 + (rnd() % (1024 * 1024));
      end
    endfunction
  endclass

endpackage
