// Full-size run of stack_cache with every parameter at its default: a 32 KB,
// 4-way cache with 32-byte blocks (256 sets), 32-bit addresses and LRU
// replacement. A synthetic reference stream (cache_ref_pkg::trace_gen) of
// 40,000 accesses, one per cycle, is checked access by access against the
// reference model: hit/miss, hit way and victim way. The miss rate is
// printed. Fills in precharge order, evictions, top-row hits and moving hits
// are counted and must all occur.
module tb_stack_cache_full;
  import cache_ref_pkg::*;

  localparam int N_ACC = 40000;

  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        precharge = 1'b0;
  logic        req_valid;
  logic [31:0] req_addr;
  logic        hit, miss;
  logic [3:0]  match;
  logic [1:0]  hit_way, victim_way;

  always #5 clk = ~clk;
  initial #1 precharge = 1'b1;

  stack_cache dut (.*);

  initial begin
    #(N_ACC * 10 + 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cache_ref m = new(4, 256, 32, 1'b1);
    trace_gen t = new(32'h1234_5678);
    int n_fill = 0, n_evict = 0, n_top_hit = 0, n_move_hit = 0, n_order_err = 0;
    int filled [256];
    foreach (filled[s]) filled[s] = 0;
    req_valid = 1'b0;
    req_addr  = '0;
    #3;
    precharge = 1'b0;
    for (int i = 0; i < N_ACC; i++) begin
      bit e_hit, moved, ok;
      int e_way, e_victim, s;
      @(negedge clk);
      req_valid = 1'b1;
      req_addr  = t.next();
      #1;
      s = int'(req_addr[12:5]);
      m.access(req_addr, e_hit, e_way, e_victim, moved);
      ok = (hit == e_hit) && (miss == !e_hit);
      if (e_hit) ok &= (match == 4'(1 << e_way)) && (int'(hit_way) == e_way);
      else       ok &= (match == '0) && (int'(victim_way) == e_victim);
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10)
          $display("FAIL access %0d addr=%h: hit=%b way=%0d victim=%0d, expected hit=%b way=%0d victim=%0d",
                   i, req_addr, hit, hit_way, victim_way, e_hit, e_way, e_victim);
      end
      if (!e_hit && filled[s] < 4) begin
        if (e_victim != filled[s]) n_order_err++;
        filled[s]++;
        n_fill++;
      end else if (!e_hit) n_evict++;
      else if (moved)      n_move_hit++;
      else                 n_top_hit++;
    end
    $display("32KB 4-way LRU: accesses=%0d misses=%0d miss rate=%0.2f%%",
             m.accesses, m.misses, 100.0 * m.misses / m.accesses);
    $display("fills=%0d evictions=%0d top-row hits=%0d moving hits=%0d",
             n_fill, n_evict, n_top_hit, n_move_hit);
    checks++;
    if (n_order_err != 0 || n_fill == 0 || n_evict == 0 || n_top_hit == 0 || n_move_hit == 0) begin
      failures++;
      $display("FAIL fill order errors=%0d or a mechanism never occurred", n_order_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
