// End-to-end test of stack_cache, the tag RAM with one replacement stack per
// set, at reduced sizes so that sets fill and evict quickly:
//   cfg 0: LRU,  4 ways, 4 sets     cfg 1: FIFO, 4 ways, 4 sets
//   cfg 2: LRU,  8 ways, 1 set      cfg 3: FIFO, 2 ways, 2 sets
// Random accesses to a small pool of blocks (plus idle cycles) are driven
// into all four; before each clock edge hit, miss, match, hit_way and, on a
// miss, victim_way are compared with cache_ref_pkg's model, which is then
// updated. One access per cycle, so the next access checks that the previous
// one took effect on a single edge. Counted per design and required to occur:
// filling an empty way in precharge order, evicting a valid block, a hit on
// the top row (no change), for LRU a hit that moves a lower row to the top,
// for FIFO a hit that leaves the order alone.
module tb_stack_cache;
  import stack_repl_pkg::*;
  import cache_ref_pkg::*;

  localparam int N_CFG  = 4;
  localparam int CYCLES = 6000;

  int checks = 0, failures = 0;
  bit done [N_CFG];

  logic clk = 1'b0;
  logic precharge = 1'b0;
  always #5 clk = ~clk;
  initial #1 precharge = 1'b1;     // power-up precharge pulse

  initial begin
    #(CYCLES * 10 * 2 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < N_CFG; g++) begin : g_cfg
    localparam policy_e P = (g % 2 == 0) ? POLICY_LRU : POLICY_FIFO;
    localparam int W  = (g < 2) ? 4 : (g == 2) ? 8 : 2;
    localparam int S  = (g < 2) ? 4 : (g == 2) ? 1 : 2;
    localparam int AW = $clog2(W);

    logic          req_valid;
    logic [31:0]   req_addr;
    logic          hit, miss;
    logic [W-1:0]  match;
    logic [AW-1:0] hit_way, victim_way;

    stack_cache #(.POLICY(P), .WAYS(W), .SETS(S)) dut (
      .clk(clk), .precharge(precharge), .req_valid(req_valid),
      .req_addr(req_addr), .hit(hit), .miss(miss), .match(match),
      .hit_way(hit_way), .victim_way(victim_way)
    );

    initial begin
      cache_ref m = new(W, S, 32, P == POLICY_LRU);
      int n_fill = 0, n_evict = 0, n_top_hit = 0, n_move_hit = 0,
          n_fifo_hit = 0, n_idle = 0, n_fill_order_err = 0;
      int filled [S];
      foreach (filled[s]) filled[s] = 0;
      req_valid = 1'b0;
      req_addr  = '0;
      #3;
      precharge = 1'b0;
      for (int i = 0; i < CYCLES; i++) begin
        bit e_hit, moved, ok;
        int e_way, e_victim, s;
        @(negedge clk);
        req_valid = ($urandom_range(0, 9) != 0);
        req_addr  = ($urandom_range(0, W + 3) << ($clog2(S) + 5))
                  | ($urandom_range(0, S - 1) << 5) | $urandom_range(0, 31);
        #1;
        if (!req_valid) begin
          checks++;
          if (hit || miss || match != '0) begin
            failures++;
            $display("FAIL cfg%0d idle cycle shows hit=%b miss=%b", g, hit, miss);
          end
          n_idle++;
          continue;
        end
        s = int'((req_addr >> 5) % S);
        m.access(req_addr, e_hit, e_way, e_victim, moved);
        ok = (hit == e_hit) && (miss == !e_hit);
        if (e_hit) ok &= (match == W'(1 << e_way)) && (int'(hit_way) == e_way);
        else       ok &= (match == '0) && (int'(victim_way) == e_victim);
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL cfg%0d access %0d addr=%h: hit=%b way=%0d victim=%0d, expected hit=%b way=%0d victim=%0d",
                   g, i, req_addr, hit, hit_way, victim_way, e_hit, e_way, e_victim);
        end
        if (!e_hit && filled[s] < W) begin
          n_fill++;
          if (e_victim != filled[s]) n_fill_order_err++;
          filled[s]++;
        end else if (!e_hit) begin
          n_evict++;
        end else if (moved) begin
          n_move_hit++;
        end else if (P == POLICY_LRU) begin
          n_top_hit++;
        end else begin
          n_fifo_hit++;
        end
      end
      $display("cfg%0d %s %0d-way %0d sets: fills=%0d evictions=%0d top-row hits=%0d moving hits=%0d fifo hits=%0d idle=%0d misses=%0d/%0d",
               g, P.name(), W, S, n_fill, n_evict, n_top_hit, n_move_hit, n_fifo_hit,
               n_idle, m.misses, m.accesses);
      checks++;
      if (n_fill_order_err != 0) begin
        failures++;
        $display("FAIL cfg%0d empty ways not filled in order 0,1,2,...", g);
      end
      checks++;
      if (n_fill == 0 || n_evict == 0 ||
          (P == POLICY_LRU  && (n_top_hit == 0 || n_move_hit == 0)) ||
          (P == POLICY_FIFO && n_fifo_hit == 0)) begin
        failures++;
        $display("FAIL cfg%0d a mechanism never occurred", g);
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
