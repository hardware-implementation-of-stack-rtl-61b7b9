// Building block of the associativity sweep testbenches: a 32 KB cache with
// 32-byte blocks and WAYS ways (1024/WAYS sets), built once with the LRU
// stack and once with the FIFO stack. Both are fed the same synthetic
// reference stream (cache_ref_pkg::trace_gen, N_ACC accesses, one per
// cycle) and every access of each is checked against cache_ref_pkg's model.
// At the end the miss rates are printed and finished is raised; the
// instantiating testbench reports checks and failures.
module assoc_sweep_pair #(
  parameter int unsigned WAYS  = 4,
  parameter int unsigned N_ACC = 30000
) (
  output bit finished,
  output int checks,
  output int failures
);
  import stack_repl_pkg::*;
  import cache_ref_pkg::*;

  localparam int unsigned SETS = 1024 / WAYS;
  localparam int unsigned AW   = $clog2(WAYS);

  bit done [2];
  int unsigned misses [2];

  logic        clk = 1'b0;
  logic        precharge = 1'b0;
  logic        req_valid = 1'b0;
  logic [31:0] req_addr = '0;
  always #5 clk = ~clk;
  initial #1 precharge = 1'b1;

  initial begin
    finished = 1'b0;
    checks   = 0;
    failures = 0;
  end

  initial begin
    trace_gen t = new(32'hC0FF_EE01);
    #3;
    precharge = 1'b0;
    for (int i = 0; i < int'(N_ACC); i++) begin
      @(negedge clk);
      req_valid = 1'b1;
      req_addr  = t.next();
    end
  end

  for (genvar g = 0; g < 2; g++) begin : g_pol
    localparam policy_e P = (g == 0) ? POLICY_LRU : POLICY_FIFO;

    logic            hit, miss;
    logic [WAYS-1:0] match;
    logic [AW-1:0]   hit_way, victim_way;

    stack_cache #(.POLICY(P), .WAYS(WAYS), .SETS(SETS)) dut (
      .clk(clk), .precharge(precharge), .req_valid(req_valid),
      .req_addr(req_addr), .hit(hit), .miss(miss), .match(match),
      .hit_way(hit_way), .victim_way(victim_way)
    );

    initial begin
      cache_ref m = new(WAYS, SETS, 32, P == POLICY_LRU);
      #3;
      for (int i = 0; i < int'(N_ACC); i++) begin
        bit e_hit, moved, ok;
        int e_way, e_victim;
        @(negedge clk);
        #1;
        m.access(req_addr, e_hit, e_way, e_victim, moved);
        ok = (hit == e_hit) && (miss == !e_hit);
        if (e_hit) ok &= (match == WAYS'(1 << e_way)) && (int'(hit_way) == e_way);
        else       ok &= (match == '0) && (int'(victim_way) == e_victim);
        checks++;
        if (!ok) begin
          failures++;
          if (failures < 10)
            $display("FAIL %s %0d-way access %0d addr=%h", P.name(), WAYS, i, req_addr);
        end
      end
      misses[g] = m.misses;
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (done[0] && done[1]);
    $display("32 KB, %0d-way, %0d accesses: LRU miss rate %0.2f%%, FIFO miss rate %0.2f%%",
             WAYS, N_ACC, 100.0 * misses[0] / N_ACC, 100.0 * misses[1] / N_ACC);
    checks++;
    if (misses[0] == 0 || misses[1] == 0) begin
      failures++;
      $display("FAIL no misses at all");
    end
    finished = 1'b1;
  end
endmodule
