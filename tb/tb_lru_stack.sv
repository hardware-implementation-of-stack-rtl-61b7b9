// Self-checking test of lru_stack at 4 (default), 8 and 32 ways.
//
// A queue model of the LRU order (index 0 = most recently used) is updated
// with each random access: a hit moves the way to the front, a miss moves the
// back entry to the front, an idle cycle changes nothing. After every rising
// clock edge all rows and lru_addr must equal the model, so each update is
// also checked to take exactly one clock cycle. The precharge order and the
// three cases (hit on the MRU row, hit on a lower row, miss) are counted and
// each must occur.
module tb_lru_stack;
  localparam int N_CFG = 3;
  localparam int CYCLES = 3000;

  int checks = 0, failures = 0;
  int n_mru_hit = 0, n_move_hit = 0, n_miss = 0, n_idle = 0;
  bit done [N_CFG];

  logic clk = 1'b0;
  logic precharge = 1'b0;
  initial #1 precharge = 1'b1;   // power-up precharge pulse
  always #5 clk = ~clk;

  initial begin
    #(CYCLES * 10 * 2 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < N_CFG; g++) begin : g_cfg
    localparam int W  = (g == 0) ? 4 : (g == 1) ? 8 : 32;
    localparam int AW = $clog2(W);
    logic [W-1:0]         match;
    logic                 miss;
    logic [AW-1:0]        lru_addr;
    logic [W-1:0][AW-1:0] rows;

    if (g == 0) begin : g_def
      lru_stack dut (.clk(clk), .precharge(precharge), .match(match),
                     .miss(miss), .lru_addr(lru_addr), .rows(rows));
    end else begin : g_par
      lru_stack #(.WAYS(W)) dut (.clk(clk), .precharge(precharge),
                     .match(match), .miss(miss), .lru_addr(lru_addr),
                     .rows(rows));
    end

    task automatic compare(input int model[$], input string when);
      bit ok = 1'b1;
      for (int k = 0; k < W; k++) if (int'(rows[k]) != model[k]) ok = 1'b0;
      checks++;
      if (!ok || int'(lru_addr) != model[W-1]) begin
        failures++;
        $display("FAIL %0d-way %s: rows=%p model=%p", W, when, rows, model);
      end
    endtask

    initial begin
      int model[$];
      match = '0; miss = 1'b0;
      for (int k = 0; k < W; k++) model.push_back(W - 1 - k);
      #3;
      compare(model, "after precharge");
      @(negedge clk);
      precharge = 1'b0;
      for (int i = 0; i < CYCLES; i++) begin
        int kind, way, pos;
        @(negedge clk);
        kind = $urandom_range(0, 9);
        match = '0; miss = 1'b0;
        if (kind < 3) begin
          miss = 1'b1;
        end else if (kind == 3) begin
          way = model[0];
          match[way] = 1'b1;
        end else if (kind < 9) begin
          way = $urandom_range(0, W - 1);
          match[way] = 1'b1;
        end
        @(posedge clk);
        #1;
        if (miss) begin
          model.push_front(model.pop_back());
          if (g == 0) n_miss++;
        end else if (match != '0) begin
          pos = 0;
          foreach (model[k]) if (model[k] == way) pos = k;
          if (pos == 0) begin
            if (g == 0) n_mru_hit++;
          end else begin
            model.delete(pos);
            model.push_front(way);
            if (g == 0) n_move_hit++;
          end
        end else if (g == 0) begin
          n_idle++;
        end
        compare(model, "after edge");
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (done[0] && done[1] && done[2]);
    $display("4-way: mru hits=%0d moving hits=%0d misses=%0d idle=%0d",
             n_mru_hit, n_move_hit, n_miss, n_idle);
    checks++;
    if (n_mru_hit == 0 || n_move_hit == 0 || n_miss == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
