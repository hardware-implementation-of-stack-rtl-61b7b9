// Self-checking test of fifo_stack at 4 (default) and 16 ways.
//
// A queue model of the fill order (back = oldest way) rotates its back entry
// to the front on each miss; cycles without a miss (hits) leave it alone.
// After every rising clock edge all rows and fifo_addr must equal the model.
// Also checks that the first WAYS misses after precharge name the ways
// 0, 1, 2, ... in turn.
module tb_fifo_stack;
  localparam int CYCLES = 2000;

  int checks = 0, failures = 0;
  int n_miss = 0, n_hold = 0;
  bit done [2];

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

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int W  = (g == 0) ? 4 : 16;
    localparam int AW = $clog2(W);
    logic                 miss;
    logic [AW-1:0]        fifo_addr;
    logic [W-1:0][AW-1:0] rows;

    if (g == 0) begin : g_def
      fifo_stack dut (.clk(clk), .precharge(precharge), .miss(miss),
                      .fifo_addr(fifo_addr), .rows(rows));
    end else begin : g_par
      fifo_stack #(.WAYS(W)) dut (.clk(clk), .precharge(precharge),
                      .miss(miss), .fifo_addr(fifo_addr), .rows(rows));
    end

    task automatic compare(input int model[$], input string when);
      bit ok = 1'b1;
      for (int k = 0; k < W; k++) if (int'(rows[k]) != model[k]) ok = 1'b0;
      checks++;
      if (!ok || int'(fifo_addr) != model[W-1]) begin
        failures++;
        $display("FAIL %0d-way %s: rows=%p model=%p", W, when, rows, model);
      end
    endtask

    initial begin
      int model[$];
      miss = 1'b0;
      for (int k = 0; k < W; k++) model.push_back(W - 1 - k);
      #3;
      compare(model, "after precharge");
      @(negedge clk);
      precharge = 1'b0;
      // fill order of an empty set
      for (int i = 0; i < W; i++) begin
        @(negedge clk);
        checks++;
        if (int'(fifo_addr) != i) begin
          failures++;
          $display("FAIL %0d-way fill %0d: victim %0d", W, i, fifo_addr);
        end
        miss = 1'b1;
        @(posedge clk);
        #1;
        model.push_front(model.pop_back());
        miss = 1'b0;
      end
      for (int i = 0; i < CYCLES; i++) begin
        @(negedge clk);
        miss = ($urandom_range(0, 2) == 0);
        @(posedge clk);
        #1;
        if (miss) begin
          model.push_front(model.pop_back());
          if (g == 0) n_miss++;
        end else if (g == 0) begin
          n_hold++;
        end
        compare(model, "after edge");
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (done[0] && done[1]);
    $display("4-way: misses=%0d hits/idle=%0d", n_miss, n_hold);
    checks++;
    if (n_miss == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
