// Self-checking test of one LRU stack row (4-way): checks the precharge
// value, that the comparator fires only for the stored way, that the enable
// is the OR of the comparator and the enable from below, and that the row
// loads the row above only when enabled, one clock edge after the request.
module tb_lru_row;
  int checks = 0, failures = 0;

  logic       clk = 1'b0;
  logic       precharge;
  logic [3:0] match;
  logic       en_below;
  logic [1:0] d_in;
  logic [1:0] q;
  logic       cmp, en;

  always #5 clk = ~clk;

  lru_row #(.WAYS(4), .INIT(2)) dut (
    .clk(clk), .precharge(precharge), .match(match), .en_below(en_below),
    .d_in(d_in), .q(q), .cmp(cmp), .en(en)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (q=%0d cmp=%b en=%b)", what, q, cmp, en);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] model;
    precharge = 1'b0; match = '0; en_below = 1'b0; d_in = '0;
    #1 precharge = 1'b1;
    #12;
    check(q == 2'd2, "precharge value");
    precharge = 1'b0;
    model = 2'd2;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      match    = ($urandom_range(0, 4) == 4) ? 4'b0 : 4'(1 << $urandom_range(0, 3));
      en_below = ($urandom_range(0, 2) == 0);
      d_in     = 2'($urandom);
      #1;
      check(cmp == match[model], "comparator");
      check(en == (match[model] | en_below), "enable chain OR");
      @(posedge clk);
      if (match[model] | en_below) model = d_in;
      #1;
      check(q == model, "row contents after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
