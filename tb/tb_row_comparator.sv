// Self-checking test of row_comparator: for every stored row address and
// every one-hot match pattern (plus the all-zero pattern of a miss) the
// output must be high exactly when the match line of that address is set.
// Covers the 4-way default and an 8-way instance.
module tb_row_comparator;
  int checks = 0, failures = 0;

  logic [1:0] r4;
  logic [3:0] m4;
  logic       e4;
  logic [2:0] r8;
  logic [7:0] m8;
  logic       e8;

  row_comparator dut4 (.row_addr(r4), .match(m4), .equal(e4));
  row_comparator #(.WAYS(8)) dut8 (.row_addr(r8), .match(m8), .equal(e8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      for (int m = -1; m < 4; m++) begin
        r4 = 2'(r);
        m4 = (m < 0) ? 4'b0 : 4'(1 << m);
        #1;
        checks++;
        if (e4 !== (m == r)) begin
          failures++;
          $display("FAIL 4-way row=%0d match=%b equal=%b", r, m4, e4);
        end
      end
    end
    for (int r = 0; r < 8; r++) begin
      for (int m = -1; m < 8; m++) begin
        r8 = 3'(r);
        m8 = (m < 0) ? 8'b0 : 8'(1 << m);
        #1;
        checks++;
        if (e8 !== (m == r)) begin
          failures++;
          $display("FAIL 8-way row=%0d match=%b equal=%b", r, m8, e8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
