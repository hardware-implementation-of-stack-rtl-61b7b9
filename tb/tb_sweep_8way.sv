// Associativity sweep point: 32 KB cache, 32-byte blocks, 8 ways, LRU and
// FIFO replacement side by side on the same synthetic reference stream of
// 30,000 accesses, every access checked against a reference model (see
// assoc_sweep_pair). A watchdog ends the run if it does not finish.
module tb_sweep_8way;
  bit finished;
  int checks, failures;

  assoc_sweep_pair #(.WAYS(8)) u_pair (
    .finished(finished), .checks(checks), .failures(failures)
  );

  initial begin
    #400000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
