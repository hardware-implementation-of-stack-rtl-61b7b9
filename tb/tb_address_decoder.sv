// Self-checking test of address_decoder: every address of the 2-bit decoder
// (a 4-way stack) and of a 5-bit one (32 ways) must raise exactly the line
// 1 << addr.
module tb_address_decoder;
  int checks = 0, failures = 0;

  logic [1:0]  a2;
  logic [3:0]  y2;
  logic [4:0]  a5;
  logic [31:0] y5;

  address_decoder dut2 (.addr(a2), .onehot(y2));
  address_decoder #(.AW(5)) dut5 (.addr(a5), .onehot(y5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      a2 = 2'(i);
      #1;
      checks++;
      if (y2 !== 4'(1 << i)) begin
        failures++;
        $display("FAIL AW=2 addr=%0d onehot=%b", i, y2);
      end
    end
    for (int i = 0; i < 32; i++) begin
      a5 = 5'(i);
      #1;
      checks++;
      if (y5 !== 32'(1) << i) begin
        failures++;
        $display("FAIL AW=5 addr=%0d onehot=%h", i, y5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
