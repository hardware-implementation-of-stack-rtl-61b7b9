// One stack row's storage: AW D flip-flops sharing an enable.
//
// On a rising clock edge with en high the row takes d; otherwise it holds.
// The precharge input is the power-up initialisation: while it is high the
// row is forced, asynchronously, to INIT, which sets up the initial stack
// order. Output q is the stored way number.
// Enabled D flip-flops and a precharge preset follow the published circuit;
// making the preset asynchronous is this design's choice.
module stack_reg #(
  parameter int unsigned AW   = 2,
  parameter int unsigned INIT = 0
) (
  input  logic          clk,
  input  logic          precharge,
  input  logic          en,
  input  logic [AW-1:0] d,
  output logic [AW-1:0] q
);

  always_ff @(posedge clk or posedge precharge) begin
    if (precharge)  q <= AW'(INIT);
    else if (en)    q <= d;
  end

endmodule
