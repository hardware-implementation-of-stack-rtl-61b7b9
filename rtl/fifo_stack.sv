// FIFO control circuit of one cache set: WAYS rows of log2(WAYS) bits.
//
// The bottom row holds the way that was filled longest ago, which is the
// output fifo_addr: the way to replace on the next miss. The only input is
// the miss line, which enables every row at once: on the rising clock edge
// the bottom row is copied to the top and all other rows shift down one
// place, so the way just refilled becomes the newest entry. Hits do not touch
// the stack. precharge (asynchronous, high active) presets row k to way
// WAYS-1-k, so an empty set is filled in the order 0, 1, 2, ...
// The rotate-on-miss structure follows the published circuit; the initial
// order and the asynchronous preset are this design's choices.
module fifo_stack
  import stack_repl_pkg::*;
#(
  parameter int unsigned WAYS = 4,
  localparam int unsigned AW = $clog2(WAYS)
) (
  input  logic                     clk,
  input  logic                     precharge,
  input  logic                     miss,
  output logic [AW-1:0]            fifo_addr,
  output logic [WAYS-1:0][AW-1:0]  rows
);

  for (genvar k = 0; k < WAYS; k++) begin : g_row
    logic [AW-1:0] d;
    if (k == 0) begin : g_top
      assign d = rows[WAYS-1];
    end else begin : g_shift
      assign d = rows[k-1];
    end

    stack_reg #(.AW(AW), .INIT(init_way(WAYS, k))) u_reg (
      .clk       (clk),
      .precharge (precharge),
      .en        (miss),
      .d         (d),
      .q         (rows[k])
    );
  end

  assign fifo_addr = rows[WAYS-1];

endmodule
