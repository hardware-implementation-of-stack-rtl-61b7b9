// LRU control circuit of one cache set: a stack of WAYS rows of log2(WAYS)
// bits, each row holding a way number. Row 0 (top) holds the most recently
// used way, row WAYS-1 (bottom) the least recently used one, which is the
// output lru_addr: the way to replace on the next miss.
//
// Inputs are the WAYS one-hot match lines from the tag RAM and the miss line.
// - Hit in row k > 0: the comparator of row k fires, the OR chain enables
//   rows k..0, the content of row k is put on the transfer lines and loaded
//   into row 0 while rows 0..k-1 shift down one place.
// - Miss: the miss line enables the bottom row and, through the OR chain,
//   every row; the bottom row goes onto the transfer lines and to the top,
//   all other rows shift down.
// - Hit in row 0 (the MRU way): no enable is raised, nothing changes.
// The transfer lines are a one-hot selected OR of the row contents (pass
// switches in the full-custom version). Row 0 shares the enable of row 1.
// The update happens on one rising clock edge per access; lru_addr and rows
// show the new order right after that edge. precharge (asynchronous, high
// active) presets row k to way WAYS-1-k.
// At most one match line may be high, and match must be all zero when miss
// is high; the assertions check this.
// Follows the published circuit: comparators on rows 1..n-1, an OR chain
// fed by miss at the bottom, transfer lines into the top row. This design's
// own choices: row 0 sharing row 1's enable, the bottom row driving the
// transfer lines on its enable, the AND-OR in place of pass switches, and
// the initial order.
module lru_stack
  import stack_repl_pkg::*;
#(
  parameter int unsigned WAYS = 4,
  localparam int unsigned AW = $clog2(WAYS)
) (
  input  logic                     clk,
  input  logic                     precharge,
  input  logic [WAYS-1:0]          match,
  input  logic                     miss,
  output logic [AW-1:0]            lru_addr,
  output logic [WAYS-1:0][AW-1:0]  rows
);

  logic [WAYS-1:0] cmp;
  logic [WAYS-1:0] en;
  logic [AW-1:0]   xfer;     // transfer lines to the top row

  // Top row: no comparator, loads the transfer lines whenever row 1 loads.
  assign cmp[0] = 1'b0;
  assign en[0]  = en[1];

  stack_reg #(.AW(AW), .INIT(init_way(WAYS, 0))) u_top (
    .clk       (clk),
    .precharge (precharge),
    .en        (en[0]),
    .d         (xfer),
    .q         (rows[0])
  );

  for (genvar k = 1; k < WAYS; k++) begin : g_row
    logic en_below;
    if (k == WAYS - 1) begin : g_bottom
      assign en_below = miss;
    end else begin : g_mid
      assign en_below = en[k+1];
    end

    lru_row #(.WAYS(WAYS), .INIT(init_way(WAYS, k))) u_row (
      .clk       (clk),
      .precharge (precharge),
      .match     (match),
      .en_below  (en_below),
      .d_in      (rows[k-1]),
      .q         (rows[k]),
      .cmp       (cmp[k]),
      .en        (en[k])
    );
  end

  // Transfer lines: the matched row drives them; on a miss the bottom row.
  always_comb begin
    xfer = '0;
    for (int k = 1; k < WAYS; k++) begin
      if (k == WAYS - 1) begin
        if (en[k]) xfer |= rows[k];
      end else begin
        if (cmp[k]) xfer |= rows[k];
      end
    end
  end

  assign lru_addr = rows[WAYS-1];

  // Input protocol
  a_match_onehot: assert property (@(posedge clk) $onehot0(match));
  a_miss_no_match: assert property (@(posedge clk) miss |-> (match == '0));

endmodule
