// One cascadable row (rows 1 to n-1) of the LRU control stack.
//
// The row stores a way number in enabled D flip-flops (stack_reg). Its
// comparator (row_comparator) raises cmp when the match lines name the way
// stored here. The row's enable is the OR of its own comparator and the
// enable of the row below (en_below), so a hit at row k, or a miss entering
// at the bottom row, enables row k and every row above it. When enabled the
// row loads d_in, the content of the row above: the rows above the hit shift
// down by one. Rows are cascaded by wiring en to the en_below of the row
// above and q to its d_in of the row below; the bottom row's en_below is the
// miss signal. The top row, which has no comparator, is not built from this
// cell. Storage updates on the rising clock edge; cmp and en are
// combinational.
// The row's structure follows the published 4-way circuit; packaging it as
// a cascadable cell is this design's choice.
module lru_row #(
  parameter int unsigned WAYS = 4,
  parameter int unsigned INIT = 0,
  localparam int unsigned AW = $clog2(WAYS)
) (
  input  logic            clk,
  input  logic            precharge,
  input  logic [WAYS-1:0] match,
  input  logic            en_below,
  input  logic [AW-1:0]   d_in,
  output logic [AW-1:0]   q,
  output logic            cmp,
  output logic            en
);

  row_comparator #(.WAYS(WAYS)) u_cmp (
    .row_addr (q),
    .match    (match),
    .equal    (cmp)
  );

  assign en = cmp | en_below;

  stack_reg #(.AW(AW), .INIT(INIT)) u_reg (
    .clk       (clk),
    .precharge (precharge),
    .en        (en),
    .d         (d_in),
    .q         (q)
  );

endmodule
