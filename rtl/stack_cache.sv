// Set-associative cache directory with a stack-based replacement circuit.
//
// An access presents a byte address; it is split into block offset, set
// index and tag. The tag RAM searches the addressed set and gives one-hot
// match lines or a miss. Every set owns its own replacement stack, an LRU
// stack or a FIFO stack chosen by POLICY; only the addressed set's stack
// sees the match and miss lines. The bottom row of that stack is the way to
// replace, victim_way. On a miss the directory writes the new tag into
// victim_way of the set, and the stack moves that way to its top, on the
// same clock edge. So one access takes one clock cycle: the outputs are
// combinational from the request, the directory and the stack change on the
// rising edge that ends the cycle.
//
// The data array, the main memory and the rest of the cache controller are
// outside: they take miss, victim_way and hit_way from the ports.
// precharge (asynchronous, high active) clears the tag RAM's valid bits and
// sets every stack to its initial order.
//
// Defaults: a 4-way cache of 32 KB with 32-byte blocks (256 sets) and 32-bit
// addresses, LRU replacement.
// The tag RAM feeding match/miss to a per-set stack whose bottom row is the
// replaced block address follows the published architecture, as do 4 ways
// and the 32 KB / 32-byte-block size. The address split, the same-edge tag
// refill and the elaboration-time POLICY switch are this design's own.
// Lint notes: the stacks' rows outputs are left open (they exist for
// observation) and the block-offset bits of req_addr are not used.
module stack_cache
  import stack_repl_pkg::*;
#(
  parameter policy_e     POLICY      = POLICY_LRU,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned SETS        = 256,
  parameter int unsigned BLOCK_BYTES = 32,
  parameter int unsigned ADDR_W      = 32,
  localparam int unsigned AW    = $clog2(WAYS),
  localparam int unsigned OFF_W = $clog2(BLOCK_BYTES),
  localparam int unsigned SET_B = $clog2(SETS),
  localparam int unsigned SET_W = (SETS > 1) ? SET_B : 1,
  localparam int unsigned TAG_W = ADDR_W - OFF_W - SET_B
) (
  input  logic              clk,
  input  logic              precharge,
  input  logic              req_valid,
  input  logic [ADDR_W-1:0] req_addr,
  output logic              hit,
  output logic              miss,
  output logic [WAYS-1:0]   match,
  output logic [AW-1:0]     hit_way,
  output logic [AW-1:0]     victim_way
);

  logic [SET_W-1:0] set_idx;
  logic [TAG_W-1:0] tag;
  logic [AW-1:0]    repl_addr [SETS];

  if (SETS > 1) begin : g_idx
    assign set_idx = req_addr[OFF_W +: SET_B];
  end else begin : g_one_set
    assign set_idx = '0;
  end
  assign tag = req_addr[ADDR_W-1 -: TAG_W];

  tag_ram #(.WAYS(WAYS), .SETS(SETS), .TAG_W(TAG_W)) u_tags (
    .clk          (clk),
    .clear        (precharge),
    .lookup_valid (req_valid),
    .lookup_set   (set_idx),
    .lookup_tag   (tag),
    .match        (match),
    .miss         (miss),
    .wr_en        (miss),
    .wr_set       (set_idx),
    .wr_way       (victim_way),
    .wr_tag       (tag)
  );

  for (genvar s = 0; s < SETS; s++) begin : g_set
    logic            sel;
    logic [WAYS-1:0] s_match;
    logic            s_miss;

    assign sel     = (set_idx == SET_W'(s));
    assign s_match = sel ? match : '0;
    assign s_miss  = sel & miss;

    if (POLICY == POLICY_LRU) begin : g_lru
      lru_stack #(.WAYS(WAYS)) u_stack (
        .clk       (clk),
        .precharge (precharge),
        .match     (s_match),
        .miss      (s_miss),
        .lru_addr  (repl_addr[s]),
        .rows      ()
      );
    end else begin : g_fifo
      fifo_stack #(.WAYS(WAYS)) u_stack (
        .clk       (clk),
        .precharge (precharge),
        .miss      (s_miss),
        .fifo_addr (repl_addr[s]),
        .rows      ()
      );
    end
  end

  assign victim_way = repl_addr[set_idx];
  assign hit        = |match;

  always_comb begin
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (match[w]) hit_way = AW'(w);
    end
  end

endmodule
