// Tag RAM of a set-associative cache.
//
// Holds one tag and one valid bit per way of each of SETS sets. A lookup
// (lookup_valid, lookup_set, lookup_tag) compares the tag with every valid
// way of the addressed set in parallel and answers in the same cycle: match
// is one-hot with the way that holds the tag, and miss is high when no way
// does. When no lookup is presented both are low. A write (wr_en, wr_set,
// wr_way, wr_tag) stores a tag and sets its valid bit on the rising clock
// edge; the cache writes the victim way chosen by the replacement stack on a
// miss. clear (asynchronous, high active) invalidates every way at power-up.
// Tags are kept in flip-flops so that all ways of a set can be compared at
// once.
// Only the function (associative search giving match lines or a miss) is
// published; the parallel compare, flip-flop storage, valid bits and write
// port are this design's own.
module tag_ram #(
  parameter int unsigned WAYS  = 4,
  parameter int unsigned SETS  = 256,
  parameter int unsigned TAG_W = 19,
  localparam int unsigned AW    = $clog2(WAYS),
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1
) (
  input  logic             clk,
  input  logic             clear,
  input  logic             lookup_valid,
  input  logic [SET_W-1:0] lookup_set,
  input  logic [TAG_W-1:0] lookup_tag,
  output logic [WAYS-1:0]  match,
  output logic             miss,
  input  logic             wr_en,
  input  logic [SET_W-1:0] wr_set,
  input  logic [AW-1:0]    wr_way,
  input  logic [TAG_W-1:0] wr_tag
);

  logic [TAG_W-1:0] tags  [SETS][WAYS];
  logic [WAYS-1:0]  valid [SETS];

  always_ff @(posedge clk) begin
    if (wr_en) tags[wr_set][wr_way] <= wr_tag;
  end

  always_ff @(posedge clk or posedge clear) begin
    if (clear) begin
      for (int s = 0; s < SETS; s++) valid[s] <= '0;
    end else if (wr_en) begin
      valid[wr_set][wr_way] <= 1'b1;
    end
  end

  always_comb begin
    match = '0;
    for (int w = 0; w < WAYS; w++) begin
      match[w] = lookup_valid && valid[lookup_set][w]
                 && (tags[lookup_set][w] == lookup_tag);
    end
    miss = lookup_valid && (match == '0);
  end

endmodule
