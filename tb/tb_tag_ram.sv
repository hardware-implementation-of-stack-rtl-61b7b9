// Self-checking test of tag_ram at its default size (4 ways, 256 sets,
// 19-bit tags). After clear every lookup must miss. Then random writes and
// lookups run against an array model: a lookup of a stored tag must give the
// one-hot match of its way and no miss, any other tag a miss, and no lookup
// neither. Writes take effect at the clock edge.
module tb_tag_ram;
  localparam int WAYS = 4, SETS = 256, TAG_W = 19;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0;

  logic             clk = 1'b0;
  logic             clear = 1'b0;
  logic             lookup_valid;
  logic [7:0]       lookup_set;
  logic [TAG_W-1:0] lookup_tag;
  logic [WAYS-1:0]  match;
  logic             miss;
  logic             wr_en;
  logic [7:0]       wr_set;
  logic [1:0]       wr_way;
  logic [TAG_W-1:0] wr_tag;

  always #5 clk = ~clk;

  tag_ram dut (.*);

  logic [TAG_W-1:0] m_tag   [SETS][WAYS];
  bit               m_valid [SETS][WAYS];

  task automatic lookup_check(input int s, input logic [TAG_W-1:0] t, input bit v);
    logic [WAYS-1:0] exp_match = '0;
    lookup_valid = v; lookup_set = 8'(s); lookup_tag = t;
    #1;
    for (int w = 0; w < WAYS; w++)
      if (v && m_valid[s][w] && m_tag[s][w] == t) exp_match[w] = 1'b1;
    checks++;
    if (match !== exp_match || miss !== (v && exp_match == '0)) begin
      failures++;
      $display("FAIL set=%0d tag=%h valid=%b: match=%b miss=%b expected %b",
               s, t, v, match, miss, exp_match);
    end
    if (v && exp_match != '0) n_hit++;
    if (v && exp_match == '0) n_miss++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 1'b0; wr_set = '0; wr_way = '0; wr_tag = '0;
    lookup_valid = 1'b0; lookup_set = '0; lookup_tag = '0;
    #1 clear = 1'b1;
    #2 clear = 1'b0;
    foreach (m_valid[s, w]) m_valid[s][w] = 1'b0;
    for (int i = 0; i < 64; i++) lookup_check($urandom_range(0, SETS-1), TAG_W'($urandom), 1'b1);
    for (int i = 0; i < 4000; i++) begin
      int s, w;
      @(negedge clk);
      s = $urandom_range(0, 15);          // a few sets, so they fill up
      if ($urandom_range(0, 1) == 0) begin
        w = $urandom_range(0, WAYS-1);
        lookup_check(s, m_valid[s][w] ? m_tag[s][w] : TAG_W'($urandom_range(0, 7)), 1'b1);
      end else begin
        lookup_check(s, TAG_W'($urandom_range(0, 7)), $urandom_range(0, 7) != 0);
      end
      // write in the same cycle as the lookup; visible after the edge only
      wr_en  = ($urandom_range(0, 3) == 0);
      wr_set = 8'($urandom_range(0, 15));
      wr_way = 2'($urandom);
      wr_tag = TAG_W'($urandom_range(0, 7));
      #1;
      lookup_check(s, lookup_tag, lookup_valid);
      @(posedge clk);
      if (wr_en) begin
        m_tag[wr_set][wr_way]   = wr_tag;
        m_valid[wr_set][wr_way] = 1'b1;
      end
      #1;
      wr_en = 1'b0;
    end
    $display("hits=%0d misses=%0d", n_hit, n_miss);
    checks++;
    if (n_hit == 0 || n_miss == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
