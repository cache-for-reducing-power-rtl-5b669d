// cache_scoreboard - checks a cache's outputs against the access stream.
//
// Samples each PC-state access with the hit the testbench's own reference
// model expects for it, keeps a golden copy of the memory (updated in
// program order), and at every falling edge checks
//   - hit_o against the expected hit of the access now in the Fe state,
//   - de_valid_o / data_de_o against the access two rising edges old: the
//     word must be the golden word, and must appear with exactly that
//     latency.
// Counts checks, failures and hits. With CHECK_HIT = 0 the hit itself is
// not predicted, only required to fall on a read.
module cache_scoreboard
  import cache_pkg::*;
  import tb_mem_pkg::*;
#(
  parameter bit CHECK_HIT = 1'b1   // 0: count hits but do not check them
) (
  input  logic        clk,
  input  logic        active,
  input  mem_access_t pc_i,
  input  logic        exp_hit,
  input  logic        hit_o,
  input  logic        de_valid_o,
  input  word_t       data_de_o,
  output int          checks,
  output int          failures,
  output int          hits
);
  typedef struct packed { logic rd; logic hit; word_t data; addr_t addr; } stage_t;
  stage_t s1, s2;
  word_t  golden [2**ADDR_W];

  initial begin
    for (int a = 0; a < 2**ADDR_W; a++) golden[a] = init_word(addr_t'(a));
    s1 = '0; s2 = '0; checks = 0; failures = 0; hits = 0;
  end

  always @(posedge clk) begin
    s2 <= s1;
    s1 <= '{rd: pc_i.en && !pc_i.we, hit: exp_hit, data: golden[pc_i.addr], addr: pc_i.addr};
    if (pc_i.en && pc_i.we) golden[pc_i.addr] <= pc_i.data;
  end

  always @(negedge clk) if (active) begin
    checks = checks + (CHECK_HIT ? 2 : 1);
    if (CHECK_HIT && hit_o !== (s1.rd && s1.hit)) begin
      failures = failures + 1;
      $display("%t hit mismatch addr %h: got %b exp %b", $time, s1.addr, hit_o, s1.rd && s1.hit);
    end
    if (hit_o) hits = hits + 1;
    if (!CHECK_HIT && hit_o && !s1.rd) begin
      failures = failures + 1;
      $display("%t hit on a cycle without a read", $time);
    end
    if (de_valid_o !== s2.rd || (s2.rd && data_de_o !== s2.data)) begin
      failures = failures + 1;
      $display("%t data mismatch addr %h: got %b/%h exp %b/%h", $time, s2.addr,
               de_valid_o, data_de_o, s2.rd, s2.data);
    end
  end
endmodule
