// trace_excerpt_tb - replays two short, known access sequences on the
// 4 line direct-mapped cache and checks every hit and word.
//
// 1. A one-instruction interrupt taken while the DSP idles on a nop: the
//    nop at 0x1510 (word 0x00004FC0) is fetched again and again, broken by
//    the instructions at 0x0023 (0x8A0200D0) and 0x0024 (0xAA8200D4):
//      1510 0023 1510 1510 1510 1510 1510 0024 1510
//    0x1510 has index 0, 0x0023 and 0x0024 indices 3 and 0, so the first
//    fetch of each misses, later nops hit, and 0x0024 evicts the nop from
//    line 0, making the final nop miss again.
// 2. A miss followed by a hit: with tag 0x0992 held in line 0 (by 0x2648)
//    and tag 0x0991 in line 1 (by 0x2645), address 0x2644 (tag 0x0991,
//    index 0) misses and 0x2645 (tag 0x0991, index 1) hits.
// Expected hits are written out below; data words of the first sequence
// are planted in the memory model.
module trace_excerpt_tb;
  import cache_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, active = 1'b0;
  mem_access_t pc_i = '0, mem_o;
  word_t       mem_rdata, data_de;
  logic        de_valid, hit, exp_hit = 1'b0;
  int          checks = 0, failures = 0, sb_checks, sb_fail, sb_hits, n_rd, n_wr;

  always #5 clk = ~clk;

  cache_dm #(.LINES(4)) dut (
    .clk (clk), .rst_n (rst_n), .pc_i (pc_i), .mem_o (mem_o), .mem_rdata_i (mem_rdata),
    .data_de_o (data_de), .de_valid_o (de_valid), .hit_o (hit)
  );
  tb_flat_mem u_mem (.clk (clk), .req_i (mem_o), .rdata_o (mem_rdata),
                     .n_read (n_rd), .n_write (n_wr));
  cache_scoreboard u_sb (
    .clk (clk), .active (active), .pc_i (pc_i), .exp_hit (exp_hit),
    .hit_o (hit), .de_valid_o (de_valid), .data_de_o (data_de),
    .checks (sb_checks), .failures (sb_fail), .hits (sb_hits)
  );

  localparam int N = 13;
  localparam addr_t SEQ_A [N] = '{16'h1510, 16'h0023, 16'h1510, 16'h1510, 16'h1510, 16'h1510,
                                  16'h1510, 16'h0024, 16'h1510,
                                  16'h2648, 16'h2645, 16'h2644, 16'h2645};
  localparam bit    SEQ_H [N] = '{0, 0, 1, 1, 1, 1, 1, 0, 0,
                                  0, 0, 0, 1};

  initial begin
    #1;
    u_mem.mem[16'h1510]  = 32'h0000_4FC0;  u_sb.golden[16'h1510] = 32'h0000_4FC0;
    u_mem.mem[16'h0023]  = 32'h8A02_00D0;  u_sb.golden[16'h0023] = 32'h8A02_00D0;
    u_mem.mem[16'h0024]  = 32'hAA82_00D4;  u_sb.golden[16'h0024] = 32'hAA82_00D4;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    active = 1'b1;
    for (int k = 0; k < N; k++) begin
      pc_i = '0;
      pc_i.en = 1'b1;
      pc_i.addr = SEQ_A[k];
      exp_hit = SEQ_H[k];
      @(negedge clk);
    end
    pc_i = '0;
    exp_hit = 1'b0;
    repeat (3) @(negedge clk);
    active = 1'b0;
    checks = sb_checks + 2;
    failures = sb_fail;
    if (sb_hits != 6) failures++;
    if (n_rd != N - 6) failures++;
    $display("excerpt: %0d fetches, %0d hits, %0d memory reads", N, sb_hits, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
