// cache_dm_tb - self-checking testbench of the direct-mapped cache.
//
// Runs the 4 line and 8 line configurations, and the one-line corner
// case, on the same access stream (tb_stim_pkg), each with its own
// falling-edge memory model. A reference
// model in this file (tag and valid per line, updated in program order)
// gives the expected hit of every access; cache_scoreboard checks hit_o,
// the returned word and its two-edge latency. Also checks that a hit never
// enables the memory (memory reads = read misses, writes all reach it),
// and that hits and misses both occurred.
module cache_dm_tb;
  import cache_pkg::*;
  import tb_stim_pkg::*;

  localparam int N_ACC = 20000;

  logic        clk = 1'b0, rst_n = 1'b0, active = 1'b0;
  mem_access_t pc_i = '0;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  // ---- two configurations ----
  localparam int NCFG = 3;
  localparam int LINES_OF [NCFG] = '{4, 8, 1};

  logic exp_hit [NCFG];
  int   c_checks [NCFG], c_fail [NCFG], c_hits [NCFG], n_rd [NCFG], n_wr [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    mem_access_t mem_o;
    word_t       mem_rdata, data_de;
    logic        de_valid, hit;

    cache_dm #(.LINES(LINES_OF[g])) dut (
      .clk (clk), .rst_n (rst_n), .pc_i (pc_i),
      .mem_o (mem_o), .mem_rdata_i (mem_rdata),
      .data_de_o (data_de), .de_valid_o (de_valid), .hit_o (hit)
    );
    tb_flat_mem u_mem (.clk (clk), .req_i (mem_o), .rdata_o (mem_rdata),
                       .n_read (n_rd[g]), .n_write (n_wr[g]));
    cache_scoreboard u_sb (
      .clk (clk), .active (active), .pc_i (pc_i), .exp_hit (exp_hit[g]),
      .hit_o (hit), .de_valid_o (de_valid), .data_de_o (data_de),
      .checks (c_checks[g]), .failures (c_fail[g]), .hits (c_hits[g])
    );
  end

  // ---- reference model: direct mapped, one word per line ----
  logic [15:0] ref_tag [NCFG][8];
  logic        ref_val [NCFG][8];

  function automatic logic ref_access(int g, mem_access_t a);
    int    lines = LINES_OF[g];
    int    idx   = int'(a.addr) % lines;
    logic [15:0] tag = a.addr / 16'(lines);
    logic  hit;
    if (!a.en) return 1'b0;
    hit = !a.we && ref_val[g][idx] && ref_tag[g][idx] == tag;
    if (!hit) begin
      ref_val[g][idx] = 1'b1;
      ref_tag[g][idx] = tag;
    end
    return hit;
  endfunction

  int n_reads_issued = 0, n_writes_issued = 0;

  initial begin
    stim_gen     gen;
    mem_access_t a;
    gen = new(1234);
    for (int g = 0; g < NCFG; g++) begin
      exp_hit[g] = 1'b0;
      for (int i = 0; i < 8; i++) begin ref_val[g][i] = 1'b0; ref_tag[g][i] = '0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    active = 1'b1;
    for (int k = 0; k < N_ACC; k++) begin
      a = gen.next_access();
      for (int g = 0; g < NCFG; g++) exp_hit[g] = ref_access(g, a);
      if (a.en && !a.we) n_reads_issued++;
      if (a.en && a.we) n_writes_issued++;
      pc_i = a;
      @(negedge clk);
    end
    pc_i = '0;
    for (int g = 0; g < NCFG; g++) exp_hit[g] = 1'b0;
    repeat (3) @(negedge clk);
    active = 1'b0;
    @(negedge clk);
    for (int g = 0; g < NCFG; g++) begin
      checks += c_checks[g]; failures += c_fail[g];
      // memory traffic: every read miss is one memory read, every write one write
      checks++;
      if (n_rd[g] != n_reads_issued - c_hits[g] || n_wr[g] != n_writes_issued) begin
        failures++;
        $display("cfg %0d: memory reads %0d writes %0d, expected %0d %0d", g, n_rd[g],
                 n_wr[g], n_reads_issued - c_hits[g], n_writes_issued);
      end
      checks++;
      if (c_hits[g] == 0 || c_hits[g] == n_reads_issued) failures++;
      $display("LINES=%0d: reads %0d hits %0d (%0d%%) mem reads %0d writes %0d", LINES_OF[g],
               n_reads_issued, c_hits[g], 100 * c_hits[g] / n_reads_issued, n_rd[g], n_wr[g]);
    end
    // the larger cache must not hit less on this stream
    checks++;
    checks++;
    if (c_hits[1] < c_hits[0]) failures++;
    if (c_hits[0] < c_hits[2]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (N_ACC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
