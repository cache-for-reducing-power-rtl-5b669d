// cache_2w_tb - self-checking testbench of the 2-way set-associative cache.
//
// Drives the 4 line x 2 way cache, and the one-line-per-way corner case,
// with the access stream of tb_stim_pkg, each with its own falling-edge
// memory model. The reference model here keeps tags and valid bits of both
// ways and its own copy of the semi-random round-robin bit, which flips
// one cycle after each hit reaches the Fe state; it gives the expected hit
// of every access, which cache_scoreboard checks together with the
// returned word and its latency. Also checks memory traffic, that both
// ways were filled and hit, and that the replacement bit moved.
module cache_2w_tb;
  import cache_pkg::*;
  import tb_stim_pkg::*;

  localparam int N_ACC = 20000;
  localparam int NCFG = 2;
  localparam int LINES_OF [NCFG] = '{4, 1};

  logic        clk = 1'b0, rst_n = 1'b0, active = 1'b0;
  mem_access_t pc_i = '0;
  int          checks = 0, failures = 0;
  logic        exp_hit [NCFG];
  int          sb_checks [NCFG], sb_fail [NCFG], sb_hits [NCFG], n_rd [NCFG], n_wr [NCFG];
  int          way_hits [NCFG][2], way_fills [NCFG][2], rrr_flips [NCFG];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int LINES = LINES_OF[g];
    mem_access_t mem_o;
    word_t       mem_rdata, data_de;
    logic        de_valid, hit;

    cache_2w #(.LINES(LINES)) dut (
      .clk (clk), .rst_n (rst_n), .pc_i (pc_i),
      .mem_o (mem_o), .mem_rdata_i (mem_rdata),
      .data_de_o (data_de), .de_valid_o (de_valid), .hit_o (hit)
    );
    tb_flat_mem u_mem (.clk (clk), .req_i (mem_o), .rdata_o (mem_rdata),
                       .n_read (n_rd[g]), .n_write (n_wr[g]));
    cache_scoreboard u_sb (
      .clk (clk), .active (active), .pc_i (pc_i), .exp_hit (exp_hit[g]),
      .hit_o (hit), .de_valid_o (de_valid), .data_de_o (data_de),
      .checks (sb_checks[g]), .failures (sb_fail[g]), .hits (sb_hits[g])
    );

    // ---- reference model ----
    logic [15:0] ref_tag [2][LINES];
    logic        ref_val [2][LINES];
    logic        ref_rrr = 1'b0, h1 = 1'b0, h2 = 1'b0;

    function automatic void ref_reset();
      for (int w = 0; w < 2; w++) begin
        for (int i = 0; i < LINES; i++) begin ref_val[w][i] = 1'b0; ref_tag[w][i] = '0; end
        way_hits[g][w] = 0;
        way_fills[g][w] = 0;
      end
      rrr_flips[g] = 0;
    endfunction

    function automatic logic ref_access(mem_access_t a);
      int          idx = int'(a.addr) % LINES;
      logic [15:0] tag = a.addr / 16'(LINES);
      logic        hit_k = 1'b0;
      int          m = -1, w;
      if (h2) begin ref_rrr = !ref_rrr; rrr_flips[g]++; end
      if (a.en) begin
        for (int i = 0; i < 2; i++)
          if (ref_val[i][idx] && ref_tag[i][idx] == tag) m = i;
        if (!a.we && m >= 0) begin
          hit_k = 1'b1;
          way_hits[g][m]++;
        end else begin
          w = (m >= 0) ? m : int'(ref_rrr);
          ref_val[w][idx] = 1'b1;
          ref_tag[w][idx] = tag;
          way_fills[g][w]++;
        end
      end
      h2 = h1;
      h1 = hit_k;
      return hit_k;
    endfunction
  end

  int n_reads_issued = 0, n_writes_issued = 0;

  initial begin
    stim_gen     gen;
    mem_access_t a;
    gen = new(777);
    g_cfg[0].ref_reset();
    g_cfg[1].ref_reset();
    exp_hit = '{default: 1'b0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    active = 1'b1;
    for (int k = 0; k < N_ACC; k++) begin
      a = gen.next_access();
      exp_hit[0] = g_cfg[0].ref_access(a);
      exp_hit[1] = g_cfg[1].ref_access(a);
      if (a.en && !a.we) n_reads_issued++;
      if (a.en && a.we) n_writes_issued++;
      pc_i = a;
      @(negedge clk);
    end
    pc_i = '0;
    exp_hit = '{default: 1'b0};
    repeat (3) @(negedge clk);
    active = 1'b0;
    @(negedge clk);
    for (int g = 0; g < NCFG; g++) begin
      checks   += sb_checks[g] + 4;
      failures += sb_fail[g];
      if (n_rd[g] != n_reads_issued - sb_hits[g] || n_wr[g] != n_writes_issued) begin
        failures++;
        $display("memory reads %0d writes %0d, expected %0d %0d", n_rd[g], n_wr[g],
                 n_reads_issued - sb_hits[g], n_writes_issued);
      end
      if (way_hits[g][0] == 0 || way_hits[g][1] == 0) failures++;
      if (way_fills[g][0] == 0 || way_fills[g][1] == 0) failures++;
      if (rrr_flips[g] == 0) failures++;
      $display("%0dx2: reads %0d hits %0d (%0d%%), way hits %0d/%0d, fills %0d/%0d, flips %0d",
               LINES_OF[g], n_reads_issued, sb_hits[g], 100 * sb_hits[g] / n_reads_issued,
               way_hits[g][0], way_hits[g][1], way_fills[g][0], way_fills[g][1], rrr_flips[g]);
    end
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
