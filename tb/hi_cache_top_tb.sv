// hi_cache_top_tb - end-to-end test of the cache subsystem at its defaults.
//
// All four slots (4 line direct mapped, 8 line direct mapped, 4 line
// 2-way, 16 word loop cache) run the same instruction-fetch stream. Each
// slot has its own falling-edge RAM model and a ROM-array model returning
// whole 8-word lines. The program holds Do-loop sites in RAM and ROM; the
// stream runs the loops, takes interrupts of short and long length,
// continues in straight-line code and jumps between RAM and ROM, with
// writes and idle cycles mixed in.
//
// Checked for every slot: every fetched word equals the program word,
// arriving exactly two rising edges after its address; a hit never falls
// on a write or idle cycle; memory traffic adds up (RAM reads + ROM reads
// = read misses, every RAM write reaches the RAM). Counted, and required
// to happen at least once: cache hits and misses in each slot,
// write-through writes, ROM line-latch hits and ROM line reads, RAM
// reads, the loop cache holding a loop and dropping it.
module hi_cache_top_tb;
  import cache_pkg::*;
  import tb_mem_pkg::*;

  localparam int N_ACC = 40000;
  localparam int NS = 4, NSITE = 12;

  logic        clk = 1'b0, rst_n = 1'b0, active = 1'b0;
  mem_access_t pc_i = '0;
  mem_access_t ram_o [NS];
  word_t       ram_rdata [NS];
  logic        rom_en [NS];
  logic [12:0] rom_line_addr [NS];
  word_t       rom_line [NS][8];
  word_t       data_de [NS];
  logic        de_valid [NS], hit [NS], latch_hit [NS];
  logic        loop_on, loop_reset;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  hi_cache_top dut (
    .clk (clk), .rst_n (rst_n), .pc_i (pc_i),
    .ram_o (ram_o), .ram_rdata_i (ram_rdata),
    .rom_en_o (rom_en), .rom_line_addr_o (rom_line_addr), .rom_line_i (rom_line),
    .data_de_o (data_de), .de_valid_o (de_valid), .hit_o (hit),
    .rom_latch_hit_o (latch_hit),
    .lc_loop_on_o (loop_on), .lc_loop_reset_o (loop_reset)
  );

  word_t prog [2**ADDR_W];
  int    sb_checks [NS], sb_fail [NS], sb_hits [NS], n_rd [NS], n_wr [NS];
  int    n_rom_lines [NS], n_latch_hits [NS];

  for (genvar s = 0; s < NS; s++) begin : g_slot
    tb_flat_mem u_ram (.clk (clk), .req_i (ram_o[s]), .rdata_o (ram_rdata[s]),
                       .n_read (n_rd[s]), .n_write (n_wr[s]));
    always_comb
      for (int i = 0; i < 8; i++) rom_line[s][i] = prog[{rom_line_addr[s], 3'(i)}];
    cache_scoreboard #(.CHECK_HIT(1'b0)) u_sb (
      .clk (clk), .active (active), .pc_i (pc_i), .exp_hit (1'b0),
      .hit_o (hit[s]), .de_valid_o (de_valid[s]), .data_de_o (data_de[s]),
      .checks (sb_checks[s]), .failures (sb_fail[s]), .hits (sb_hits[s])
    );
    initial begin n_rom_lines[s] = 0; n_latch_hits[s] = 0; end
    // ROM array read on the falling edge, latch hit reported after it
    always @(negedge clk) if (active && rom_en[s]) n_rom_lines[s]++;
    always @(posedge clk) if (active && latch_hit[s] && ram_o[s].en == 1'b0 &&
                              dut.mem_req[s].en && !dut.mem_req[s].we) n_latch_hits[s]++;
  end

  int n_loop_on = 0, n_loop_reset = 0;
  always @(posedge clk) if (active) begin
    if (loop_on) n_loop_on++;
    if (loop_reset) n_loop_reset++;
  end

  // ---- stimulus: Do-loop sites, interrupts, straight code ----
  addr_t site_do [NSITE];
  int    site_len [NSITE];
  mem_access_t q [$];

  task automatic emit_fetch(addr_t a);
    mem_access_t x;
    x = '0; x.en = 1'b1; x.addr = a;
    if ($urandom_range(0, 99) < 4) q.push_back('0);
    if ($urandom_range(0, 99) < 2) begin
      mem_access_t w;
      w = '0; w.en = 1'b1; w.we = 1'b1; w.addr = addr_t'($urandom_range(0, 47)); w.data = $urandom();
      q.push_back(w);
    end
    q.push_back(x);
  endtask

  task automatic gen_episode();
    int    s = $urandom_range(0, NSITE - 1);
    addr_t d = site_do[s];
    int    len = site_len[s];
    int    cnt = $urandom_range(2, 30);
    emit_fetch(d);
    for (int c = 0; c < cnt; c++)
      for (int i = 1; i <= len; i++) begin
        emit_fetch(d + addr_t'(i));
        if ($urandom_range(0, 99) < 2) begin
          addr_t isr = 16'hA000 + addr_t'($urandom_range(0, 64));
          int    n = ($urandom_range(0, 1) != 0) ? $urandom_range(2, 10) : $urandom_range(33, 60);
          for (int j = 0; j < n; j++) emit_fetch(isr + addr_t'(j));
        end
      end
    for (int i = 1; i <= $urandom_range(0, 40); i++) emit_fetch(d + addr_t'(len + i));
  endtask

  int n_reads = 0, n_ram_writes = 0, n_idle = 0;

  initial begin
    mem_access_t a;
    void'($urandom(99));
    for (int i = 0; i < 2**ADDR_W; i++) prog[i] = init_word(addr_t'(i));
    for (int s = 0; s < NSITE; s++) begin
      site_do[s]  = ((s % 2) != 0 ? 16'h8100 : 16'h0100) + addr_t'(s * 64);
      site_len[s] = (s < 9) ? 1 + (s * 2) % 16 : 17 + s;
      prog[site_do[s]] = do_word(site_do[s] + addr_t'(site_len[s]));
    end
    #1;
    for (int s = 0; s < NSITE; s++) begin
      g_slot[0].u_ram.mem[site_do[s]] = prog[site_do[s]];
      g_slot[1].u_ram.mem[site_do[s]] = prog[site_do[s]];
      g_slot[2].u_ram.mem[site_do[s]] = prog[site_do[s]];
      g_slot[3].u_ram.mem[site_do[s]] = prog[site_do[s]];
      g_slot[0].u_sb.golden[site_do[s]] = prog[site_do[s]];
      g_slot[1].u_sb.golden[site_do[s]] = prog[site_do[s]];
      g_slot[2].u_sb.golden[site_do[s]] = prog[site_do[s]];
      g_slot[3].u_sb.golden[site_do[s]] = prog[site_do[s]];
    end
    while (q.size() < N_ACC) gen_episode();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    active = 1'b1;
    for (int k = 0; k < N_ACC; k++) begin
      a = q[k];
      if (a.en && !a.we) n_reads++;
      if (a.en && a.we) n_ram_writes++;
      if (!a.en) n_idle++;
      pc_i = a;
      @(negedge clk);
    end
    pc_i = '0;
    repeat (3) @(negedge clk);
    active = 1'b0;
    @(negedge clk);
    for (int s = 0; s < NS; s++) begin
      checks += sb_checks[s] + 5;
      failures += sb_fail[s];
      if (n_rd[s] + n_rom_lines[s] + n_latch_hits[s] != n_reads - sb_hits[s]) begin
        failures++;
        $display("slot %0d: RAM %0d + ROM lines %0d + latch %0d != read misses %0d", s, n_rd[s],
                 n_rom_lines[s], n_latch_hits[s], n_reads - sb_hits[s]);
      end
      if (n_wr[s] != n_ram_writes) failures++;       // write-through
      if (sb_hits[s] == 0 || sb_hits[s] == n_reads) failures++;
      if (n_latch_hits[s] == 0 || n_rom_lines[s] == 0) failures++;
      if (n_rd[s] == 0) failures++;
      $display("slot %0d: hits %0d/%0d (%0d%%), RAM reads %0d writes %0d, ROM lines %0d, latch hits %0d",
               s, sb_hits[s], n_reads, 100 * sb_hits[s] / n_reads, n_rd[s], n_wr[s],
               n_rom_lines[s], n_latch_hits[s]);
    end
    checks += 2;
    if (n_loop_on == 0 || n_loop_reset == 0) failures++;
    if (n_idle == 0) failures++;
    $display("loop cache on %0d cycles, dropped %0d loops; idle cycles %0d",
             n_loop_on, n_loop_reset, n_idle);
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
