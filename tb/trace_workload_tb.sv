// trace_workload_tb - the whole cache subsystem on a generated program
// trace with the length and shape of a recorded hearing-aid fetch trace.
//
// The recorded trace this design was sized for is not part of this
// repository. Its published statistics are, and tb_trace_pkg generates a
// trace of the same length that follows them: 715816 accesses with 86
// writes, about two thirds of the fetches inside Do loops whose sizes
// follow the recorded size histogram, about a third of the accesses in the
// RAM half, and the idle nop at 0x1510 broken by one-instruction
// interrupts. The trace statistics are printed so they can be compared
// with the recorded ones (7008 Do executions, 66% of fetches in loops, 35%
// RAM accesses, 6744 unique addresses).
//
// All four slots of hi_cache_top run at their default parameters. For
// every slot, each fetched word is checked against a golden memory with
// its two-edge latency, and the traffic must add up: accesses = hits +
// memory reads + memory writes. One more rule holds per access: every
// access that hits in the 4 line direct-mapped cache must also hit in the
// 8 line one, whose line for that address sees a subset of the same
// addresses. The hit rates are printed next to the trace statistics; they
// depend on the generated program and are not checked.
module trace_workload_tb;
  import cache_pkg::*;
  import tb_mem_pkg::*;
  import tb_trace_pkg::*;

  localparam int N_ACC   = 715816;
  localparam int N_WRITE = NWRITE;
  localparam int NS = 4;

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
  int    n_rom_lines [NS], n_rom_rd [NS];

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
    initial begin n_rom_lines[s] = 0; n_rom_rd[s] = 0; end
    always @(negedge clk) if (active && rom_en[s]) n_rom_lines[s]++;
    // ROM reads leaving the cache in the Fe state
    always @(posedge clk) if (active && dut.mem_req[s].en && !dut.mem_req[s].we &&
                              is_rom(dut.mem_req[s].addr)) n_rom_rd[s]++;
  end

  // 8 line direct mapped must hit wherever 4 line direct mapped hits
  int n_incl = 0, n_incl_fail = 0;
  always @(negedge clk) if (active) begin
    n_incl++;
    if (hit[0] && !hit[1]) begin
      n_incl_fail++;
      $display("%t 4 line cache hit where 8 line cache missed", $time);
    end
  end

  trace_gen gen;

  int n_reads = 0, n_writes = 0;

  initial begin
    mem_access_t a;
    gen = new(N_ACC, 715);
    prog = gen.prog;
    #1;
    for (int s = 0; s < NSITE; s++) begin
      automatic addr_t d = gen.site_do[s];
      g_slot[0].u_ram.mem[d] = prog[d]; g_slot[0].u_sb.golden[d] = prog[d];
      g_slot[1].u_ram.mem[d] = prog[d]; g_slot[1].u_sb.golden[d] = prog[d];
      g_slot[2].u_ram.mem[d] = prog[d]; g_slot[2].u_sb.golden[d] = prog[d];
      g_slot[3].u_ram.mem[d] = prog[d]; g_slot[3].u_sb.golden[d] = prog[d];
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    active = 1'b1;
    for (int k = 0; k < N_ACC; k++) begin
      a = gen.q[k];
      if (a.en && !a.we) n_reads++;
      if (a.en && a.we) n_writes++;
      pc_i = a;
      @(negedge clk);
    end
    pc_i = '0;
    repeat (3) @(negedge clk);
    active = 1'b0;
    @(negedge clk);

    $display("trace: %0d accesses, %0d reads, %0d writes, %0d unique addresses",
             N_ACC, n_reads, n_writes, gen.n_uniq);
    $display("trace: %0d Do executions, %0d%% of fetches in loops, %0d%% RAM accesses",
             gen.n_do, 100 * gen.n_loop_fetch / N_ACC, 100 * gen.n_ram_acc / N_ACC);
    for (int s = 0; s < NS; s++) begin
      int mem_reads;
      mem_reads = n_rd[s] + n_rom_rd[s];
      checks += sb_checks[s] + 3;
      failures += sb_fail[s];
      // accesses = hits + memory reads + memory writes
      if (sb_hits[s] + mem_reads + n_wr[s] != N_ACC) failures++;
      // every ROM read miss is served by the line latch or a new line
      if (n_rom_lines[s] > n_rom_rd[s]) failures++;
      if (n_wr[s] != n_writes) failures++;
      $display("slot %0d: hit rate %0d%% (%0d), RAM reads %0d, ROM reads %0d of which new lines %0d, writes %0d",
               s, 100 * sb_hits[s] / N_ACC, sb_hits[s], n_rd[s], n_rom_rd[s],
               n_rom_lines[s], n_wr[s]);
    end
    checks += n_incl + 1;
    failures += n_incl_fail;
    if (n_writes != N_WRITE) failures++;
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
