// loop_cache_tb - self-checking testbench of the loop cache, both reset modes.
//
// Twelve Do-loop sites are planted in the program memory (bodies of 1 to
// 24 words, so some do not fit in 16 words). The access stream runs a
// loop a few times, sometimes leaves it for an "interrupt" elsewhere
// (short, or longer than the 32-fetch counter limit) and comes back,
// sometimes branches forward inside the loop body (so a first pass can
// skip words), continues with straight-line code, then moves on to another site; a
// few writes and idle cycles are mixed in.
//
// Two loop caches (RESET_MODE 0 = counter, 1 = Do instruction) see the same
// stream. For each, a procedural reference model of the loop-cache rules
// (state updated at the end of the Fe state, so a decision in the PC state
// sees the effect of fetches up to two accesses back) gives the expected
// hit; cache_scoreboard checks hits, words and latency. The testbench also
// counts loads, hits, counter resets and Do resets, and fails if one of
// them never happened, or if a loop larger than the cache ever hit.
module loop_cache_tb;
  import cache_pkg::*;
  import tb_mem_pkg::*;

  localparam int N_ACC = 30000;
  localparam int SIZE = 16, LIMIT = 32, NSITE = 12;

  logic        clk = 1'b0, rst_n = 1'b0, active = 1'b0;
  mem_access_t pc_i = '0;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic exp_hit [2];
  int   sb_checks [2], sb_fail [2], sb_hits [2], n_rd [2], n_wr [2];
  logic loop_on [2], loop_reset [2];

  for (genvar g = 0; g < 2; g++) begin : g_lc
    mem_access_t mem_o;
    word_t       mem_rdata, data_de;
    logic        de_valid, hit;
    loop_cache #(.SIZE(SIZE), .RESET_MODE(g[0]), .COUNT_LIMIT(LIMIT), .DO_MATCH(DO_OPCODE)) dut (
      .clk (clk), .rst_n (rst_n), .pc_i (pc_i),
      .mem_o (mem_o), .mem_rdata_i (mem_rdata),
      .data_de_o (data_de), .de_valid_o (de_valid), .hit_o (hit),
      .loop_on_o (loop_on[g]), .loop_reset_o (loop_reset[g])
    );
    tb_flat_mem u_mem (.clk (clk), .req_i (mem_o), .rdata_o (mem_rdata),
                       .n_read (n_rd[g]), .n_write (n_wr[g]));
    cache_scoreboard u_sb (
      .clk (clk), .active (active), .pc_i (pc_i), .exp_hit (exp_hit[g]),
      .hit_o (hit), .de_valid_o (de_valid), .data_de_o (data_de),
      .checks (sb_checks[g]), .failures (sb_fail[g]), .hits (sb_hits[g])
    );
  end

  // ---- program: loop sites ----
  addr_t site_do [NSITE];
  int    site_len [NSITE];
  word_t prog [2**ADDR_W];

  // ---- reference model ----
  typedef struct {
    int    st;          // 0 idle, 1 load, 2 on
    int    start, last, cnt;
    bit    loaded [SIZE];
  } ref_t;
  typedef struct { bit en, we, hit; int addr; word_t data; } pend_t;

  ref_t  R [2];
  pend_t P1 [2], P2 [2];
  int    n_load [2] = '{0, 0}, n_cnt_reset [2] = '{0, 0}, n_do_reset [2] = '{0, 0};
  int    big_hits = 0;

  function automatic int classify(int g, ref_t s, pend_t p);
    // 0 nothing, 1 start load, 2 drop (counter)
    int dl, ds;
    bit rd = p.en && !p.we;
    bit in_r = p.addr >= s.start && p.addr <= s.last;
    if (rd && ((p.data & 32'hC03E_0000) == DO_OPCODE)) begin
      dl = int'(p.data[15:0]);
      ds = (p.addr + 1) % 65536;
      if (dl >= ds && dl - ds < SIZE && !(s.st != 0 && ds == s.start && dl == s.last))
        if (s.st != 2 || g == 1) return 1;
    end
    if (g == 0 && rd && !in_r && s.st != 0 && s.cnt + 1 >= LIMIT) return 2;
    return 0;
  endfunction

  function automatic void update(int g, pend_t p);
    int c = classify(g, R[g], p);
    bit rd = p.en && !p.we;
    bit in_r = p.addr >= R[g].start && p.addr <= R[g].last;
    if (c == 1) begin
      if (R[g].st == 2) n_do_reset[g]++;
      n_load[g]++;
      R[g].st = 1; R[g].start = p.addr + 1; R[g].last = int'(p.data[15:0]); R[g].cnt = 0;
      foreach (R[g].loaded[i]) R[g].loaded[i] = 0;
    end else if (c == 2) begin
      n_cnt_reset[g]++;
      R[g].st = 0; R[g].start = 65535; R[g].last = 0; R[g].cnt = 0;
      foreach (R[g].loaded[i]) R[g].loaded[i] = 0;
    end else begin
      if (p.en && !p.hit && in_r && R[g].st != 0) R[g].loaded[p.addr - R[g].start] = 1;
      if (rd && R[g].st != 0) begin
        if (in_r) begin
          R[g].cnt = 0;
          if (R[g].st == 1 && p.addr == R[g].last) R[g].st = 2;
        end else if (g == 0) R[g].cnt++;
      end
    end
  endfunction

  function automatic bit ref_access(int g, mem_access_t a);
    pend_t cur;
    bit    hit;
    update(g, P2[g]);
    hit = a.en && !a.we && R[g].st == 2 && int'(a.addr) >= R[g].start &&
          int'(a.addr) <= R[g].last && R[g].loaded[int'(a.addr) - R[g].start];
    if (classify(g, R[g], P1[g]) != 0) hit = 0;
    cur.en = a.en; cur.we = a.we; cur.hit = hit; cur.addr = int'(a.addr);
    cur.data = prog[a.addr];
    P2[g] = P1[g];
    P1[g] = cur;
    return hit;
  endfunction

  // ---- stimulus ----
  mem_access_t q [$];
  int n_interrupts = 0;

  task automatic emit_fetch(addr_t a);
    mem_access_t x;
    x = '0; x.en = 1'b1; x.addr = a;
    if ($urandom_range(0, 99) < 4) q.push_back('0);               // idle cycle
    if ($urandom_range(0, 99) < 2) begin                           // data write
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
    int    cnt = $urandom_range(1, 6);
    emit_fetch(d);
    for (int c = 0; c < cnt; c++)
      for (int i = 1; i <= len; i++) begin
        emit_fetch(d + addr_t'(i));
        if (i + 4 < len && $urandom_range(0, 99) < 10) i += $urandom_range(1, 3);  // branch inside the loop
        if ($urandom_range(0, 99) < 3) begin                       // interrupt
          addr_t isr = 16'hA000 + addr_t'($urandom_range(0, 64));
          int    n = ($urandom_range(0, 1) != 0) ? $urandom_range(2, 10) : $urandom_range(33, 60);
          n_interrupts++;
          for (int j = 0; j < n; j++) emit_fetch(isr + addr_t'(j));
        end
      end
    for (int i = 1; i <= $urandom_range(0, 40); i++) emit_fetch(d + addr_t'(len + i));
  endtask

  initial begin
    mem_access_t a;
    void'($urandom(4242));
    for (int i = 0; i < 2**ADDR_W; i++) prog[i] = init_word(addr_t'(i));
    for (int s = 0; s < NSITE; s++) begin
      site_do[s]  = ((s % 2) != 0 ? 16'h8100 : 16'h0100) + addr_t'(s * 64);
      site_len[s] = (s < 9) ? 1 + (s * 2) % 16 : 17 + s;   // 1..15 fit, 26..28 do not
      prog[site_do[s]] = do_word(site_do[s] + addr_t'(site_len[s]));
    end
    #1;
    for (int g = 0; g < 2; g++) begin
      R[g].st = 0; R[g].start = 65535; R[g].last = 0; R[g].cnt = 0;
      foreach (R[g].loaded[i]) R[g].loaded[i] = 0;
      P1[g] = '{default: 0}; P2[g] = '{default: 0};
      exp_hit[g] = 1'b0;
    end
    for (int s = 0; s < NSITE; s++) begin
      g_lc[0].u_mem.mem[site_do[s]]  = prog[site_do[s]];
      g_lc[1].u_mem.mem[site_do[s]]  = prog[site_do[s]];
      g_lc[0].u_sb.golden[site_do[s]] = prog[site_do[s]];
      g_lc[1].u_sb.golden[site_do[s]] = prog[site_do[s]];
    end
    while (q.size() < N_ACC) gen_episode();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    active = 1'b1;
    for (int k = 0; k < N_ACC; k++) begin
      a = q[k];
      if (a.en && a.we) prog[a.addr] = a.data;
      for (int g = 0; g < 2; g++) begin
        exp_hit[g] = ref_access(g, a);
        if (exp_hit[g] && (R[g].last - R[g].start + 1) > SIZE) big_hits++;
      end
      pc_i = a;
      @(negedge clk);
    end
    pc_i = '0;
    for (int g = 0; g < 2; g++) exp_hit[g] = 1'b0;
    repeat (3) @(negedge clk);
    active = 1'b0;
    @(negedge clk);
    for (int g = 0; g < 2; g++) begin
      checks += sb_checks[g] + 3;
      failures += sb_fail[g];
      if (sb_hits[g] == 0 || n_load[g] == 0) failures++;
      if (g == 0 && n_cnt_reset[g] == 0) failures++;
      if (g == 1 && n_do_reset[g] == 0) failures++;
      if (n_wr[g] == 0) failures++;
      $display("mode %0d: hits %0d, loads %0d, counter resets %0d, Do resets %0d, mem reads %0d",
               g, sb_hits[g], n_load[g], n_cnt_reset[g], n_do_reset[g], n_rd[g]);
    end
    checks++;
    if (big_hits != 0 || n_interrupts == 0) failures++;
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
