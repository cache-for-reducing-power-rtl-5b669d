// tb_trace_pkg - generator of a program-memory fetch trace shaped like a
// recorded hearing-aid trace.
//
// trace_gen builds, from a seed, a program image (prog) and an access
// list (q) of n_acc accesses with these properties, taken from the
// published statistics of a 715816-access streaming-audio trace:
//   - NWRITE writes (86 in the recorded trace), spread evenly, to the
//     peripheral area 0x0040-0x03FF;
//   - about two thirds of the fetches inside Do loops, about 67 loop
//     fetches per Do execution;
//   - Do body sizes 1..15 words drawn with the weights of the recorded
//     size histogram (HIST);
//   - one Do site in three in the RAM half, the rest in the ROM half;
//   - straight-line code of 0..56 words before each loop, a 5..60 word
//     interrupt routine in ROM cutting into loops now and then;
//   - about one episode in eight spent waiting on the nop at 0x1510,
//     broken by one-instruction interrupts at 0x0023 and 0x0024.
// Program words are init_word(address) except at the Do sites, which hold
// a Do instruction naming the loop's last address.
package tb_trace_pkg;
  import cache_pkg::*;
  import tb_mem_pkg::*;

  localparam int    NSITE    = 64;
  localparam int    NWRITE   = 86;
  localparam addr_t NOP_ADDR = 16'h1510;
  localparam int    HIST [15] = '{540, 2630, 1520, 300, 240, 560, 40, 600, 200, 40, 60, 120, 40, 40, 40};

  class trace_gen;
    int          n_acc;
    word_t       prog [2**ADDR_W];
    bit          seen [2**ADDR_W];
    addr_t       site_do [NSITE];
    int          site_len [NSITE];
    mem_access_t q [$];
    int          n_loop_fetch, n_do, n_ram_acc, n_wr, n_uniq;

    function new(int n, int unsigned seed);
      n_acc = n;
      n_loop_fetch = 0; n_do = 0; n_ram_acc = 0; n_wr = 0; n_uniq = 0;
      void'($urandom(seed));
      for (int i = 0; i < 2**ADDR_W; i++) begin prog[i] = init_word(addr_t'(i)); seen[i] = 1'b0; end
      for (int s = 0; s < NSITE; s++) begin
        site_do[s]  = ((s % 3) == 0 ? 16'h1600 : 16'h8400) + addr_t'(s * 128);
        site_len[s] = draw_size();
        prog[site_do[s]] = do_word(site_do[s] + addr_t'(site_len[s]));
      end
      while (q.size() < n_acc) begin
        if ($urandom_range(0, 99) < 12) idle_episode();
        else loop_episode();
      end
      while (q.size() > n_acc) void'(q.pop_back());
      foreach (seen[i]) if (seen[i]) n_uniq++;
    endfunction

    function int draw_size();
      int tot = 0, r;
      foreach (HIST[i]) tot += HIST[i];
      r = $urandom_range(0, tot - 1);
      foreach (HIST[i]) begin
        if (r < HIST[i]) return i + 1;
        r -= HIST[i];
      end
      return 1;
    endfunction

    function void fetch(addr_t a, bit in_loop);
      mem_access_t x;
      x = '0; x.en = 1'b1; x.addr = a;
      q.push_back(x);
      seen[a] = 1'b1;
      if (in_loop) n_loop_fetch++;
      if (!is_rom(a)) n_ram_acc++;
      if (n_wr < NWRITE && q.size() > (n_wr + 1) * (n_acc / (NWRITE + 1))) begin
        x.we = 1'b1; x.addr = addr_t'($urandom_range(32'h40, 32'h3FF)); x.data = $urandom();
        q.push_back(x);
        n_wr++;
        n_ram_acc++;
      end
    endfunction

    function void isr();
      addr_t b = 16'hA000 + addr_t'($urandom_range(0, 255) * 16);
      int    n = $urandom_range(5, 60);
      for (int j = 0; j < n; j++) fetch(b + addr_t'(j), 1'b0);
    endfunction

    function void loop_episode();
      int    s = $urandom_range(0, NSITE - 1);
      addr_t d = site_do[s];
      int    len = site_len[s];
      int    pre = $urandom_range(0, 56);
      int    cnt = $urandom_range(1, (2 * 67 + len - 1) / len);
      for (int i = pre; i > 0; i--) fetch(d - addr_t'(i), 1'b0);
      fetch(d, 1'b0);
      n_do++;
      for (int c = 0; c < cnt; c++)
        for (int i = 1; i <= len; i++) begin
          fetch(d + addr_t'(i), 1'b1);
          if ($urandom_range(0, 999) < 2) isr();
        end
    endfunction

    function void idle_episode();
      int n = $urandom_range(4, 40);
      for (int i = 0; i < n; i++) begin
        fetch(NOP_ADDR, 1'b0);
        if ($urandom_range(0, 3) == 0) fetch(16'h0023 + addr_t'($urandom_range(0, 1)), 1'b0);
      end
    endfunction
  endclass
endpackage
