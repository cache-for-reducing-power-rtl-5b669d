// config_sweep_tb - hit rates of every buildable cache configuration on
// one generated hearing-aid fetch trace.
//
// The cache organisations were compared by size on one recorded trace:
// direct-mapped and 2-way caches of 1 to 32 lines (per way), and loop
// caches of 2 to 64 words with both ways of leaving a loop (a counter of
// fetches outside the loop, or a new Do instruction). This testbench runs
// the same comparison on a generated trace of the same length and shape
// (tb_trace_pkg), with one instance of each configuration that the RTL
// supports:
//   cache_dm   LINES = 1, 2, 4, 8, 16, 32
//   cache_2w   LINES = 1, 2, 4, 8, 16, 32 (per way)
//   loop_cache SIZE = 2, 4, 8, 16, 32, 64, RESET_MODE = 0 and 1
// (caches of more than two ways are not built). All instances see the
// same accesses, each with its own path to a shared falling-edge memory.
// They are placed straight on the memory, without the ROM line latch,
// which changes energy but not hits.
//
// Checked: every instance returns the right word two rising edges after
// the address; every instance sends each miss and each write to memory,
// so that accesses = hits + memory reads + memory writes; and, per access,
// a hit in a direct-mapped cache is also a hit in every larger one (its
// line sees a subset of the same addresses). The hit rates are printed
// next to the rates measured on the recorded trace; they depend on the
// program and are not checked.
module config_sweep_tb;
  import cache_pkg::*;
  import tb_mem_pkg::*;
  import tb_trace_pkg::*;

  localparam int N_ACC = 715816;
  localparam int ND = 6, NW = 6, NL = 6;
  localparam int NI = ND + NW + 2 * NL;
  localparam int unsigned DM_LINES [ND] = '{1, 2, 4, 8, 16, 32};
  localparam int unsigned W2_LINES [NW] = '{1, 2, 4, 8, 16, 32};
  localparam int unsigned LC_SIZE  [NL] = '{2, 4, 8, 16, 32, 64};
  // hit rates in percent measured on the recorded trace, same order
  localparam int REF [NI] = '{2, 11, 21, 36, 45, 60,
                              16, 26, 38, 47, 60, 67,
                              16, 20, 32, 37, 46, 56,
                              14, 18, 31, 35, 47, 57};

  logic        clk = 1'b0, rst_n = 1'b0, active = 1'b0;
  mem_access_t pc_i = '0;
  mem_access_t mem_req [NI];
  word_t       mem_rdata [NI], data_de [NI];
  logic        de_valid [NI], hit [NI];
  word_t       mem [2**ADDR_W];
  word_t       golden [2**ADDR_W];
  int          n_hit [NI], n_mrd [NI], n_mwr [NI], n_bad [NI];
  int          checks = 0, failures = 0;
  string       name [NI];

  always #5 clk = ~clk;

  for (genvar i = 0; i < ND; i++) begin : g_dm
    cache_dm #(.LINES(DM_LINES[i])) u (
      .clk (clk), .rst_n (rst_n), .pc_i (pc_i), .mem_o (mem_req[i]), .mem_rdata_i (mem_rdata[i]),
      .data_de_o (data_de[i]), .de_valid_o (de_valid[i]), .hit_o (hit[i])
    );
  end
  for (genvar i = 0; i < NW; i++) begin : g_2w
    cache_2w #(.LINES(W2_LINES[i])) u (
      .clk (clk), .rst_n (rst_n), .pc_i (pc_i), .mem_o (mem_req[ND+i]), .mem_rdata_i (mem_rdata[ND+i]),
      .data_de_o (data_de[ND+i]), .de_valid_o (de_valid[ND+i]), .hit_o (hit[ND+i])
    );
  end
  for (genvar m = 0; m < 2; m++) begin : g_mode
    for (genvar i = 0; i < NL; i++) begin : g_lc
      localparam int K = ND + NW + m * NL + i;
      logic on, drop;
      loop_cache #(.SIZE(LC_SIZE[i]), .RESET_MODE(m != 0)) u (
        .clk (clk), .rst_n (rst_n), .pc_i (pc_i), .mem_o (mem_req[K]), .mem_rdata_i (mem_rdata[K]),
        .data_de_o (data_de[K]), .de_valid_o (de_valid[K]), .hit_o (hit[K]),
        .loop_on_o (on), .loop_reset_o (drop)
      );
    end
  end

  // shared program memory, clocked on the falling edge; every instance
  // writes the same words in the same cycle
  for (genvar i = 0; i < NI; i++) begin : g_port
    always @(negedge clk) if (mem_req[i].en) begin
      if (mem_req[i].we) mem[mem_req[i].addr] <= mem_req[i].data;
      else               mem_rdata[i] <= mem[mem_req[i].addr];
    end
    always @(negedge clk) if (active) begin
      if (hit[i]) n_hit[i]++;
      if (mem_req[i].en && !mem_req[i].we) n_mrd[i]++;
      if (mem_req[i].en && mem_req[i].we) n_mwr[i]++;
    end
  end

  // expected fetch register, two rising edges after the address
  typedef struct packed { logic rd; word_t data; } stage_t;
  stage_t s1 = '0, s2 = '0;
  always @(posedge clk) begin
    s2 <= s1;
    s1 <= '{rd: pc_i.en && !pc_i.we, data: golden[pc_i.addr]};
    if (pc_i.en && pc_i.we) golden[pc_i.addr] <= pc_i.data;
  end

  int n_incl = 0;
  always @(negedge clk) if (active) begin
    for (int i = 0; i < NI; i++) begin
      checks++;
      if (de_valid[i] != s2.rd || (s2.rd && data_de[i] != s2.data)) begin
        failures++;
        n_bad[i]++;
      end
    end
    for (int i = 0; i + 1 < ND; i++) begin
      checks++;
      n_incl++;
      if (hit[i] && !hit[i+1]) begin
        failures++;
        $display("%t %s hit where %s missed", $time, name[i], name[i+1]);
      end
    end
  end

  trace_gen gen;

  initial begin
    for (int i = 0; i < NI; i++) begin
      n_hit[i] = 0; n_mrd[i] = 0; n_mwr[i] = 0; n_bad[i] = 0; mem_rdata[i] = '0;
      if (i < ND)           name[i] = $sformatf("direct mapped %0d lines", DM_LINES[i]);
      else if (i < ND + NW) name[i] = $sformatf("2-way %0d lines", W2_LINES[i-ND]);
      else if (i < ND + NW + NL)
                            name[i] = $sformatf("loop %0d words, counter", LC_SIZE[i-ND-NW]);
      else                  name[i] = $sformatf("loop %0d words, Do", LC_SIZE[i-ND-NW-NL]);
    end
    gen = new(N_ACC, 715);
    mem = gen.prog;
    golden = gen.prog;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    active = 1'b1;
    for (int k = 0; k < N_ACC; k++) begin
      pc_i = gen.q[k];
      @(negedge clk);
    end
    pc_i = '0;
    repeat (3) @(negedge clk);
    active = 1'b0;

    $display("trace: %0d accesses, %0d writes, %0d Do executions, %0d%% of fetches in loops",
             N_ACC, gen.n_wr, gen.n_do, 100 * gen.n_loop_fetch / N_ACC);
    $display("%-28s %8s %8s", "configuration", "hit %", "recorded");
    for (int i = 0; i < NI; i++) begin
      checks += 2;
      if (n_hit[i] + n_mrd[i] + n_mwr[i] != N_ACC) begin
        failures++;
        $display("%s: hits %0d + reads %0d + writes %0d != %0d", name[i], n_hit[i], n_mrd[i],
                 n_mwr[i], N_ACC);
      end
      if (n_mwr[i] != NWRITE) failures++;
      if (n_bad[i] != 0) $display("%s: %0d wrong words", name[i], n_bad[i]);
      $display("%-28s %8.1f %8d", name[i], 100.0 * n_hit[i] / N_ACC, REF[i]);
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
