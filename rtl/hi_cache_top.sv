// hi_cache_top - program-memory cache subsystem of the hearing-aid DSP.
//
// Adding a very small cache in front of the DSP's program memory can lower
// the energy of instruction fetch: a hit is served from a few flip-flops
// instead of the RAM or the ROM. This top holds the cache organisations of
// the design side by side, each fed by the same PC-state access stream
// from the address generation unit and each with its own path to the
// program memory, so they can be compared on one instruction trace:
//
//   slot 0  cache_dm, 4 lines, direct mapped
//   slot 1  cache_dm, 8 lines, direct mapped
//   slot 2  cache_2w, 4 lines x 2 ways
//   slot 3  loop_cache, 16 words, counter reset
//
// Behind each cache a prog_mem_front splits the memory map: RAM requests
// (0x0000-0x7FFF) leave on ram_o[slot] for the RAM macro, ROM requests
// (0x8000-0xFFFF) go through that slot's ROM line latch, whose ROM-array
// line port is brought out. Every slot returns its fetched words on
// data_de_o[slot] two rising edges after the address, with de_valid_o,
// and reports its Fe-state hit on hit_o[slot] and ROM latch hits on
// rom_latch_hit_o[slot]. Loop-cache status is on lc_loop_on_o and
// lc_loop_reset_o.
//
// The three caches are the configurations the design builds in hardware;
// the loop cache and the ROM line latch are described at the level of
// behaviour and are this design's implementation of it.
module hi_cache_top
  import cache_pkg::*;
#(
  localparam int unsigned N_SLOT   = 4,
  localparam int unsigned LADDR_W  = ADDR_W - $clog2(ROM_LINE_WORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // PC state: access from the address generation unit
  input  mem_access_t        pc_i,
  // per slot: RAM port
  output mem_access_t        ram_o           [N_SLOT],
  input  word_t              ram_rdata_i     [N_SLOT],
  // per slot: ROM array line port
  output logic               rom_en_o        [N_SLOT],
  output logic [LADDR_W-1:0] rom_line_addr_o [N_SLOT],
  input  word_t              rom_line_i      [N_SLOT][ROM_LINE_WORDS],
  // per slot: fetch register and statistics
  output word_t              data_de_o       [N_SLOT],
  output logic               de_valid_o      [N_SLOT],
  output logic               hit_o           [N_SLOT],
  output logic               rom_latch_hit_o [N_SLOT],
  // loop cache status
  output logic               lc_loop_on_o,
  output logic               lc_loop_reset_o
);

  mem_access_t mem_req   [N_SLOT];
  word_t       mem_rdata [N_SLOT];

  cache_dm #(.LINES(4)) u_dm4 (
    .clk (clk), .rst_n (rst_n), .pc_i (pc_i),
    .mem_o (mem_req[0]), .mem_rdata_i (mem_rdata[0]),
    .data_de_o (data_de_o[0]), .de_valid_o (de_valid_o[0]), .hit_o (hit_o[0])
  );

  cache_dm #(.LINES(8)) u_dm8 (
    .clk (clk), .rst_n (rst_n), .pc_i (pc_i),
    .mem_o (mem_req[1]), .mem_rdata_i (mem_rdata[1]),
    .data_de_o (data_de_o[1]), .de_valid_o (de_valid_o[1]), .hit_o (hit_o[1])
  );

  cache_2w #(.LINES(4)) u_2w4 (
    .clk (clk), .rst_n (rst_n), .pc_i (pc_i),
    .mem_o (mem_req[2]), .mem_rdata_i (mem_rdata[2]),
    .data_de_o (data_de_o[2]), .de_valid_o (de_valid_o[2]), .hit_o (hit_o[2])
  );

  loop_cache #(.SIZE(16), .RESET_MODE(1'b0)) u_loop (
    .clk (clk), .rst_n (rst_n), .pc_i (pc_i),
    .mem_o (mem_req[3]), .mem_rdata_i (mem_rdata[3]),
    .data_de_o (data_de_o[3]), .de_valid_o (de_valid_o[3]), .hit_o (hit_o[3]),
    .loop_on_o (lc_loop_on_o), .loop_reset_o (lc_loop_reset_o)
  );

  for (genvar s = 0; s < N_SLOT; s++) begin : g_mem
    prog_mem_front u_front (
      .clk             (clk),
      .rst_n           (rst_n),
      .req_i           (mem_req[s]),
      .rdata_o         (mem_rdata[s]),
      .ram_o           (ram_o[s]),
      .ram_rdata_i     (ram_rdata_i[s]),
      .rom_en_o        (rom_en_o[s]),
      .rom_line_addr_o (rom_line_addr_o[s]),
      .rom_line_i      (rom_line_i[s]),
      .rom_latch_hit_o (rom_latch_hit_o[s])
    );
  end

endmodule
