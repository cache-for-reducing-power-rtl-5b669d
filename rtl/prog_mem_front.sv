// prog_mem_front - the program memory as seen from a cache's memory port.
//
// The 64k-word program space is split in two halves: addresses below
// 0x8000 are the RAM, addresses from 0x8000 up the ROM. This block takes
// the Fe-state request of a cache and steers it: RAM requests go out on
// ram_o unchanged (the RAM itself is a compiled macro outside this RTL);
// ROM requests go to a rom_line_latch, whose ROM-array line port is brought
// out. Writes to the ROM half are dropped. The read word returned to the
// cache is the RAM's or the latch's, chosen by the address of the request.
//
// Timing: like the rest of the program memory, the RAM and the ROM latch
// are clocked on the falling clock edge, in the middle of the Fe state,
// so the word is back before the rising edge that ends Fe. The latch is
// therefore clocked here with the inverted clock.
module prog_mem_front
  import cache_pkg::*;
#(
  parameter int unsigned LINE_WORDS = ROM_LINE_WORDS,
  localparam int unsigned LADDR_W = ADDR_W - $clog2(LINE_WORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // from the cache, Fe state
  input  mem_access_t        req_i,
  output word_t              rdata_o,
  // RAM port (RAM clocked on the falling edge)
  output mem_access_t        ram_o,
  input  word_t              ram_rdata_i,
  // ROM array line port
  output logic               rom_en_o,
  output logic [LADDR_W-1:0] rom_line_addr_o,
  input  word_t              rom_line_i [LINE_WORDS],
  output logic               rom_latch_hit_o
);

  logic        sel_rom;
  mem_access_t rom_req;
  word_t       rom_rdata;
  logic        clk_n;

  assign sel_rom = is_rom(req_i.addr);
  assign clk_n   = ~clk;

  always_comb begin
    ram_o      = req_i;
    ram_o.en   = req_i.en && !sel_rom;
    rom_req    = req_i;
    rom_req.en = req_i.en && sel_rom;
  end

  rom_line_latch #(.LINE_WORDS(LINE_WORDS)) u_rom_latch (
    .clk             (clk_n),
    .rst_n           (rst_n),
    .req_i           (rom_req),
    .rom_en_o        (rom_en_o),
    .rom_line_addr_o (rom_line_addr_o),
    .rom_line_i      (rom_line_i),
    .rdata_o         (rom_rdata),
    .latch_hit_o     (rom_latch_hit_o)
  );

  assign rdata_o = sel_rom ? rom_rdata : ram_rdata_i;

endmodule
