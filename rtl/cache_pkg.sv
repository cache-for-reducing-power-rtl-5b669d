// cache_pkg - types and constants shared by the program-memory caches.
//
// The DSP program memory has a 16-bit word address (64k word space, lower
// half RAM, upper half ROM) and 32-bit instruction words. One access is
// issued per cycle by the address generation unit in the PC pipeline state.
// An access is described by mem_access_t: enable, write strobe, address and
// (for writes) the data word. The same bundle is used for the PC-state input
// of a cache and for the Fe-state request a cache sends to the memory.
package cache_pkg;

  localparam int unsigned ADDR_W = 16;  // program memory address width
  localparam int unsigned DATA_W = 32;  // instruction word width

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] word_t;

  typedef struct packed {
    logic  en;    // an access takes place this cycle
    logic  we;    // 1: write, 0: read
    addr_t addr;  // word address
    word_t data;  // write data, ignored on reads
  } mem_access_t;

  // Memory map: addresses with the top bit set (0x8000-0xFFFF) are ROM,
  // the rest (0x0000-0x7FFF) RAM.
  function automatic logic is_rom(addr_t a);
    return a[ADDR_W-1];
  endfunction

  // Words in one line of the program ROM, read at once into its line latch.
  localparam int unsigned ROM_LINE_WORDS = 8;

endpackage
