// tb_stim_pkg - instruction-fetch-like access stream for the cache testbenches.
//
// next_access() returns one PC-state access. The stream mixes short loops
// (a body of 2..12 words repeated a few times), straight-line code, jumps
// between a RAM region and a ROM region, a few writes and idle cycles, so
// that hits, conflict misses, write-through and idle cycles all occur.
package tb_stim_pkg;
  import cache_pkg::*;

  class stim_gen;
    addr_t pc;
    addr_t loop_start;
    int    loop_len, loop_left, pos;

    function new(int unsigned seed);
      void'($urandom(seed));
      pc = 16'h0010; loop_len = 0; loop_left = 0; pos = 0; loop_start = '0;
    endfunction

    function mem_access_t next_access();
      mem_access_t a;
      int r;
      a = '0;
      r = $urandom_range(0, 99);
      if (r < 8) return a;                       // idle cycle
      a.en = 1'b1;
      if (r < 13) begin                          // write to a data-ish word
        a.we   = 1'b1;
        a.addr = addr_t'($urandom_range(0, 47));
        a.data = $urandom();
        return a;
      end
      if (loop_left > 0) begin                   // inside a loop
        a.addr = loop_start + addr_t'(pos);
        pos++;
        if (pos == loop_len) begin pos = 0; loop_left--; end
        return a;
      end
      r = $urandom_range(0, 99);
      if (r < 30) begin                          // start a loop
        loop_start = (($urandom_range(0, 1) != 0) ? 16'h8000 : 16'h0000) +
                     addr_t'($urandom_range(0, 40));
        loop_len   = $urandom_range(2, 12);
        loop_left  = $urandom_range(2, 6);
        pos        = 0;
      end else if (r < 40) begin                 // jump
        pc = (($urandom_range(0, 1) != 0) ? 16'h8000 : 16'h0000) +
             addr_t'($urandom_range(0, 60));
      end
      a.addr = pc;
      pc = pc + 1'b1;
      return a;
    endfunction
  endclass
endpackage
