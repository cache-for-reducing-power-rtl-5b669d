// tb_mem_pkg - contents of the program memory used by the testbenches.
//
// Every word is a function of its address, so a checker can work out the
// expected word independently of the design. Bits 31:30 are always 2'b11,
// which keeps ordinary words from looking like a Do instruction (whose
// opcode field has 2'b01 there in these testbenches).
package tb_mem_pkg;
  import cache_pkg::*;

  function automatic word_t init_word(addr_t a);
    logic [13:0] hi;
    hi = 14'(a) * 14'd37 ^ 14'h1234;
    return {2'b11, hi, a ^ 16'h5A5A};
  endfunction

  // Do instruction for a loop ending at `last` (opcode value used by the
  // loop cache testbenches).
  localparam word_t DO_OPCODE = 32'h4000_0000;
  function automatic word_t do_word(addr_t last);
    return DO_OPCODE | {16'h0000, last};
  endfunction
endpackage
