// tb_flat_mem - behavioural model of the DSP program memory for testbenches.
//
// 64k words, initialised from tb_mem_pkg::init_word. Like the real program
// memory it is clocked on the falling edge: a request on req_i (held
// through the Fe state) is executed at the falling edge, a read drives
// rdata_o until the next read. Counts reads and writes.
module tb_flat_mem
  import cache_pkg::*;
  import tb_mem_pkg::*;
(
  input  logic        clk,
  input  mem_access_t req_i,
  output word_t       rdata_o,
  output int          n_read,
  output int          n_write
);
  word_t mem [2**ADDR_W];

  initial begin
    for (int a = 0; a < 2**ADDR_W; a++) mem[a] = init_word(addr_t'(a));
    rdata_o = '0;
    n_read  = 0;
    n_write = 0;
  end

  always @(negedge clk) begin
    if (req_i.en) begin
      if (req_i.we) begin
        mem[req_i.addr] <= req_i.data;
        n_write <= n_write + 1;
      end else begin
        rdata_o <= mem[req_i.addr];
        n_read  <= n_read + 1;
      end
    end
  end
endmodule
