// rom_line_latch - line latch in front of the program ROM.
//
// The program ROM is read a whole line of LINE_WORDS words at a time. The
// latch keeps the last line read together with its line address. A read
// whose line address (addr without its low word bits) equals the held one
// is answered from the latch and the ROM array is not enabled; any other
// read enables the ROM array, which returns the full line on rom_line_i,
// and the line is captured into the latch. Reading a new line costs about
// ten times the energy of reading the latch, which is the point of it.
//
// Timing: the request (req_i) is presented before the active clock edge;
// on that edge the addressed word is placed on rdata_o and latch_hit_o
// tells whether the latch served it. The ROM array is combinational on
// rom_line_addr_o / rom_en_o. In the DSP the program memory is clocked on
// the falling edge, so clk here is the inverted system clock.
//
// Follows the design's ROM model: an 8-word line, hit when the masked
// address equals the current line address, otherwise fetch the line. The
// line-valid flag, cleared by reset, and the write behaviour (writes are
// ignored: the array is read only) are this design's choices.
module rom_line_latch
  import cache_pkg::*;
#(
  parameter int unsigned LINE_WORDS = ROM_LINE_WORDS,
  localparam int unsigned WSEL_W = $clog2(LINE_WORDS),
  localparam int unsigned LADDR_W = ADDR_W - WSEL_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  mem_access_t        req_i,
  // ROM array line port
  output logic               rom_en_o,
  output logic [LADDR_W-1:0] rom_line_addr_o,
  input  word_t              rom_line_i [LINE_WORDS],
  // read data
  output word_t              rdata_o,
  output logic               latch_hit_o
);

  logic [LADDR_W-1:0] line_addr_q;
  logic               line_valid_q;
  word_t              line_q [LINE_WORDS];

  logic [LADDR_W-1:0] req_line;
  logic [WSEL_W-1:0]  req_word;
  logic               rd, line_hit;

  assign req_line = req_i.addr[ADDR_W-1:WSEL_W];
  assign req_word = req_i.addr[WSEL_W-1:0];
  assign rd       = req_i.en && !req_i.we;
  assign line_hit = line_valid_q && (line_addr_q == req_line);

  assign rom_en_o        = rd && !line_hit;
  assign rom_line_addr_o = req_line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_addr_q  <= '0;
      line_valid_q <= 1'b0;
      for (int unsigned i = 0; i < LINE_WORDS; i++) line_q[i] <= '0;
      rdata_o      <= '0;
      latch_hit_o  <= 1'b0;
    end else if (rd) begin
      latch_hit_o <= line_hit;
      if (line_hit) begin
        rdata_o <= line_q[req_word];
      end else begin
        line_addr_q  <= req_line;
        line_valid_q <= 1'b1;
        for (int unsigned i = 0; i < LINE_WORDS; i++) line_q[i] <= rom_line_i[i];
        rdata_o      <= rom_line_i[req_word];
      end
    end
  end

endmodule
