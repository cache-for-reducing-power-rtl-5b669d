// rom_line_latch_tb - checks the ROM line latch with an 8-word line.
//
// A combinational ROM-array model returns tb_mem_pkg::init_word for each
// word of the requested line. Reads with strong locality (runs within a
// line, jumps between lines) and occasional writes and idle cycles are
// applied. The expected latch hit comes from a reference that remembers
// the last line fetched; the testbench checks rom_en_o before the edge
// (the ROM is enabled only on a line miss, never on a write or idle cycle)
// and rdata_o / latch_hit_o after it.
module rom_line_latch_tb;
  import cache_pkg::*;
  import tb_mem_pkg::*;

  localparam int LW = 8;
  logic        clk = 1'b0, rst_n = 1'b0;
  mem_access_t req = '0;
  logic        rom_en, latch_hit;
  logic [12:0] rom_line_addr;
  word_t       rom_line [LW];
  word_t       rdata;
  int          checks = 0, failures = 0, n_hit = 0, n_miss = 0;

  always #5 clk = ~clk;

  rom_line_latch #(.LINE_WORDS(LW)) dut (
    .clk (clk), .rst_n (rst_n), .req_i (req), .rom_en_o (rom_en),
    .rom_line_addr_o (rom_line_addr), .rom_line_i (rom_line),
    .rdata_o (rdata), .latch_hit_o (latch_hit)
  );

  always_comb
    for (int i = 0; i < LW; i++) rom_line[i] = init_word({rom_line_addr, 3'(i)});

  logic [12:0] ref_line = '0;
  logic        ref_valid = 1'b0;

  initial begin
    addr_t a = 16'h8000;
    logic  exp_hit, rd;
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      case ($urandom_range(0, 9))
        0:       a = 16'h8000 | addr_t'($urandom_range(0, 255));  // jump
        1:       a = a - addr_t'($urandom_range(0, 9));           // back branch
        default: a = a + 1'b1;
      endcase
      req = '0;
      req.addr = a;
      req.en = ($urandom_range(0, 9) != 0);
      req.we = ($urandom_range(0, 19) == 0);
      req.data = $urandom();
      rd = req.en && !req.we;
      exp_hit = ref_valid && ref_line == a[15:3];
      #1;
      checks++;
      if (rom_en !== (rd && !exp_hit)) begin
        failures++;
        $display("addr %h: rom_en %b expected %b", a, rom_en, rd && !exp_hit);
      end
      @(posedge clk);
      #1;
      if (rd) begin
        checks++;
        if (rdata !== init_word(a) || latch_hit !== exp_hit) begin
          failures++;
          $display("addr %h: %h/%b expected %h/%b", a, rdata, latch_hit, init_word(a), exp_hit);
        end
        if (exp_hit) n_hit++; else n_miss++;
        ref_valid = 1'b1;
        ref_line  = a[15:3];
      end
    end
    checks++;
    if (n_hit == 0 || n_miss == 0) failures++;
    $display("latch hits %0d, line reads %0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
