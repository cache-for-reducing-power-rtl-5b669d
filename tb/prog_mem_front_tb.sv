// prog_mem_front_tb - checks the memory-map split behind a cache.
//
// Requests are applied as a cache applies them in the Fe state: set after
// a rising edge and held for the cycle. The RAM half goes to a falling-edge
// RAM model, the ROM half to a combinational ROM-array model through the
// line latch. Before each rising edge the testbench checks the returned
// word against a golden memory (RAM writes tracked, ROM constant), that
// only the RAM sees RAM requests, that writes to the ROM half reach
// neither side, and counts RAM reads, ROM line reads and latch hits.
module prog_mem_front_tb;
  import cache_pkg::*;
  import tb_mem_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  mem_access_t req = '0, ram_o;
  word_t       rdata, ram_rdata;
  logic        rom_en, latch_hit;
  logic [12:0] rom_line_addr;
  word_t       rom_line [8];
  int          checks = 0, failures = 0, n_rd, n_wr, n_rom_lines = 0, n_latch = 0;
  word_t       golden [2**ADDR_W];

  always #5 clk = ~clk;

  prog_mem_front dut (
    .clk (clk), .rst_n (rst_n), .req_i (req), .rdata_o (rdata),
    .ram_o (ram_o), .ram_rdata_i (ram_rdata), .rom_en_o (rom_en),
    .rom_line_addr_o (rom_line_addr), .rom_line_i (rom_line), .rom_latch_hit_o (latch_hit)
  );
  tb_flat_mem u_ram (.clk (clk), .req_i (ram_o), .rdata_o (ram_rdata),
                     .n_read (n_rd), .n_write (n_wr));

  always_comb
    for (int i = 0; i < 8; i++) rom_line[i] = init_word({rom_line_addr, 3'(i)});

  always @(negedge clk) if (rom_en) n_rom_lines++;

  int exp_ram_rd = 0, exp_ram_wr = 0;

  initial begin
    addr_t a = 16'h0000;
    for (int i = 0; i < 2**ADDR_W; i++) golden[i] = init_word(addr_t'(i));
    @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      #1;
      if ($urandom_range(0, 7) == 0)
        a = (($urandom_range(0, 1) != 0) ? 16'h8000 : 16'h0000) | addr_t'($urandom_range(0, 200));
      else a = a + 1'b1;
      req = '0;
      req.en = ($urandom_range(0, 9) != 0);
      req.we = ($urandom_range(0, 14) == 0);
      req.addr = a;
      req.data = $urandom();
      #1;
      checks++;
      if (ram_o.en !== (req.en && !a[15])) begin
        failures++;
        $display("addr %h: ram enable %b", a, ram_o.en);
      end
      if (req.en && !a[15]) begin
        if (req.we) exp_ram_wr++; else exp_ram_rd++;
      end
      @(posedge clk);
      if (req.en && !req.we) begin
        checks++;
        if (rdata !== golden[a]) begin
          failures++;
          $display("addr %h: read %h expected %h", a, rdata, golden[a]);
        end
        if (a[15] && latch_hit) n_latch++;
      end
      if (req.en && req.we && !a[15]) golden[a] = req.data;
    end
    @(negedge clk);
    checks += 2;
    if (n_rd != exp_ram_rd || n_wr != exp_ram_wr) begin
      failures++;
      $display("RAM reads %0d writes %0d, expected %0d %0d", n_rd, n_wr, exp_ram_rd, exp_ram_wr);
    end
    if (n_latch == 0 || n_rom_lines == 0) failures++;
    $display("RAM reads %0d writes %0d, ROM line reads %0d, latch hits %0d",
             n_rd, n_wr, n_rom_lines, n_latch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
