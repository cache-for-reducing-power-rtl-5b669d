// data_array_tb - checks the flip-flop data array (4 x 32): reset clears
// all words, a write changes only the addressed line, we = 0 writes
// nothing, reads are combinational and independent of the write index.
module data_array_tb;
  localparam int LINES = 4, W = 32;
  logic         clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [1:0]   index_w = '0, index_r = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] ref_mem [LINES];
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_array #(.LINES(LINES), .WIDTH(W)) dut (
    .clk (clk), .rst_n (rst_n), .we (we), .index_w (index_w), .wdata (wdata),
    .index_r (index_r), .rdata (rdata)
  );

  task automatic check_all();
    for (int i = 0; i < LINES; i++) begin
      index_r = 2'(i);
      #1;
      checks++;
      if (rdata !== ref_mem[i]) begin
        failures++;
        $display("line %0d: %h expected %h", i, rdata, ref_mem[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < LINES; i++) ref_mem[i] = '0;
    @(negedge clk);
    rst_n = 1'b1;
    check_all();
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      we      = ($urandom_range(0, 3) != 0);
      index_w = 2'($urandom());
      wdata   = $urandom();
      index_r = 2'($urandom());
      @(posedge clk);
      if (we) ref_mem[index_w] = wdata;
      @(negedge clk);
      we = 1'b0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
