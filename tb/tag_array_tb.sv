// tag_array_tb - checks the tag array (4 x 14 + valid): all lines invalid
// after reset, a write stores the tag and sets the valid bit of that line
// only, other lines keep their tag and valid bit.
module tag_array_tb;
  localparam int LINES = 4, W = 14;
  logic         clk = 1'b0, rst_n = 1'b0, we = 1'b0, valid;
  logic [1:0]   index = '0;
  logic [W-1:0] wtag = '0, rtag;
  logic [W-1:0] ref_tag [LINES];
  logic         ref_val [LINES];
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  tag_array #(.LINES(LINES), .TAG_W(W)) dut (
    .clk (clk), .rst_n (rst_n), .we (we), .index (index), .wtag (wtag),
    .rtag (rtag), .valid (valid)
  );

  task automatic check_all();
    for (int i = 0; i < LINES; i++) begin
      index = 2'(i);
      #1;
      checks++;
      if (valid !== ref_val[i] || (ref_val[i] && rtag !== ref_tag[i])) begin
        failures++;
        $display("line %0d: %b/%h expected %b/%h", i, valid, rtag, ref_val[i], ref_tag[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < LINES; i++) begin ref_tag[i] = '0; ref_val[i] = 1'b0; end
    @(negedge clk);
    rst_n = 1'b1;
    check_all();
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 2) == 0);
      index = 2'($urandom());
      wtag  = W'($urandom());
      @(posedge clk);
      if (we) begin ref_tag[index] = wtag; ref_val[index] = 1'b1; end
      @(negedge clk);
      we = 1'b0;
      check_all();
    end
    // reset clears every valid bit again
    rst_n = 1'b0;
    #1;
    for (int i = 0; i < LINES; i++) ref_val[i] = 1'b0;
    check_all();
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
