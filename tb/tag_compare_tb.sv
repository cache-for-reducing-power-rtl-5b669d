// tag_compare_tb - checks the tag compare at the default 14-bit width:
// equal tags, every single-bit difference and random pairs.
module tag_compare_tb;
  localparam int W = 14;
  logic [W-1:0] a, b;
  logic         match;
  int           checks = 0, failures = 0;

  tag_compare #(.TAG_W(W)) dut (.new_tag (a), .saved_tag (b), .match (match));

  task automatic check(logic [W-1:0] x, logic [W-1:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (match !== (x == y)) begin
      failures++;
      $display("tag %h vs %h: match %b", x, y, match);
    end
  endtask

  initial begin
    logic [W-1:0] r;
    for (int i = 0; i < 200; i++) begin
      r = W'($urandom());
      check(r, r);
      for (int bt = 0; bt < W; bt++) check(r, r ^ (W'(1) << bt));
      check(r, W'($urandom()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
