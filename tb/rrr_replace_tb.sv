// rrr_replace_tb - checks the semi-random round-robin bit: way 0 after
// reset, inverted on every clock edge with hit_fe = 1, unchanged otherwise.
module rrr_replace_tb;
  logic clk = 1'b0, rst_n = 1'b0, hit_fe = 1'b0, victim;
  logic expected = 1'b0;
  int   checks = 0, failures = 0, flips = 0;

  always #5 clk = ~clk;

  rrr_replace dut (.clk (clk), .rst_n (rst_n), .hit_fe (hit_fe), .victim (victim));

  initial begin
    @(negedge clk);
    checks++;
    if (victim !== 1'b0) failures++;
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      hit_fe = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (hit_fe) begin expected = !expected; flips++; end
      #1;
      checks++;
      if (victim !== expected) begin
        failures++;
        $display("cycle %0d: victim %b expected %b", k, victim, expected);
      end
    end
    checks++;
    if (flips == 0) failures++;
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
