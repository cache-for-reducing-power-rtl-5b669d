// rrr_replace - semi-random round-robin victim selection for a 2-way cache.
//
// A single flip-flop, "random", names the way that is overwritten when an
// access misses. It is not advanced on every replacement, as plain round
// robin would be; instead it is inverted on every cycle in which the access
// in the Fe state hit in either way. Hits arrive at irregular times, so
// the choice behaves as a cheap pseudo-random one.
//
// Interface: hit_fe (the Fe-state access hit), victim = current value of
// the bit. Reset (asynchronous, active low) sets it to way 0, a choice of
// this design.
module rrr_replace (
  input  logic clk,
  input  logic rst_n,
  input  logic hit_fe,
  output logic victim
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      victim <= 1'b0;
    else if (hit_fe) victim <= ~victim;
  end

endmodule
