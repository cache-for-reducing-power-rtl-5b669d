// data_array - cache data memory built from flip-flops.
//
// Small caches of this kind (32 words or less) use flip-flops as memory
// cells rather than an SRAM, and multiplexers rather than a tri-state bus.
// LINES words of WIDTH bits are held in registers. A write stores wdata in
// line index_w on the rising clock edge when we is 1; one decoded enable
// per line, so only the addressed line is clocked in. The read side is a
// multiplexer tree driven by index_r and is combinational, so the read data
// is available in the same cycle as the index.
//
// Separate read and write indices let the cache read the line of the access
// that hit while filling the line of an earlier access that missed.
// Reset (asynchronous, active low) clears every word.
module data_array #(
  parameter int unsigned LINES = 4,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned IDX_W = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [IDX_W-1:0] index_w,
  input  logic [WIDTH-1:0] wdata,
  input  logic [IDX_W-1:0] index_r,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [LINES];
  logic [LINES-1:0] line_en;  // decoded write enable per line

  always_comb begin
    line_en = '0;
    for (int unsigned i = 0; i < LINES; i++)
      line_en[i] = we && (index_w == IDX_W'(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < LINES; i++) mem[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < LINES; i++)
        if (line_en[i]) mem[i] <= wdata;
    end
  end

  assign rdata = mem[index_r];

endmodule
