// tag_array - cache tag memory with one valid bit per line, in flip-flops.
//
// Same organisation as data_array, but LINES x TAG_W bits and a single
// index used for both read and write: the tag is read and compared in the
// PC state, and on a miss the new tag is written back at the same index on
// the rising edge that ends the PC state. Writing a tag also sets the
// line's valid bit. Valid bits are cleared only by reset (asynchronous,
// active low); after the cache has been filled once they stay set.
//
// Interface: we, index, wtag in; rtag and valid out, combinational from
// index.
module tag_array #(
  parameter int unsigned LINES = 4,
  parameter int unsigned TAG_W = 14,
  localparam int unsigned IDX_W = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [IDX_W-1:0] index,
  input  logic [TAG_W-1:0] wtag,
  output logic [TAG_W-1:0] rtag,
  output logic             valid
);

  logic [TAG_W-1:0] tags [LINES];
  logic [LINES-1:0] valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < LINES; i++) tags[i] <= '0;
      valid_q <= '0;
    end else if (we) begin
      tags[index]    <= wtag;
      valid_q[index] <= 1'b1;
    end
  end

  assign rtag  = tags[index];
  assign valid = valid_q[index];

endmodule
