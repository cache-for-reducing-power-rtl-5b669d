// tag_compare - equality check between the tag of the current address and
// the tag saved in the tag array.
//
// Built the way the tag compare is drawn for this cache: one XOR per tag
// bit marks the bits that differ, an OR tree collects them, and the tags
// match when no bit differs. Purely combinational; it lives in the PC
// pipeline state, after the address is generated and before the rising
// clock edge that starts the Fe state.
//
// Interface: new_tag and saved_tag of TAG_W bits, match = 1 when equal.
// TAG_W defaults to 14, the tag width of a 4 line cache on a 16-bit address.
module tag_compare #(
  parameter int unsigned TAG_W = 14
) (
  input  logic [TAG_W-1:0] new_tag,
  input  logic [TAG_W-1:0] saved_tag,
  output logic             match
);

  logic [TAG_W-1:0] diff;  // XOR layer: 1 where the bits differ

  always_comb begin
    diff  = new_tag ^ saved_tag;
    match = ~(|diff);      // OR tree, inverted
  end

endmodule
