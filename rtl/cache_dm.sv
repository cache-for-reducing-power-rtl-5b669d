// cache_dm - direct-mapped, write-through program-memory cache for the DSP.
//
// The cache sits between the address generation unit (AGU) and the program
// memory and fits into the two pipeline states that an access already
// takes, so it never stalls the DSP:
//
//   PC state  The AGU drives pc_i (address, write strobe, write data,
//             enable). The address splits into index = addr[IDX_B-1:0] and
//             tag = addr[15:IDX_B] (one word per line; a one-line cache has
//             no index and a 16-bit tag). The tag array is read
//             at index and compared with tag_compare; a read hits when the
//             tags match and the line is valid. A write never counts as a
//             hit. On every access that does not hit, the new tag is
//             written (and the line marked valid) on the rising edge that
//             ends the PC state.
//   Fe state  The access is registered. On a hit the word comes from the
//             data array (read at index_hit_fe) and the memory is not
//             enabled. Otherwise mem_o asks the memory for the word (read)
//             or writes it through (write); the memory, clocked on the
//             falling edge, returns mem_rdata_i before the next rising
//             edge, and on that edge the word (read data, or the written
//             data) is stored in the data array at index_miss_fe.
//   De        The fetch register data_de_o takes the word that is read at
//             the end of the Fe state, so read data appears two rising edges
//             after the address was presented, exactly as without a cache.
//
// Writes always go to memory and update the cache line (write-through,
// update on write). The read and write index of the data array are kept
// in separate registers, loaded only by hits and only by misses
// respectively, so the multiplexer select lines do not toggle needlessly.
// hit_o (the Fe-state hit) is brought out for hit counting.
//
// Follows the 4 line and 8 line direct-mapped caches of the design
// (LINES = 4 or 8). The enable input, de_valid_o and the gating of the
// index registers by enable are this design's additions for cycles
// without an access. Reset is asynchronous and active low.
module cache_dm
  import cache_pkg::*;
#(
  parameter int unsigned LINES = 4,
  localparam int unsigned IDX_B = $clog2(LINES),            // index bits, 0 for one line
  localparam int unsigned IDX_W = (LINES > 1) ? IDX_B : 1,   // index port width
  localparam int unsigned TAG_W = ADDR_W - IDX_B
) (
  input  logic        clk,
  input  logic        rst_n,
  // PC state: access from the AGU
  input  mem_access_t pc_i,
  // Fe state: program memory port
  output mem_access_t mem_o,
  input  word_t       mem_rdata_i,
  // De state: fetch register
  output word_t       data_de_o,
  output logic        de_valid_o,
  // Fe-state hit, for statistics
  output logic        hit_o
);

  // ---------------- PC state ----------------
  logic [IDX_W-1:0] index_pc;
  logic [TAG_W-1:0] tag_pc, tag_c_pc;
  logic             valid_pc, tag_match_pc, hit_pc, tag_we_pc;

  assign index_pc = (LINES > 1) ? pc_i.addr[IDX_W-1:0] : '0;
  assign tag_pc   = pc_i.addr[ADDR_W-1:IDX_B];

  tag_array #(.LINES(LINES), .TAG_W(TAG_W)) u_tag (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (tag_we_pc),
    .index (index_pc),
    .wtag  (tag_pc),
    .rtag  (tag_c_pc),
    .valid (valid_pc)
  );

  tag_compare #(.TAG_W(TAG_W)) u_cmp (
    .new_tag   (tag_pc),
    .saved_tag (tag_c_pc),
    .match     (tag_match_pc)
  );

  assign hit_pc    = pc_i.en && !pc_i.we && tag_match_pc && valid_pc;
  assign tag_we_pc = pc_i.en && !hit_pc;

  // ---------------- PC -> Fe registers ----------------
  mem_access_t      acc_fe;
  logic             hit_fe;
  logic [IDX_W-1:0] index_hit_fe, index_miss_fe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_fe        <= '0;
      hit_fe        <= 1'b0;
      index_hit_fe  <= '0;
      index_miss_fe <= '0;
    end else begin
      acc_fe.en   <= pc_i.en;
      acc_fe.we   <= pc_i.we;
      acc_fe.addr <= pc_i.addr;
      if (pc_i.en && pc_i.we) acc_fe.data <= pc_i.data;
      hit_fe <= hit_pc;
      if (hit_pc)    index_hit_fe  <= index_pc;
      if (tag_we_pc) index_miss_fe <= index_pc;
    end
  end

  // ---------------- Fe state ----------------
  word_t data_c_fe, data_fill_fe, data_fe;
  logic  fill_fe;

  always_comb begin
    mem_o.en   = acc_fe.en && !hit_fe;
    mem_o.we   = acc_fe.we;
    mem_o.addr = acc_fe.addr;
    mem_o.data = acc_fe.data;
  end

  assign fill_fe      = acc_fe.en && !hit_fe;
  assign data_fill_fe = acc_fe.we ? acc_fe.data : mem_rdata_i;
  assign data_fe      = hit_fe ? data_c_fe : mem_rdata_i;

  data_array #(.LINES(LINES), .WIDTH(DATA_W)) u_data (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (fill_fe),
    .index_w (index_miss_fe),
    .wdata   (data_fill_fe),
    .index_r (index_hit_fe),
    .rdata   (data_c_fe)
  );

  assign hit_o = hit_fe;

  // ---------------- Fe -> De: fetch register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_de_o  <= '0;
      de_valid_o <= 1'b0;
    end else begin
      de_valid_o <= acc_fe.en && !acc_fe.we;
      if (acc_fe.en && !acc_fe.we) data_de_o <= data_fe;
    end
  end

  // A hit is only possible on an enabled read.
  assert property (@(posedge clk) disable iff (!rst_n) hit_fe |-> (acc_fe.en && !acc_fe.we));

endmodule
