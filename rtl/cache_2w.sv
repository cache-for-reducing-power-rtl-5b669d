// cache_2w - 2-way set-associative, write-through program-memory cache.
//
// Same two-state pipeline as cache_dm (PC state: tag lookup; Fe state:
// data from cache or memory; fetch register after Fe), with one word per
// line, LINES lines per way and two ways, each with its own tag_array and
// data_array.
//
// PC state: both tag arrays are read at the index and compared. A read
// hits in way w when the tags match and the line is valid. On any enabled
// access that does not hit, one way receives the new tag: for a write
// whose tag is already present, the way that holds it (so a line is never
// cached twice); otherwise the way named by the semi-random round-robin
// bit (rrr_replace), which is inverted whenever an access hits.
//
// Fe state: the hit way's read index is held in its own register, loaded
// only when that way hits (index_hit0_fe, index_hit1_fe), so the read
// multiplexers of the way not used keep still. hit1_fe selects the output
// of data array 1, else data array 0. On a miss the memory is enabled and
// the word (read data, or the written data) is stored in the chosen way at
// index_miss_fe on the rising edge that ends the Fe state.
//
// Read data reaches data_de_o two rising edges after the address, as in
// cache_dm. Follows the 4 line 2-way cache of the design; the way chosen
// for a write to a cached tag, the enable input, de_valid_o and the reset
// value of the replacement bit are this design's choices. Reset is
// asynchronous and active low.
module cache_2w
  import cache_pkg::*;
#(
  parameter int unsigned LINES = 4,
  localparam int unsigned IDX_B = $clog2(LINES),            // index bits, 0 for one line
  localparam int unsigned IDX_W = (LINES > 1) ? IDX_B : 1,   // index port width
  localparam int unsigned TAG_W = ADDR_W - IDX_B
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mem_access_t pc_i,
  output mem_access_t mem_o,
  input  word_t       mem_rdata_i,
  output word_t       data_de_o,
  output logic        de_valid_o,
  output logic        hit_o
);

  // ---------------- PC state ----------------
  logic [IDX_W-1:0] index_pc;
  logic [TAG_W-1:0] tag_pc;
  logic [TAG_W-1:0] tag_c_pc [2];
  logic [1:0]       valid_pc, cmp_pc, match_pc, hit_way_pc, tag_we_pc;
  logic             hit_pc, victim, way_pc;

  assign index_pc = (LINES > 1) ? pc_i.addr[IDX_W-1:0] : '0;
  assign tag_pc   = pc_i.addr[ADDR_W-1:IDX_B];

  for (genvar w = 0; w < 2; w++) begin : g_way_tag
    tag_array #(.LINES(LINES), .TAG_W(TAG_W)) u_tag (
      .clk   (clk),
      .rst_n (rst_n),
      .we    (tag_we_pc[w]),
      .index (index_pc),
      .wtag  (tag_pc),
      .rtag  (tag_c_pc[w]),
      .valid (valid_pc[w])
    );
    tag_compare #(.TAG_W(TAG_W)) u_cmp (
      .new_tag   (tag_pc),
      .saved_tag (tag_c_pc[w]),
      .match     (cmp_pc[w])
    );
  end

  always_comb begin
    match_pc   = {2{pc_i.en}} & cmp_pc & valid_pc;
    hit_way_pc = match_pc & {2{!pc_i.we}};
    hit_pc     = |hit_way_pc;
    // way that receives the tag on a miss or a write
    if (|match_pc) way_pc = match_pc[1];
    else           way_pc = victim;
    tag_we_pc = '0;
    if (pc_i.en && !hit_pc) tag_we_pc[way_pc] = 1'b1;
  end

  // ---------------- PC -> Fe registers ----------------
  mem_access_t      acc_fe;
  logic             hit_fe, hit1_fe, way_miss_fe;
  logic [IDX_W-1:0] index_hit0_fe, index_hit1_fe, index_miss_fe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_fe        <= '0;
      hit_fe        <= 1'b0;
      hit1_fe       <= 1'b0;
      way_miss_fe   <= 1'b0;
      index_hit0_fe <= '0;
      index_hit1_fe <= '0;
      index_miss_fe <= '0;
    end else begin
      acc_fe.en   <= pc_i.en;
      acc_fe.we   <= pc_i.we;
      acc_fe.addr <= pc_i.addr;
      if (pc_i.en && pc_i.we) acc_fe.data <= pc_i.data;
      hit_fe  <= hit_pc;
      hit1_fe <= hit_way_pc[1];
      if (hit_way_pc[0]) index_hit0_fe <= index_pc;
      if (hit_way_pc[1]) index_hit1_fe <= index_pc;
      if (|tag_we_pc) begin
        index_miss_fe <= index_pc;
        way_miss_fe   <= way_pc;
      end
    end
  end

  rrr_replace u_repl (
    .clk    (clk),
    .rst_n  (rst_n),
    .hit_fe (hit_fe),
    .victim (victim)
  );

  // ---------------- Fe state ----------------
  word_t data_c_fe [2];
  word_t data_fill_fe, data_fe;
  logic  fill_fe;

  always_comb begin
    mem_o.en   = acc_fe.en && !hit_fe;
    mem_o.we   = acc_fe.we;
    mem_o.addr = acc_fe.addr;
    mem_o.data = acc_fe.data;
  end

  assign fill_fe      = acc_fe.en && !hit_fe;
  assign data_fill_fe = acc_fe.we ? acc_fe.data : mem_rdata_i;

  data_array #(.LINES(LINES), .WIDTH(DATA_W)) u_data0 (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (fill_fe && !way_miss_fe),
    .index_w (index_miss_fe),
    .wdata   (data_fill_fe),
    .index_r (index_hit0_fe),
    .rdata   (data_c_fe[0])
  );

  data_array #(.LINES(LINES), .WIDTH(DATA_W)) u_data1 (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (fill_fe && way_miss_fe),
    .index_w (index_miss_fe),
    .wdata   (data_fill_fe),
    .index_r (index_hit1_fe),
    .rdata   (data_c_fe[1])
  );

  always_comb begin
    if (!hit_fe)      data_fe = mem_rdata_i;
    else if (hit1_fe) data_fe = data_c_fe[1];
    else              data_fe = data_c_fe[0];
  end

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

  // A tag is never held by both ways of a set, so at most one way hits.
  assert property (@(posedge clk) disable iff (!rst_n) !(&hit_way_pc));

endmodule
