// loop_cache - tag-less loop cache for the DSP program memory.
//
// Most instruction fetches of the hearing-aid program fall inside short Do
// loops (a Do instruction names the last address of the loop in its low 16
// bits; the loop starts at the word after the Do). The loop cache caches
// only such a loop, in SIZE flip-flop words indexed by (address - start),
// so it needs no tags:
//
//   IDLE  Every fetched word is checked for the Do opcode
//         ((word & DO_MASK) == DO_MATCH). If the loop (start = Do address
//         + 1 to last = word[15:0]) fits in SIZE words, go to LOAD.
//         Loops that do not fit are ignored.
//   LOAD  Fetches in [start, last] come from memory and are stored. When
//         the word at `last` has been fetched, the whole body is held: ON.
//   ON    Reads in [start, last] hit and are served from the cache; the
//         memory is not enabled. A loaded bit per word guards against a
//         first pass that skipped part of the body: such a word misses
//         and is stored when it is first fetched. Reads outside the range are a change of
//         control flow and go to memory.
//
// Leaving a loop for good is detected in one of two ways (RESET_MODE):
//   0 (counter)        fetches outside the loop are counted (the count is
//                      cleared by a fetch inside); after COUNT_LIMIT of
//                      them the cache returns to IDLE.
//   1 (Do instruction) a fetched Do instruction for a different loop that
//                      fits discards the cached loop and loads the new one.
// In both modes a new fitting Do found in IDLE or LOAD starts a new load.
//
// Pipeline and ports are those of cache_dm: the range check is made in the
// PC state from registered bounds, the word comes from the cache or the
// memory in the Fe state, and data_de_o is the fetch register, two rising
// edges after the address. State changes happen on the edge that ends the
// Fe state of the fetch that causes them. Writes go to memory and update a
// cached word in range (write-through).
//
// The opcode mask, the range test start <= addr <= last, the counter limit
// of 32 and the two reset modes follow the design; DO_MATCH (the opcode
// value), the exact fit test (last - start + 1 <= SIZE), keeping the loop
// when the same Do is fetched again, and the enable input are this
// design's choices. Reset is asynchronous and active low.
module loop_cache
  import cache_pkg::*;
#(
  parameter int unsigned SIZE        = 16,
  parameter bit          RESET_MODE  = 1'b0,
  parameter int unsigned COUNT_LIMIT = 32,
  parameter word_t       DO_MASK     = 32'hC03E_0000,
  parameter word_t       DO_MATCH    = 32'h4000_0000,
  localparam int unsigned IDX_W = (SIZE > 1) ? $clog2(SIZE) : 1,
  localparam int unsigned CNT_W = $clog2(COUNT_LIMIT + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mem_access_t pc_i,
  output mem_access_t mem_o,
  input  word_t       mem_rdata_i,
  output word_t       data_de_o,
  output logic        de_valid_o,
  output logic        hit_o,
  output logic        loop_on_o,      // a loop is held and served
  output logic        loop_reset_o    // pulse: the held loop was dropped
);

  typedef enum logic [1:0] {LC_IDLE, LC_LOAD, LC_ON} lc_state_e;

  lc_state_e        state_q;
  addr_t            start_q, last_q;
  logic [CNT_W-1:0] out_cnt_q;

  // ---------------- PC state: range check ----------------
  logic             in_range_pc, hit_pc;
  logic [SIZE-1:0]  loaded_q;  // word holds the loop body at that offset
  addr_t            offset_pc_full;
  logic [IDX_W-1:0] offset_pc;
  logic             start_load, drop;

  assign in_range_pc    = (pc_i.addr >= start_q) && (pc_i.addr <= last_q);
  assign offset_pc_full = pc_i.addr - start_q;
  assign offset_pc      = offset_pc_full[IDX_W-1:0];
  assign hit_pc         = pc_i.en && !pc_i.we && (state_q == LC_ON) && in_range_pc &&
                          loaded_q[offset_pc];

  // ---------------- PC -> Fe registers ----------------
  mem_access_t acc_fe;
  logic        hit_fe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_fe <= '0;
      hit_fe <= 1'b0;
    end else begin
      acc_fe.en   <= pc_i.en;
      acc_fe.we   <= pc_i.we;
      acc_fe.addr <= pc_i.addr;
      if (pc_i.en && pc_i.we) acc_fe.data <= pc_i.data;
      // a hit decided against a loop that is dropped on this edge is void
      hit_fe <= hit_pc && !start_load && !drop;
    end
  end

  // ---------------- Fe state ----------------
  word_t            data_c_fe, data_fe, store_data;
  logic             in_range_fe, store_fe, rd_fe;
  logic [IDX_W-1:0] offset_fe;
  addr_t            do_last, do_start, offset_full;
  logic             is_do, do_fits, same_loop;

  always_comb begin
    mem_o.en   = acc_fe.en && !hit_fe;
    mem_o.we   = acc_fe.we;
    mem_o.addr = acc_fe.addr;
    mem_o.data = acc_fe.data;
  end

  assign rd_fe       = acc_fe.en && !acc_fe.we;
  assign in_range_fe = (acc_fe.addr >= start_q) && (acc_fe.addr <= last_q);
  assign offset_full = acc_fe.addr - start_q;
  assign offset_fe   = offset_full[IDX_W-1:0];
  assign data_fe     = hit_fe ? data_c_fe : mem_rdata_i;

  // Do instruction among the fetched words
  assign is_do     = rd_fe && ((data_fe & DO_MASK) == DO_MATCH);
  assign do_last   = data_fe[ADDR_W-1:0];
  assign do_start  = acc_fe.addr + 16'd1;
  assign do_fits   = (do_last >= do_start) && ((do_last - do_start) < addr_t'(SIZE));
  assign same_loop = (state_q != LC_IDLE) && (do_start == start_q) && (do_last == last_q);

  // store fetched words while loading, and written words while a loop is held
  assign store_fe   = acc_fe.en && !hit_fe && in_range_fe && (state_q != LC_IDLE);
  assign store_data = acc_fe.we ? acc_fe.data : mem_rdata_i;

  data_array #(.LINES(SIZE), .WIDTH(DATA_W)) u_mem (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (store_fe),
    .index_w (offset_fe),
    .wdata   (store_data),
    .index_r (offset_fe),
    .rdata   (data_c_fe)
  );

  // ---------------- loop control, end of Fe ----------------

  always_comb begin
    start_load = 1'b0;
    drop       = 1'b0;
    if (is_do && do_fits && !same_loop) begin
      if (state_q != LC_ON || RESET_MODE) start_load = 1'b1;
    end
    if (!start_load && rd_fe && !in_range_fe && state_q != LC_IDLE && !RESET_MODE &&
        (32'(out_cnt_q) + 1 >= COUNT_LIMIT))
      drop = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= LC_IDLE;
      start_q   <= '1;
      last_q    <= '0;
      out_cnt_q <= '0;
      loaded_q  <= '0;
    end else if (start_load) begin
      state_q   <= LC_LOAD;
      start_q   <= do_start;
      last_q    <= do_last;
      out_cnt_q <= '0;
      loaded_q  <= '0;
    end else if (drop) begin
      state_q   <= LC_IDLE;
      start_q   <= '1;
      last_q    <= '0;
      out_cnt_q <= '0;
      loaded_q  <= '0;
    end else begin
      if (store_fe) loaded_q[offset_fe] <= 1'b1;
      if (rd_fe && state_q != LC_IDLE) begin
        if (in_range_fe) begin
          out_cnt_q <= '0;
          if (state_q == LC_LOAD && acc_fe.addr == last_q) state_q <= LC_ON;
        end else if (!RESET_MODE) begin
          out_cnt_q <= out_cnt_q + 1'b1;
        end
      end
    end
  end

  assign hit_o        = hit_fe;
  assign loop_on_o    = (state_q == LC_ON);
  assign loop_reset_o = drop || (start_load && state_q == LC_ON);

  // ---------------- Fe -> De: fetch register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_de_o  <= '0;
      de_valid_o <= 1'b0;
    end else begin
      de_valid_o <= rd_fe;
      if (rd_fe) data_de_o <= data_fe;
    end
  end

endmodule
