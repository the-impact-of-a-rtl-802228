// dcache_array: the direct-mapped "Cache" of a data-cache level.
//
// SETS sets of one 16-word block each, with a tag, a valid bit and a dirty
// bit per set (write-back). NL lookup ports answer, combinationally in the
// same cycle, whether a word address hits and which word it holds; they
// serve the read ports, the Data Write Buffer's drain check and the
// prefetch check. NWP word write ports store words that hit (the Data
// Write Buffer drains through them) and set the dirty bit; when two ports
// write the same word in one cycle the higher-numbered port wins, which is
// the younger record. One fill port installs a whole returned block; in the
// same cycle victim_* shows the block being replaced so that a dirty victim
// can be written back. The caller must not write words in a cycle it fills.
// Direct mapping, 64-byte blocks and write-back follow the evaluated
// configuration; the port structure is this design's own.
module dcache_array
  import hsa_cache_pkg::*;
#(
  parameter int SETS = 32,
  parameter int NL   = 5,
  parameter int NWP  = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  // lookups
  input  waddr_t lk_addr [NL],
  output logic   lk_hit  [NL],
  output word_t  lk_data [NL],
  // word writes (hits only)
  input  logic   wr_en   [NWP],
  input  waddr_t wr_addr [NWP],
  input  word_t  wr_data [NWP],
  // block fill
  input  logic   fill_en,
  input  baddr_t fill_blk,
  input  block_t fill_data,
  output logic   victim_dirty,
  output baddr_t victim_blk,
  output block_t victim_data
);
  localparam int SET_W = $clog2(SETS);
  localparam int TAG_W = BLK_W - SET_W;
  typedef logic [SET_W-1:0] set_t;
  typedef logic [TAG_W-1:0] tag_t;

  logic [SETS-1:0] valid, dirty;
  tag_t            tags [SETS];
  block_t          data [SETS];

  function automatic set_t set_of(baddr_t b);
    return b[SET_W-1:0];
  endfunction
  function automatic tag_t tag_of(baddr_t b);
    return b[BLK_W-1:SET_W];
  endfunction

  always_comb begin
    for (int i = 0; i < NL; i++) begin
      lk_hit[i]  = valid[set_of(blk_of(lk_addr[i]))] &&
                   tags[set_of(blk_of(lk_addr[i]))] == tag_of(blk_of(lk_addr[i]));
      lk_data[i] = data[set_of(blk_of(lk_addr[i]))][off_of(lk_addr[i])];
    end
  end

  assign victim_dirty = valid[set_of(fill_blk)] && dirty[set_of(fill_blk)];
  assign victim_blk   = {tags[set_of(fill_blk)], set_of(fill_blk)};
  assign victim_data  = data[set_of(fill_blk)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      dirty <= '0;
    end else begin
      for (int p = 0; p < NWP; p++)
        if (wr_en[p]) dirty[set_of(blk_of(wr_addr[p]))] <= 1'b1;
      if (fill_en) begin
        valid[set_of(fill_blk)] <= 1'b1;
        dirty[set_of(fill_blk)] <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NWP; p++)
      if (wr_en[p]) data[set_of(blk_of(wr_addr[p]))][off_of(wr_addr[p])] <= wr_data[p];
    if (fill_en) begin
      data[set_of(fill_blk)] <= fill_data;
      tags[set_of(fill_blk)] <= tag_of(fill_blk);
    end
  end

endmodule
