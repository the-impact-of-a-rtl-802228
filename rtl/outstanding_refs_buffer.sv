// outstanding_refs_buffer: the Outstanding References Buffer of a cache
// level.
//
// A fully associative table of DEPTH records, one per reference that has
// gone toward the next level: the reference kind (read, write miss,
// prefetch), its block and word address and, for reads, the destination
// register tag. A new reference (alloc_*) is compared with all valid
// records. If another record already names the same block, the reference is
// stored but no block request is made (merge). Otherwise it is stored and a
// block request is issued (issue_valid, same cycle), which needs room in the
// block-request buffer (issue_ready); alloc_ready also needs a free record.
//
// When a block has come back, the return logic presents its address on
// act_blk. act_valid/act_ref show one read record of that block (lowest
// index); act_take frees it after its word has been sent over the bypass
// line. act_free_rest frees every non-read record of the block at once and
// act_has_write tells whether a write-miss record was among them.
//
// Timing: alloc and act are evaluated in the same cycle and take effect at
// the clock edge; a record allocated in cycle c is visible from c+1. The
// behaviour follows the description of the buffer; the record layout and
// the handshakes are this design's own.
module outstanding_refs_buffer
  import hsa_cache_pkg::*;
#(
  parameter int DEPTH = 40
) (
  input  logic      clk,
  input  logic      rst_n,
  // new reference
  input  logic      alloc_valid,
  input  miss_ref_t alloc_ref,
  output logic      alloc_ready,
  output logic      alloc_merge,
  // block request toward the next level
  output logic      issue_valid,
  output baddr_t    issue_blk,
  input  logic      issue_ready,
  // activation when a block has returned
  input  baddr_t    act_blk,
  output logic      act_valid,
  output miss_ref_t act_ref,
  input  logic      act_take,
  input  logic      act_free_rest,
  output logic      act_has_write,
  // status
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int IW = $clog2(DEPTH);

  logic      vld [DEPTH];
  miss_ref_t rec [DEPTH];

  logic          have_free;
  logic [IW-1:0] free_idx;
  logic          act_found;
  logic [IW-1:0] act_idx;
  logic          do_alloc;
  logic [$clog2(DEPTH+1)-1:0] n_rest;

  always_comb begin
    have_free     = 1'b0;
    free_idx      = '0;
    alloc_merge   = 1'b0;
    act_found     = 1'b0;
    act_idx       = '0;
    act_has_write = 1'b0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!vld[i]) begin
        have_free = 1'b1;
        free_idx  = IW'(i);
      end
      if (vld[i] && rec[i].blk == alloc_ref.blk) alloc_merge = 1'b1;
      if (vld[i] && rec[i].blk == act_blk) begin
        if (rec[i].kind == REF_READ) begin
          act_found = 1'b1;
          act_idx   = IW'(i);
        end else if (rec[i].kind == REF_WRITE) begin
          act_has_write = 1'b1;
        end
      end
    end
    n_rest = '0;
    for (int i = 0; i < DEPTH; i++)
      if (act_free_rest && vld[i] && rec[i].blk == act_blk && rec[i].kind != REF_READ)
        n_rest = n_rest + 1'b1;
    act_valid   = act_found;
    act_ref     = rec[act_idx];
    alloc_ready = have_free && (alloc_merge || issue_ready);
    do_alloc    = alloc_valid && alloc_ready;
    issue_valid = alloc_valid && have_free && !alloc_merge;
    issue_blk   = alloc_ref.blk;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) vld[i] <= 1'b0;
      count <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (vld[i] && rec[i].blk == act_blk) begin
          if (act_take && act_found && IW'(i) == act_idx) vld[i] <= 1'b0;
          if (act_free_rest && rec[i].kind != REF_READ)   vld[i] <= 1'b0;
        end
      end
      if (do_alloc) vld[free_idx] <= 1'b1;
      count <= count + $bits(count)'(do_alloc)
                     - $bits(count)'(act_take && act_found)
                     - n_rest;
    end
  end


  always_ff @(posedge clk) begin
    if (do_alloc) rec[free_idx] <= alloc_ref;
  end

  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                  count <= $bits(count)'(DEPTH));

endmodule
