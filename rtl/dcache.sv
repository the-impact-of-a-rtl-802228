// dcache: one non-blocking data-cache level.
//
// The level joins a direct-mapped write-back cache (dcache_array), a Data
// Write Buffer in front of it, an Outstanding References Buffer, a
// multiplexor that feeds misses and prefetches toward the next level, three
// queues toward the next level (block requests, write-backs, returned
// block) and a single return (bypass) line that sends the word a load asked
// for straight to the register file while the block is being installed.
//
// Processor side, per cycle:
//  * NRP read ports. A read whose word is in the Data Write Buffer (the
//    youngest record wins) or in the cache is answered one cycle later on
//    rsp_*. A read that misses in both is accepted only if the multiplexor
//    passes it to the ORB this cycle (rd_ready low otherwise); its word comes
//    back later on byp_*, tagged with rd_id.
//  * NWP write ports into the Data Write Buffer (wr_ready low when full).
//    The buffer drains up to NWP records per cycle into the cache write
//    ports, in order, and asks for the block when its oldest record misses
//    ('allocate on write miss').
//  * One prefetch port: a prefetch that misses is placed in the ORB and only
//    brings the block into the cache.
// Next-level side: mrd_* block requests, mwr_* write-backs of dirty victims,
// mret_* returned blocks.
//
// Returned block, state machine R_IDLE -> R_FILL -> R_DELIV -> R_IDLE: the
// block is taken from the next level (R_IDLE), written into the cache with
// any dirty victim queued for write-back (R_FILL, Data Write Buffer drain
// held that cycle), then every read record of that block in the ORB is
// answered over the bypass line, one per cycle (R_DELIV); finally the
// block's write-miss and prefetch records are freed and the stalled write
// record is woken. A new block is accepted only in R_IDLE.
//
// The structure, the buffers' roles, single bypass line, direct mapping,
// write back, allocate on write miss, 40-record buffers, 2 read and 2 write
// ports and 2 KB size follow the evaluated (Standard) configuration. Port
// handshakes, the one-reference-per-cycle multiplexor, its priority (read
// ports, then the write miss, then prefetch), the return state machine and
// the depth of the next-level queues are this design's choices. Cache
// reads take ACC_LAT cycles (1 by default, 2 for the slower configuration)
// and are pipelined: a hit accepted in cycle c is answered in cycle
// c+ACC_LAT. The Data Write Buffer keeps its write latency of one.
module dcache
  import hsa_cache_pkg::*;
#(
  parameter int SETS      = 32,
  parameter int NRP       = 2,
  parameter int NWP       = 2,
  parameter int DWB_DEPTH = 40,
  parameter int ORB_DEPTH = 40,
  parameter int LQ_DEPTH  = 4,
  parameter int ACC_LAT   = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  // read ports
  input  logic    rd_valid [NRP],
  input  waddr_t  rd_addr  [NRP],
  input  id_t     rd_id    [NRP],
  output logic    rd_ready [NRP],
  output logic    rsp_valid [NRP],
  output id_t     rsp_id    [NRP],
  output word_t   rsp_data  [NRP],
  // write ports
  input  logic    wr_valid [NWP],
  input  waddr_t  wr_addr  [NWP],
  input  word_t   wr_data  [NWP],
  output logic    wr_ready [NWP],
  // prefetch port
  input  logic    pf_valid,
  input  waddr_t  pf_addr,
  output logic    pf_ready,
  // return (bypass) line
  output logic    byp_valid,
  output id_t     byp_id,
  output word_t   byp_data,
  // next level
  output logic    mrd_valid,
  output baddr_t  mrd_blk,
  input  logic    mrd_ready,
  output logic    mwr_valid,
  output blk_wr_t mwr_req,
  input  logic    mwr_ready,
  input  logic    mret_valid,
  input  blk_ret_t mret,
  output logic    mret_ready,
  // event pulses
  output dcache_events_t ev
);
  localparam int NL  = NRP + NWP + 1;   // cache lookups
  localparam int LPF = NRP + NWP;       // prefetch lookup index
  localparam int NM  = NRP + 2;         // multiplexor inputs
  localparam int MWR = NRP;             // write-miss input
  localparam int MPF = NRP + 1;         // prefetch input

  // ---------------------------------------------------------------- cache
  waddr_t lk_addr [NL];
  logic   lk_hit  [NL];
  word_t  lk_data [NL];
  logic   cw_en   [NWP];
  waddr_t cw_addr [NWP];
  word_t  cw_data [NWP];
  logic   fill_en;
  logic   victim_dirty;
  baddr_t victim_blk;
  block_t victim_data;

  typedef enum logic [1:0] {R_IDLE, R_FILL, R_DELIV} rstate_e;
  rstate_e  rstate;
  blk_ret_t ret_q;

  dcache_array #(.SETS(SETS), .NL(NL), .NWP(NWP)) u_array (
    .clk, .rst_n,
    .lk_addr, .lk_hit, .lk_data,
    .wr_en(cw_en), .wr_addr(cw_addr), .wr_data(cw_data),
    .fill_en, .fill_blk(ret_q.blk), .fill_data(ret_q.data),
    .victim_dirty, .victim_blk, .victim_data
  );

  // ---------------------------------------------------- data write buffer
  logic   dwb_hit  [NRP];
  word_t  dwb_data [NRP];
  waddr_t head_addr [NWP];
  logic   head_hit  [NWP];
  logic   dwb_miss_valid, dwb_miss_ready;
  waddr_t dwb_miss_addr;
  logic   wake_valid;
  logic [$clog2(DWB_DEPTH+1)-1:0] dwb_count;

  data_write_buffer #(.DEPTH(DWB_DEPTH), .NWP(NWP), .NRP(NRP)) u_dwb (
    .clk, .rst_n,
    .enq_valid(wr_valid), .enq_addr(wr_addr), .enq_data(wr_data), .enq_ready(wr_ready),
    .lk_addr(rd_addr), .lk_hit(dwb_hit), .lk_data(dwb_data),
    .head_addr, .head_hit, .drain_en(rstate != R_FILL),
    .cw_en, .cw_addr, .cw_data,
    .miss_valid(dwb_miss_valid), .miss_addr(dwb_miss_addr), .miss_ready(dwb_miss_ready),
    .wake_valid, .wake_blk(ret_q.blk),
    .count(dwb_count)
  );

  always_comb begin
    for (int i = 0; i < NRP; i++) lk_addr[i] = rd_addr[i];
    for (int p = 0; p < NWP; p++) lk_addr[NRP + p] = head_addr[p];
    lk_addr[LPF] = pf_addr;
  end

  always_comb begin
    for (int p = 0; p < NWP; p++) head_hit[p] = lk_hit[NRP + p];
  end

  // ----------------------------------------------------------- multiplexor
  logic      mx_valid [NM];
  miss_ref_t mx_ref   [NM];
  logic      mx_ready [NM];
  logic      mx_out_valid;
  miss_ref_t mx_out_ref;
  logic [$clog2(NM)-1:0] mx_sel;
  logic      orb_alloc_ready, orb_merge;

  logic rd_hit [NRP];

  always_comb begin
    for (int i = 0; i < NRP; i++) begin
      rd_hit[i]   = dwb_hit[i] || lk_hit[i];
      mx_valid[i] = rd_valid[i] && !rd_hit[i];
      mx_ref[i]   = '{kind: REF_READ, blk: blk_of(rd_addr[i]), off: off_of(rd_addr[i]), id: rd_id[i]};
    end
    mx_valid[MWR] = dwb_miss_valid;
    mx_ref[MWR]   = '{kind: REF_WRITE, blk: blk_of(dwb_miss_addr), off: off_of(dwb_miss_addr), id: '0};
    mx_valid[MPF] = pf_valid && !lk_hit[LPF];
    mx_ref[MPF]   = '{kind: REF_PREFETCH, blk: blk_of(pf_addr), off: off_of(pf_addr), id: '0};
  end

  always_comb begin
    for (int i = 0; i < NRP; i++) rd_ready[i] = rd_hit[i] || mx_ready[i];
    dwb_miss_ready = mx_ready[MWR];
    pf_ready       = lk_hit[LPF] || mx_ready[MPF];
  end

  miss_mux #(.N(NM)) u_mux (
    .in_valid(mx_valid), .in_ref(mx_ref), .in_ready(mx_ready),
    .out_valid(mx_out_valid), .out_ref(mx_out_ref), .out_sel(mx_sel),
    .out_ready(orb_alloc_ready)
  );

  // ------------------------------------------- outstanding references buffer
  logic      issue_valid, issue_ready;
  baddr_t    issue_blk;
  logic      act_valid, act_take, act_free_rest, act_has_write;
  miss_ref_t act_ref;
  logic [$clog2(ORB_DEPTH+1)-1:0] orb_count;

  outstanding_refs_buffer #(.DEPTH(ORB_DEPTH)) u_orb (
    .clk, .rst_n,
    .alloc_valid(mx_out_valid), .alloc_ref(mx_out_ref),
    .alloc_ready(orb_alloc_ready), .alloc_merge(orb_merge),
    .issue_valid, .issue_blk, .issue_ready,
    .act_blk(ret_q.blk), .act_valid, .act_ref,
    .act_take, .act_free_rest, .act_has_write,
    .count(orb_count)
  );

  // ------------------------------------------------ next-level buffers
  sync_fifo #(.T(baddr_t), .DEPTH(LQ_DEPTH)) u_rdq (
    .clk, .rst_n,
    .push_valid(issue_valid), .push_ready(issue_ready), .push_data(issue_blk),
    .pop_valid(mrd_valid), .pop_ready(mrd_ready), .pop_data(mrd_blk),
    .count()
  );

  logic wbq_push_valid, wbq_push_ready;
  sync_fifo #(.T(blk_wr_t), .DEPTH(LQ_DEPTH)) u_wbq (
    .clk, .rst_n,
    .push_valid(wbq_push_valid), .push_ready(wbq_push_ready),
    .push_data('{blk: victim_blk, data: victim_data}),
    .pop_valid(mwr_valid), .pop_ready(mwr_ready), .pop_data(mwr_req),
    .count()
  );

  // ------------------------------------------------ return / bypass path
  assign mret_ready     = (rstate == R_IDLE);
  assign fill_en        = (rstate == R_FILL) && (!victim_dirty || wbq_push_ready);
  assign wbq_push_valid = (rstate == R_FILL) && victim_dirty;
  assign act_take       = (rstate == R_DELIV) && act_valid;
  assign act_free_rest  = (rstate == R_DELIV) && !act_valid;
  assign wake_valid     = act_free_rest;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate <= R_IDLE;
      ret_q  <= '0;
    end else begin
      unique case (rstate)
        R_IDLE:  if (mret_valid) begin
                   ret_q  <= mret;
                   rstate <= R_FILL;
                 end
        R_FILL:  if (fill_en) rstate <= R_DELIV;
        R_DELIV: if (!act_valid) rstate <= R_IDLE;
        default: rstate <= R_IDLE;
      endcase
    end
  end

  // Bypass line: the word a waiting load asked for, straight from the
  // returned block.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byp_valid <= 1'b0;
      byp_id    <= '0;
      byp_data  <= '0;
    end else begin
      byp_valid <= act_take;
      byp_id    <= act_ref.id;
      byp_data  <= ret_q.data[act_ref.off];
    end
  end

  // ---------------------------------------------------------- hit returns
  // The lookup is made when the read is accepted; the answer then passes
  // through ACC_LAT pipeline registers (one per cycle of cache access time),
  // so a new read can be accepted on every port every cycle.
  logic  hp_valid [ACC_LAT][NRP];
  id_t   hp_id    [ACC_LAT][NRP];
  word_t hp_data  [ACC_LAT][NRP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < ACC_LAT; s++)
        for (int i = 0; i < NRP; i++) begin
          hp_valid[s][i] <= 1'b0;
          hp_id[s][i]    <= '0;
          hp_data[s][i]  <= '0;
        end
    end else begin
      for (int i = 0; i < NRP; i++) begin
        hp_valid[0][i] <= rd_valid[i] && rd_hit[i];
        hp_id[0][i]    <= rd_id[i];
        hp_data[0][i]  <= dwb_hit[i] ? dwb_data[i] : lk_data[i];
      end
      for (int s = 1; s < ACC_LAT; s++)
        for (int i = 0; i < NRP; i++) begin
          hp_valid[s][i] <= hp_valid[s-1][i];
          hp_id[s][i]    <= hp_id[s-1][i];
          hp_data[s][i]  <= hp_data[s-1][i];
        end
    end
  end

  always_comb begin
    for (int i = 0; i < NRP; i++) begin
      rsp_valid[i] = hp_valid[ACC_LAT-1][i];
      rsp_id[i]    = hp_id[ACC_LAT-1][i];
      rsp_data[i]  = hp_data[ACC_LAT-1][i];
    end
  end

  // --------------------------------------------------------------- events
  always_comb begin
    int nd;
    ev = '0;
    nd = 0;
    for (int i = 0; i < NRP && i < 2; i++) begin
      ev.dwb_read_hit[i]   = rd_valid[i] && dwb_hit[i];
      ev.cache_read_hit[i] = rd_valid[i] && !dwb_hit[i] && lk_hit[i];
    end
    for (int i = 0; i < NRP; i++) begin
      if (mx_ready[i]) ev.read_miss = 1'b1;
      if (rd_valid[i] && !rd_ready[i]) ev.read_stall = 1'b1;
    end
    for (int p = 0; p < NWP; p++) begin
      if (wr_valid[p] && !wr_ready[p]) ev.write_stall = 1'b1;
      if (cw_en[p]) nd++;
    end
    ev.dual_drain    = (nd >= 2);
    ev.orb_merge     = mx_out_valid && orb_alloc_ready && orb_merge;
    ev.block_request = issue_valid && issue_ready;
    ev.bypass_return = byp_valid;
    ev.write_miss    = mx_ready[MWR];
    ev.prefetch      = mx_ready[MPF];
    ev.write_back    = wbq_push_valid && wbq_push_ready;
    ev.fill          = fill_en;
  end

  a_fill_no_write: assert property (@(posedge clk) disable iff (!rst_n)
                                    fill_en |-> !cw_en[0]);

endmodule
