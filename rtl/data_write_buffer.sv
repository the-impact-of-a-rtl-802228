// data_write_buffer: the Data Write Buffer placed above a data cache.
//
// A record queue of DEPTH records (destination word address, data, status
// flag) that accepts every processor write on NWP virtual write ports and
// passes the records on to the cache through NWP cache write ports when
// they hit. Records are kept in arrival order in a compacting queue: record
// 0 is the oldest. Each cycle the oldest records that hit in the cache
// drain, in order, up to NWP of them (drain_en low holds all of them, e.g.
// while a block is being filled). Draining strictly in order keeps two
// writes to one address in program order.
//
// Write miss ('allocate on write miss'): when the oldest record misses and
// its status flag is clear, it offers a write-miss reference (miss_*). Once
// that is taken the flag is set so the block is asked for only once. When
// the block has been filled, wake_* clears the flag of the oldest record if
// it belongs to that block, and the record drains on the next cycle it hits.
//
// Reads see the buffer: NRP lookup ports return, combinationally, whether
// a word address is held and the data of the youngest record for it.
//
// Timing: a record accepted in cycle c is visible to lookups and may drain
// from cycle c+1 (write latency one). enq_ready[i] is high when port i can
// be accepted given the ports below it. Queue order, drain width and the
// flag handling are described by the cache structure; the compacting
// shift queue and the handshakes are this design's choices. Write
// combining is not built (it was not enabled in the evaluated runs).
module data_write_buffer
  import hsa_cache_pkg::*;
#(
  parameter int DEPTH = 40,
  parameter int NWP   = 2,
  parameter int NRP   = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  // processor write ports
  input  logic   enq_valid [NWP],
  input  waddr_t enq_addr  [NWP],
  input  word_t  enq_data  [NWP],
  output logic   enq_ready [NWP],
  // read lookups
  input  waddr_t lk_addr [NRP],
  output logic   lk_hit  [NRP],
  output word_t  lk_data [NRP],
  // drain toward the cache
  output waddr_t head_addr [NWP],
  input  logic   head_hit  [NWP],
  input  logic   drain_en,
  output logic   cw_en   [NWP],
  output waddr_t cw_addr [NWP],
  output word_t  cw_data [NWP],
  // write miss
  output logic   miss_valid,
  output waddr_t miss_addr,
  input  logic   miss_ready,
  input  logic   wake_valid,
  input  baddr_t wake_blk,
  // status
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int CW = $clog2(DEPTH + 1);

  dwb_rec_t q [DEPTH];
  dwb_rec_t q_n [DEPTH];
  logic [CW-1:0] n_drain, n_enq, free;

  // ---- lookups: youngest matching record -------------------------------
  always_comb begin
    for (int r = 0; r < NRP; r++) begin
      lk_hit[r]  = 1'b0;
      lk_data[r] = '0;
      for (int i = 0; i < DEPTH; i++) begin
        if (CW'(i) < count && q[i].addr == lk_addr[r]) begin
          lk_hit[r]  = 1'b1;
          lk_data[r] = q[i].data;
        end
      end
    end
  end

  // ---- drain: oldest records that hit, in order ------------------------
  always_comb begin
    logic go;
    go      = drain_en;
    n_drain = '0;
    for (int p = 0; p < NWP; p++) begin
      head_addr[p] = q[p].addr;
      go = go && (CW'(p) < count) && head_hit[p];
      cw_en[p]   = go;
      cw_addr[p] = q[p].addr;
      cw_data[p] = q[p].data;
      if (go) n_drain = n_drain + 1'b1;
    end
  end

  // ---- write miss of the oldest record ----------------------------------
  assign miss_valid = (count != '0) && !head_hit[0] && !q[0].miss;
  assign miss_addr  = q[0].addr;

  // ---- enqueue ports -----------------------------------------------------
  always_comb begin
    free  = CW'(DEPTH) - count;
    n_enq = '0;
    for (int p = 0; p < NWP; p++) begin
      enq_ready[p] = (n_enq < free);
      if (enq_valid[p] && enq_ready[p]) n_enq = n_enq + 1'b1;
    end
  end

  // ---- next queue contents ------------------------------------------------
  always_comb begin
    dwb_rec_t head;
    logic [CW-1:0] k;
    head = q[0];
    if (miss_valid && miss_ready) head.miss = 1'b1;
    if (wake_valid && blk_of(q[0].addr) == wake_blk) head.miss = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      if (i == 0) q_n[i] = head;
      else        q_n[i] = q[i];
    end
    // remove the drained records
    if (n_drain != '0) begin
      for (int i = 0; i < DEPTH; i++)
        q_n[i] = (i + int'(n_drain) < DEPTH) ? q[i + int'(n_drain)] : q[i];
    end
    // append the accepted writes behind the remaining records
    k = count - n_drain;
    for (int p = 0; p < NWP; p++) begin
      if (enq_valid[p] && enq_ready[p]) begin
        for (int i = 0; i < DEPTH; i++)
          if (CW'(i) == k) q_n[i] = '{miss: 1'b0, addr: enq_addr[p], data: enq_data[p]};
        k = k + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      count <= count - n_drain + n_enq;
      for (int i = 0; i < DEPTH; i++) q[i] <= q_n[i];
    end
  end

  // A record that asks for its block cannot drain in the same cycle, and
  // the queue never holds more records than it has room for.
  a_miss_no_drain: assert property (@(posedge clk) disable iff (!rst_n)
                                    miss_valid |-> !cw_en[0]);
  a_no_overflow:   assert property (@(posedge clk) disable iff (!rst_n)
                                    count <= CW'(DEPTH));

endmodule
