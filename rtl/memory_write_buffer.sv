// memory_write_buffer: the write buffer that stages block writes in front of
// main memory, with lookup for block reads from the cache above.
//
// The cache above sends its dirty victims here (in_*). They wait in a record
// queue, oldest first, and drain to the memory port one at a time (out_*),
// in the order they arrived. Every block read from the cache above (rq_*) is
// compared against all records at once. If a record holds the block, the
// youngest such record answers: its data is copied into a one-entry return
// register and offered to the cache above on hr_*, from the next cycle,
// without a memory access (ev_hit pulses). Otherwise the read goes on to
// memory unchanged (fw_*).
//
// A read is held while a write-back is waiting to enter (in_valid). The
// cache above queues a victim before any later miss on the same block, so
// when a read is looked up here, every older write-back of its block is
// already in the queue. A read is also held while the return register is
// full and the read hits. A record is one whole block plus its block
// address; it needs no status flag, since memory has no misses.
//
// Following the document: a Data Write Buffer with a record queue sits above
// main memory as well as above each data cache, and holds 40 records.
// Own choices: records are whole blocks (write-backs are whole blocks);
// the read lookup and the return register; holding reads behind an entering
// write-back; and the valid/ready handshakes.
module memory_write_buffer
  import hsa_cache_pkg::*;
#(
  parameter int DEPTH = 40
) (
  input  logic     clk,
  input  logic     rst_n,
  // write-backs from the cache above
  input  logic     in_valid,
  output logic     in_ready,
  input  blk_wr_t  in_req,
  // block writes toward the memory port
  output logic     out_valid,
  input  logic     out_ready,
  output blk_wr_t  out_req,
  // block reads from the cache above
  input  logic     rq_valid,
  output logic     rq_ready,
  input  baddr_t   rq_blk,
  // reads that missed the buffer, toward the memory port
  output logic     fw_valid,
  input  logic     fw_ready,
  output baddr_t   fw_blk,
  // reads answered from the buffer
  output logic     hr_valid,
  input  logic     hr_ready,
  output blk_ret_t hr_ret,
  output logic     ev_hit,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = $clog2(DEPTH);

  blk_wr_t         q [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;
  logic            lk_hit;
  block_t          lk_data;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign in_ready  = int'(count) < DEPTH;
  assign out_valid = count != 0;
  assign out_req   = q[rd_ptr];

  // associative lookup, oldest to youngest so that the youngest match wins
  always_comb begin
    int idx;
    lk_hit  = 1'b0;
    lk_data = '0;
    for (int i = 0; i < DEPTH; i++) begin
      idx = int'(rd_ptr) + i;
      if (idx >= DEPTH) idx -= DEPTH;
      if (i < int'(count) && q[idx].blk == rq_blk) begin
        lk_hit  = 1'b1;
        lk_data = q[idx].data;
      end
    end
  end

  assign fw_valid = rq_valid && !in_valid && !lk_hit;
  assign fw_blk   = rq_blk;
  assign rq_ready = !in_valid && (lk_hit ? !hr_valid : fw_ready);
  assign ev_hit   = rq_valid && rq_ready && lk_hit;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) q[wr_ptr] <= in_req;
    if (ev_hit) hr_ret <= '{blk: rq_blk, data: lk_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      hr_valid <= 1'b0;
    end else begin
      if (in_valid && in_ready)   wr_ptr <= inc(wr_ptr);
      if (out_valid && out_ready) rd_ptr <= inc(rd_ptr);
      count <= count + (in_valid && in_ready) - (out_valid && out_ready);
      if (ev_hit)                     hr_valid <= 1'b1;
      else if (hr_valid && hr_ready)  hr_valid <= 1'b0;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    int'(count) <= DEPTH);
  a_hr_held: assert property (@(posedge clk) disable iff (!rst_n)
    hr_valid && !hr_ready |=> hr_valid && $stable(hr_ret));

endmodule
