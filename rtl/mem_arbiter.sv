// mem_arbiter: shares the single main-memory port between three
// requesters: data-cache write-backs (dw, from the write buffer above
// memory), instruction-cache block reads (ir) and data-cache block reads
// (dr).
//
// Fixed priority dw > ir > dr. Write-backs go first so that a block that was
// evicted dirty reaches memory soon after it leaves the cache, and the
// write buffer above memory stays short.
// The owner of a read is remembered and the memory response is steered back
// to it. Because the port is non-pipelined only one read is ever in flight.
// The priority order is this design's choice; the memory system only states
// that main memory has one read/write port. Purely combinational except for
// the owner register.
module mem_arbiter
  import hsa_cache_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // data-cache write-backs
  input  logic    dw_valid,
  output logic    dw_ready,
  input  blk_wr_t dw_req,
  // instruction-cache block reads
  input  logic    ir_valid,
  output logic    ir_ready,
  input  baddr_t  ir_blk,
  output logic    ir_rsp_valid,
  input  logic    ir_rsp_ready,
  // data-cache block reads
  input  logic    dr_valid,
  output logic    dr_ready,
  input  baddr_t  dr_blk,
  output logic    dr_rsp_valid,
  input  logic    dr_rsp_ready,
  // shared response data
  output baddr_t  rsp_blk,
  output block_t  rsp_data,
  // memory port
  output logic    m_req_valid,
  input  logic    m_req_ready,
  output logic    m_req_write,
  output baddr_t  m_req_blk,
  output block_t  m_req_data,
  input  logic    m_rsp_valid,
  output logic    m_rsp_ready,
  input  baddr_t  m_rsp_blk,
  input  block_t  m_rsp_data
);
  logic owner_i;  // 1: the read in flight belongs to the instruction cache

  always_comb begin
    m_req_valid = dw_valid || ir_valid || dr_valid;
    m_req_write = dw_valid;
    m_req_data  = dw_req.data;
    dw_ready = 1'b0;
    ir_ready = 1'b0;
    dr_ready = 1'b0;
    if (dw_valid) begin
      m_req_blk = dw_req.blk;
      dw_ready  = m_req_ready;
    end else if (ir_valid) begin
      m_req_blk = ir_blk;
      ir_ready  = m_req_ready;
    end else begin
      m_req_blk = dr_blk;
      dr_ready  = m_req_ready && dr_valid;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      owner_i <= 1'b0;
    else if (ir_valid && ir_ready)   owner_i <= 1'b1;
    else if (dr_valid && dr_ready)   owner_i <= 1'b0;
  end

  assign ir_rsp_valid = m_rsp_valid &&  owner_i;
  assign dr_rsp_valid = m_rsp_valid && !owner_i;
  assign m_rsp_ready  = owner_i ? ir_rsp_ready : dr_rsp_ready;
  assign rsp_blk      = m_rsp_blk;
  assign rsp_data     = m_rsp_data;

endmodule
