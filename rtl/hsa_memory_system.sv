// hsa_memory_system: the memory hierarchy of a statically scheduled,
// in-order-issue superscalar processor (the Hatfield Superscalar
// Architecture), with a realistic cache structure in place of a perfect one.
//
// It holds a first-level instruction cache (icache), a first-level
// non-blocking data-cache level (dcache: Data Write Buffer, Outstanding
// References Buffer, direct-mapped write-back cache, single bypass return
// line) and a main memory with one non-pipelined port (ten cycles per
// block read or write), shared through mem_arbiter. Dirty blocks written
// back by the data cache wait in a second write buffer above main memory
// (memory_write_buffer); a data-cache block read that finds its block there
// is answered from it without a memory access (mwb_hit pulses), and a
// returned block from memory takes precedence over one from that buffer.
// The processor itself is
// outside: its fetch, load, store and prefetch requests and the returned
// instructions and data are the ports of this module.
//
// Defaults are the main evaluated configuration ('Standard Model', 2 KB
// caches): 32 sets of 16-word blocks in each cache, 2 data read and 2 data
// write ports, 40-record Data Write Buffer and Outstanding References
// Buffer, 16-instruction fetch width and a ten-cycle memory. The buffer
// above memory also holds 40 records (MWB_DEPTH), here whole blocks. Setting
// NRP = NWP = 16 gives the 'Maximal Model' port count. ACC_LAT sets the
// cache access time: 1 cycle (default, the zero and one branch-delay-slot
// configurations) or 2 cycles, pipelined (the two-delay-slot one). The memory size and
// the handshakes are this design's choices (see the submodules).
module hsa_memory_system
  import hsa_cache_pkg::*;
#(
  parameter int DSETS     = 32,
  parameter int ISETS     = 32,
  parameter int NRP       = 2,
  parameter int NWP       = 2,
  parameter int FETCH_W   = 16,
  parameter int DWB_DEPTH = 40,
  parameter int ORB_DEPTH = 40,
  parameter int LQ_DEPTH  = 4,
  parameter int MWB_DEPTH = 40,
  parameter int MEM_LAT   = 10,
  parameter int ACC_LAT   = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  // instruction fetch
  input  logic   if_valid,
  input  waddr_t if_addr,
  output logic   if_ready,
  output logic   if_rsp_valid,
  output waddr_t if_rsp_addr,
  output word_t  if_rsp_instr [FETCH_W],
  output logic   ic_miss,
  // data reads
  input  logic   rd_valid [NRP],
  input  waddr_t rd_addr  [NRP],
  input  id_t    rd_id    [NRP],
  output logic   rd_ready [NRP],
  output logic   rsp_valid [NRP],
  output id_t    rsp_id    [NRP],
  output word_t  rsp_data  [NRP],
  // data writes
  input  logic   wr_valid [NWP],
  input  waddr_t wr_addr  [NWP],
  input  word_t  wr_data  [NWP],
  output logic   wr_ready [NWP],
  // prefetch
  input  logic   pf_valid,
  input  waddr_t pf_addr,
  output logic   pf_ready,
  // bypass return of loads that missed
  output logic   byp_valid,
  output id_t    byp_id,
  output word_t  byp_data,
  // data-cache event pulses
  output dcache_events_t dc_ev,
  output logic   mwb_hit
);
  // data cache <-> arbiter
  logic     d_mrd_valid, d_mrd_ready, d_mwr_valid, d_mwr_ready;
  baddr_t   d_mrd_blk;
  blk_wr_t  d_mwr_req;
  logic     d_ret_valid, d_ret_ready;
  blk_ret_t d_ret;
  logic     a_dr_valid, a_dr_ready, a_dw_valid, a_dw_ready;
  logic     a_dr_rsp_valid, a_dr_rsp_ready, h_valid, h_ready;
  baddr_t   a_dr_blk;
  blk_wr_t  a_dw_req;
  blk_ret_t h_ret;
  // instruction cache <-> arbiter
  logic     i_req_valid, i_req_ready, i_rsp_valid, i_rsp_ready;
  baddr_t   i_req_blk;
  // shared response
  baddr_t   a_rsp_blk;
  block_t   a_rsp_data;
  // arbiter <-> memory
  logic     m_req_valid, m_req_ready, m_req_write, m_rsp_valid, m_rsp_ready;
  baddr_t   m_req_blk, m_rsp_blk;
  block_t   m_req_data, m_rsp_data;

  icache #(.SETS(ISETS), .FETCH_W(FETCH_W), .ACC_LAT(ACC_LAT)) u_icache (
    .clk, .rst_n,
    .f_valid(if_valid), .f_addr(if_addr), .f_ready(if_ready),
    .rsp_valid(if_rsp_valid), .rsp_addr(if_rsp_addr), .rsp_instr(if_rsp_instr),
    .ev_miss(ic_miss),
    .m_req_valid(i_req_valid), .m_req_blk(i_req_blk), .m_req_ready(i_req_ready),
    .m_rsp_valid(i_rsp_valid), .m_rsp_blk(a_rsp_blk), .m_rsp_data(a_rsp_data),
    .m_rsp_ready(i_rsp_ready)
  );

  dcache #(
    .SETS(DSETS), .NRP(NRP), .NWP(NWP),
    .DWB_DEPTH(DWB_DEPTH), .ORB_DEPTH(ORB_DEPTH), .LQ_DEPTH(LQ_DEPTH),
    .ACC_LAT(ACC_LAT)
  ) u_dcache (
    .clk, .rst_n,
    .rd_valid, .rd_addr, .rd_id, .rd_ready,
    .rsp_valid, .rsp_id, .rsp_data,
    .wr_valid, .wr_addr, .wr_data, .wr_ready,
    .pf_valid, .pf_addr, .pf_ready,
    .byp_valid, .byp_id, .byp_data,
    .mrd_valid(d_mrd_valid), .mrd_blk(d_mrd_blk), .mrd_ready(d_mrd_ready),
    .mwr_valid(d_mwr_valid), .mwr_req(d_mwr_req), .mwr_ready(d_mwr_ready),
    .mret_valid(d_ret_valid), .mret(d_ret),
    .mret_ready(d_ret_ready),
    .ev(dc_ev)
  );

  memory_write_buffer #(.DEPTH(MWB_DEPTH)) u_mwb (
    .clk, .rst_n,
    .in_valid(d_mwr_valid), .in_ready(d_mwr_ready), .in_req(d_mwr_req),
    .out_valid(a_dw_valid), .out_ready(a_dw_ready), .out_req(a_dw_req),
    .rq_valid(d_mrd_valid), .rq_ready(d_mrd_ready), .rq_blk(d_mrd_blk),
    .fw_valid(a_dr_valid), .fw_ready(a_dr_ready), .fw_blk(a_dr_blk),
    .hr_valid(h_valid), .hr_ready(h_ready), .hr_ret(h_ret),
    .ev_hit(mwb_hit), .count()
  );

  // returned blocks for the data cache: from memory first, else from the
  // write buffer's return register
  assign d_ret_valid    = a_dr_rsp_valid || h_valid;
  assign d_ret          = a_dr_rsp_valid ? '{blk: a_rsp_blk, data: a_rsp_data} : h_ret;
  assign a_dr_rsp_ready = d_ret_ready;
  assign h_ready        = d_ret_ready && !a_dr_rsp_valid;

  mem_arbiter u_arb (
    .clk, .rst_n,
    .dw_valid(a_dw_valid), .dw_ready(a_dw_ready), .dw_req(a_dw_req),
    .ir_valid(i_req_valid), .ir_ready(i_req_ready), .ir_blk(i_req_blk),
    .ir_rsp_valid(i_rsp_valid), .ir_rsp_ready(i_rsp_ready),
    .dr_valid(a_dr_valid), .dr_ready(a_dr_ready), .dr_blk(a_dr_blk),
    .dr_rsp_valid(a_dr_rsp_valid), .dr_rsp_ready(a_dr_rsp_ready),
    .rsp_blk(a_rsp_blk), .rsp_data(a_rsp_data),
    .m_req_valid, .m_req_ready, .m_req_write, .m_req_blk, .m_req_data,
    .m_rsp_valid, .m_rsp_ready, .m_rsp_blk, .m_rsp_data
  );

  main_memory #(.LATENCY(MEM_LAT)) u_mem (
    .clk, .rst_n,
    .req_valid(m_req_valid), .req_ready(m_req_ready), .req_write(m_req_write),
    .req_blk(m_req_blk), .req_data(m_req_data),
    .rsp_valid(m_rsp_valid), .rsp_ready(m_rsp_ready),
    .rsp_blk(m_rsp_blk), .rsp_data(m_rsp_data)
  );

endmodule
