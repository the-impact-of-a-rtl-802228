// icache: first-level instruction cache.
//
// Direct-mapped, SETS sets of one 16-word block, read-only. A fetch asks
// for FETCH_W consecutive instruction words starting at any word address;
// the group may run across a block boundary, so it is taken from up to two
// adjacent blocks (FETCH_W <= 16). When both blocks are present the group
// is delivered on rsp_* ACC_LAT cycles after the request (access time of
// one cycle by default, two for the slower configuration; pipelined).
// Otherwise the cache requests the missing block(s) from the next level one
// at a time and installs each returned block. When the last missing block
// returns, the group is taken over the bypass (return) line: it is built
// from the returned block itself while the block is being installed, and
// is delivered ACC_LAT cycles after the return. No new fetch is taken in the
// meantime (the fetch stage stalls). ev_miss pulses when a fetch is found
// missing.
//
// Direct mapping, 64-byte blocks, a fetch width of 16, fetches that may
// cross block boundaries and a bypass line beside each cache follow the
// evaluated configuration. Serving misses one block at a time and stalling
// fetch until the group is complete are this design's choices.
module icache
  import hsa_cache_pkg::*;
#(
  parameter int SETS    = 32,
  parameter int FETCH_W = 16,
  parameter int ACC_LAT = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  // fetch request
  input  logic   f_valid,
  input  waddr_t f_addr,
  output logic   f_ready,
  output logic   rsp_valid,
  output waddr_t rsp_addr,
  output word_t  rsp_instr [FETCH_W],
  output logic   ev_miss,
  // next level
  output logic   m_req_valid,
  output baddr_t m_req_blk,
  input  logic   m_req_ready,
  input  logic   m_rsp_valid,
  input  baddr_t m_rsp_blk,
  input  block_t m_rsp_data,
  output logic   m_rsp_ready
);
  localparam int SET_W = $clog2(SETS);
  localparam int TAG_W = BLK_W - SET_W;
  typedef logic [SET_W-1:0] set_t;
  typedef logic [TAG_W-1:0] tag_t;
  typedef enum logic [1:0] {I_IDLE, I_MISS, I_WAIT} istate_e;

  logic [SETS-1:0] valid;
  tag_t            tags [SETS];
  block_t          data [SETS];

  istate_e state;
  waddr_t  addr_q;
  waddr_t  la;
  baddr_t  b0, b1;
  logic    hit0, hit1, hit;
  logic    ret0, ret1, byp;

  function automatic set_t set_of(baddr_t b);
    return b[SET_W-1:0];
  endfunction
  function automatic tag_t tag_of(baddr_t b);
    return b[BLK_W-1:SET_W];
  endfunction

  assign la   = (state == I_IDLE) ? f_addr : addr_q;
  assign b0   = blk_of(la);
  assign b1   = blk_of(la + waddr_t'(FETCH_W - 1));
  assign hit0 = valid[set_of(b0)] && tags[set_of(b0)] == tag_of(b0);
  assign hit1 = valid[set_of(b1)] && tags[set_of(b1)] == tag_of(b1);
  assign hit  = hit0 && hit1;

  assign f_ready     = (state == I_IDLE);
  assign m_req_valid = (state == I_MISS) && !hit;
  assign m_req_blk   = hit0 ? b1 : b0;
  assign m_rsp_ready = (state == I_WAIT);
  assign ev_miss     = (state == I_IDLE) && f_valid && !hit;

  // Bypass: the returned block is one of the group's blocks and the other
  // one (if different) is already present.
  assign ret0 = (state == I_WAIT) && m_rsp_valid && m_rsp_blk == b0;
  assign ret1 = (state == I_WAIT) && m_rsp_valid && m_rsp_blk == b1;
  assign byp  = (ret0 && (ret1 || hit1)) || (ret1 && hit0);

  // Instruction group: word i comes from the first block while the offset
  // stays inside it, otherwise from the next block.
  word_t group [FETCH_W];
  always_comb begin
    block_t row0, row1;
    logic [OFF_W:0] idx;
    row0 = ret0 ? m_rsp_data : data[set_of(b0)];
    row1 = ret1 ? m_rsp_data : data[set_of(b1)];
    for (int i = 0; i < FETCH_W; i++) begin
      idx = {1'b0, off_of(la)} + (OFF_W + 1)'(i);
      group[i] = idx[OFF_W] ? row1[idx[OFF_W-1:0]] : row0[idx[OFF_W-1:0]];
    end
  end

  logic deliver;
  assign deliver = ((state == I_IDLE) && f_valid && hit) || ((state == I_MISS) && hit) || byp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= I_IDLE;
      addr_q    <= '0;
      valid     <= '0;
    end else begin
      unique case (state)
        I_IDLE: if (f_valid && !hit) begin
                  addr_q <= f_addr;
                  state  <= I_MISS;
                end
        I_MISS: if (hit) state <= I_IDLE;
                else if (m_req_ready) state <= I_WAIT;
        I_WAIT: if (m_rsp_valid) begin
                  valid[set_of(m_rsp_blk)] <= 1'b1;
                  state <= byp ? I_IDLE : I_MISS;
                end
        default: state <= I_IDLE;
      endcase
    end
  end

  // Output pipeline: one register per cycle of access time.
  logic   op_valid [ACC_LAT];
  waddr_t op_addr  [ACC_LAT];
  word_t  op_instr [ACC_LAT][FETCH_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < ACC_LAT; s++) begin
        op_valid[s] <= 1'b0;
        op_addr[s]  <= '0;
        for (int i = 0; i < FETCH_W; i++) op_instr[s][i] <= '0;
      end
    end else begin
      op_valid[0] <= deliver;
      if (deliver) begin
        op_addr[0] <= la;
        for (int i = 0; i < FETCH_W; i++) op_instr[0][i] <= group[i];
      end
      for (int s = 1; s < ACC_LAT; s++) begin
        op_valid[s] <= op_valid[s-1];
        op_addr[s]  <= op_addr[s-1];
        for (int i = 0; i < FETCH_W; i++) op_instr[s][i] <= op_instr[s-1][i];
      end
    end
  end

  always_comb begin
    rsp_valid = op_valid[ACC_LAT-1];
    rsp_addr  = op_addr[ACC_LAT-1];
    for (int i = 0; i < FETCH_W; i++) rsp_instr[i] = op_instr[ACC_LAT-1][i];
  end

  always_ff @(posedge clk) begin
    if (state == I_WAIT && m_rsp_valid) begin
      tags[set_of(m_rsp_blk)] <= tag_of(m_rsp_blk);
      data[set_of(m_rsp_blk)] <= m_rsp_data;
    end
  end

endmodule
