// main_memory: the bottom of the hierarchy, one non-pipelined read/write
// port that satisfies a single block read or write every LATENCY (ten)
// processor cycles.
//
// A request (req_valid && req_ready) accepted in cycle c keeps the port
// busy for LATENCY cycles. A write is stored at the end of cycle
// c+LATENCY-1 and the port accepts the next request in cycle c+LATENCY.
// A read returns its block with rsp_valid from cycle c+LATENCY and holds it
// until rsp_ready; the port is free again the cycle after that. The ten
// cycles and the single port follow the evaluated configuration; treating
// one 64-byte block as one access, the block-wide array and the
// valid/ready handshake are this design's choices. The response carries
// the block address so the requester can match it. LATENCY must be >= 2.
module main_memory
  import hsa_cache_pkg::*;
#(
  parameter int LATENCY = 10,
  parameter int BLOCKS  = 1 << BLK_W
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   req_valid,
  output logic   req_ready,
  input  logic   req_write,
  input  baddr_t req_blk,
  input  block_t req_data,
  output logic   rsp_valid,
  input  logic   rsp_ready,
  output baddr_t rsp_blk,
  output block_t rsp_data
);
  localparam int CW = $clog2(LATENCY + 1);
  typedef enum logic [1:0] {M_IDLE, M_BUSY, M_RESP} mstate_e;

  block_t   mem [BLOCKS];
  mstate_e  state;
  logic [CW-1:0] cnt;
  logic     wr_q;
  baddr_t   blk_q;
  block_t   data_q;

  assign req_ready = (state == M_IDLE);
  assign rsp_valid = (state == M_RESP);
  assign rsp_blk   = blk_q;
  assign rsp_data  = data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= M_IDLE;
      cnt   <= '0;
      wr_q  <= 1'b0;
      blk_q <= '0;
    end else begin
      unique case (state)
        M_IDLE: if (req_valid) begin
          state <= M_BUSY;
          cnt   <= CW'(LATENCY - 1);
          wr_q  <= req_write;
          blk_q <= req_blk;
        end
        M_BUSY: if (cnt == CW'(1)) state <= wr_q ? M_IDLE : M_RESP;
                else cnt <= cnt - 1'b1;
        M_RESP: if (rsp_ready) state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end

  // Storage: write data is captured at acceptance, the array is updated
  // (or read) on the last busy cycle.
  block_t wdata_q;
  always_ff @(posedge clk) begin
    if (state == M_IDLE && req_valid) wdata_q <= req_data;
    if (state == M_BUSY && cnt == CW'(1)) begin
      if (wr_q) mem[blk_q] <= wdata_q;
      else      data_q     <= mem[blk_q];
    end
  end

endmodule
