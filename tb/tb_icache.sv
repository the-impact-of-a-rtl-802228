// tb_icache: random 16-instruction fetches over a code region three times
// the cache size, served by a behavioural next level with a ten-cycle
// latency. Checks every instruction word, that a fetch which hits is
// answered one cycle after it was taken, that a fetch which missed is
// answered over the bypass line one cycle after its last block returned,
// and that fetches across a block boundary and fetches needing two block
// refills both occur.
module tb_icache;
  import hsa_cache_pkg::*;
  localparam int SETS = 32, FETCH_W = 16, LAT = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic f_valid, f_ready, rsp_valid, ev_miss;
  waddr_t f_addr, rsp_addr;
  word_t rsp_instr [FETCH_W];
  logic m_req_valid, m_req_ready, m_rsp_valid, m_rsp_ready;
  baddr_t m_req_blk, m_rsp_blk; block_t m_rsp_data;
  icache #(.SETS(SETS), .FETCH_W(FETCH_W)) dut (.*);

  function automatic word_t instr(int a); return word_t'(a * 2654435 + 99); endfunction

  // next level
  int busy = 0; baddr_t blk_q; int n_refill = 0;
  assign m_req_ready = (busy == 0) && !m_rsp_valid;
  always @(posedge clk) begin
    if (!rst_n) begin busy <= 0; m_rsp_valid <= 0; end
    else begin
      if (m_req_valid && m_req_ready) begin busy <= LAT; blk_q <= m_req_blk; n_refill++; end
      else if (busy > 1) busy <= busy - 1;
      else if (busy == 1) begin
        busy <= 0; m_rsp_valid <= 1; m_rsp_blk <= blk_q;
        for (int w = 0; w < BLOCK_WORDS; w++) m_rsp_data[w] <= instr(int'(blk_q) * BLOCK_WORDS + w);
      end
      if (m_rsp_valid && m_rsp_ready) m_rsp_valid <= 0;
    end
  end

  int checks = 0, failures = 0, cyc = 0, n_fetch = 0, n_cross = 0, n_miss = 0, n_double = 0;
  int acc_cyc, refill_at_acc; logic acc_miss; logic pend = 0;
  int ret_cyc = -100;
  always @(posedge clk) if (m_rsp_valid && m_rsp_ready) ret_cyc <= cyc;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n) begin
    if (rsp_valid) begin
      checks++;
      if (!pend) begin failures++; $display("FAIL unexpected response"); end
      if (rsp_addr != f_addr) begin failures++; $display("FAIL response address"); end
      for (int i = 0; i < FETCH_W; i++) begin
        checks++;
        if (rsp_instr[i] != instr(int'(rsp_addr) + i)) begin failures++; $display("FAIL word %0d", i); end
      end
      checks++;
      if (!acc_miss && cyc != acc_cyc + 1) begin failures++; $display("FAIL hit latency"); end
      if (acc_miss && cyc != ret_cyc + 1) begin failures++; $display("FAIL bypass latency"); end
      if (acc_miss && n_refill - refill_at_acc == 2) n_double++;
      pend = 0; n_fetch++;
      if (rsp_addr[3:0] != 0) n_cross++;
    end
    if (f_valid && f_ready) begin
      pend = 1; acc_cyc = cyc; acc_miss = ev_miss; refill_at_acc = n_refill;
      if (ev_miss) n_miss++;
    end
  end

  initial begin
    f_valid = 0; f_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      f_valid = 1;
      f_addr = waddr_t'(16'h4000 + ((t % 3 == 0) ? $urandom_range(0, 3 * SETS * BLOCK_WORDS - 1)
                                                  : $urandom_range(0, 255)));
      @(posedge clk);
      while (!(f_valid && f_ready)) @(posedge clk);
      @(negedge clk); f_valid = 0;
      while (pend) @(posedge clk);
    end
    checks++;
    if (n_cross == 0 || n_miss == 0 || n_double == 0 || n_miss == n_fetch) begin
      failures++; $display("FAIL coverage cross %0d miss %0d double %0d", n_cross, n_miss, n_double);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
