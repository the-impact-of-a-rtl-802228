// tb_dcache: self-checking random test of one data-cache level.
//
// Drives loads, stores and prefetches on all ports against a behavioural
// next level (write-backs served before block reads, fixed latency) and
// keeps a shadow copy of memory. Every load must return the value its
// address held when the load was accepted, whether it comes back one cycle
// later (Data Write Buffer or cache hit) or later over the bypass line. A
// hit must be answered exactly one cycle after acceptance. The test counts
// each mechanism of the level (buffer hits, cache hits, misses, merged
// references, write misses, write-backs, bypass returns, full-buffer
// stalls, multi-record drains, prefetches) and fails if one never occurs.
module tb_dcache;
  import hsa_cache_pkg::*;

  localparam int NRP = 2, NWP = 2, MLAT = 6;
  localparam int REGION = 2048;       // words exercised (4x the cache)
  localparam int NCYC   = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    rd_valid [NRP]; waddr_t rd_addr [NRP]; id_t rd_id [NRP]; logic rd_ready [NRP];
  logic    rsp_valid [NRP]; id_t rsp_id [NRP]; word_t rsp_data [NRP];
  logic    wr_valid [NWP]; waddr_t wr_addr [NWP]; word_t wr_data [NWP]; logic wr_ready [NWP];
  logic    pf_valid, pf_ready; waddr_t pf_addr;
  logic    byp_valid; id_t byp_id; word_t byp_data;
  logic    mrd_valid, mrd_ready, mwr_valid, mwr_ready, mret_valid, mret_ready;
  baddr_t  mrd_blk; blk_wr_t mwr_req; blk_ret_t mret;
  dcache_events_t ev;

  dcache #(.NRP(NRP), .NWP(NWP)) dut (.*);

  // ---------------------------------------------------------- next level
  block_t lower [1 << BLK_W];
  int     busy;       // cycles left on the current access
  logic   rd_pending;
  baddr_t rd_blk_q;
  assign mwr_ready  = (busy == 0) && !mret_valid && !rd_pending;
  assign mrd_ready  = (busy == 0) && !mret_valid && !rd_pending && !mwr_valid;
  always @(posedge clk) begin
    if (!rst_n) begin
      busy <= 0; rd_pending <= 1'b0; mret_valid <= 1'b0;
    end else begin
      if (busy > 0) busy <= busy - 1;
      if (mwr_valid && mwr_ready) begin
        lower[mwr_req.blk] <= mwr_req.data;
        busy <= MLAT;
      end else if (mrd_valid && mrd_ready) begin
        rd_pending <= 1'b1; rd_blk_q <= mrd_blk; busy <= MLAT;
      end
      if (rd_pending && busy == 1) begin
        mret_valid <= 1'b1;
        mret <= '{blk: rd_blk_q, data: lower[rd_blk_q]};
        rd_pending <= 1'b0;
      end
      if (mret_valid && mret_ready) mret_valid <= 1'b0;
    end
  end

  // -------------------------------------------------------------- shadow
  word_t shadow [1 << AW];
  word_t expect_v [1 << ID_W];
  logic  id_busy [1 << ID_W];
  int    acc_cycle [1 << ID_W];
  int    cyc = 0;
  int    checks = 0, failures = 0;
  int    n_dwb_hit = 0, n_cache_hit = 0, n_miss = 0, n_merge = 0, n_wmiss = 0,
         n_wb = 0, n_byp = 0, n_wstall = 0, n_drain2 = 0, n_pf = 0, n_req = 0;

  always @(posedge clk) cyc <= cyc + 1;

  logic rd_acc [NRP], wr_acc [NWP], pf_acc;
  always @(posedge clk) begin
    for (int i = 0; i < NRP; i++) rd_acc[i] = rd_valid[i] && rd_ready[i];
    for (int p = 0; p < NWP; p++) wr_acc[p] = wr_valid[p] && wr_ready[p];
    pf_acc = pf_valid && pf_ready;
  end

  always @(posedge clk) if (rst_n) begin
    // responses first (they belong to reads accepted earlier)
    for (int i = 0; i < NRP; i++) if (rsp_valid[i]) begin
      checks++;
      if (!id_busy[rsp_id[i]] || rsp_data[i] !== expect_v[rsp_id[i]] ||
          acc_cycle[rsp_id[i]] != cyc - 1) begin
        failures++;
        $display("FAIL hit rsp port %0d id %0d data %h exp %h", i, rsp_id[i], rsp_data[i], expect_v[rsp_id[i]]);
      end
      id_busy[rsp_id[i]] = 1'b0;
    end
    if (byp_valid) begin
      checks++;
      if (!id_busy[byp_id] || byp_data !== expect_v[byp_id]) begin
        failures++;
        $display("FAIL bypass id %0d data %h exp %h", byp_id, byp_data, expect_v[byp_id]);
      end
      id_busy[byp_id] = 1'b0;
    end
    // accepted reads see memory before this cycle's writes
    for (int i = 0; i < NRP; i++) if (rd_valid[i] && rd_ready[i]) begin
      id_busy[rd_id[i]]   = 1'b1;
      expect_v[rd_id[i]]  = shadow[rd_addr[i]];
      acc_cycle[rd_id[i]] = cyc;
    end
    for (int p = 0; p < NWP; p++) if (wr_valid[p] && wr_ready[p]) shadow[wr_addr[p]] = wr_data[p];
    n_dwb_hit   += int'(ev.dwb_read_hit[0]) + int'(ev.dwb_read_hit[1]);
    n_cache_hit += int'(ev.cache_read_hit[0]) + int'(ev.cache_read_hit[1]);
    n_miss  += int'(ev.read_miss);
    n_merge += int'(ev.orb_merge);
    n_wmiss += int'(ev.write_miss);
    n_wb    += int'(ev.write_back);
    n_byp   += int'(ev.bypass_return);
    n_wstall += int'(ev.write_stall);
    n_drain2 += int'(ev.dual_drain);
    n_pf    += int'(ev.prefetch);
    n_req   += int'(ev.block_request);
  end

  // ---------------------------------------------------------- stimulus
  function automatic waddr_t pick_addr(int mode);
    if (mode == 0) return waddr_t'($urandom_range(0, 47));          // hot words
    return waddr_t'($urandom_range(0, REGION - 1));
  endfunction

  function automatic int free_id(int skip);
    for (int k = 0; k < (1 << ID_W); k++) begin
      int j = (k * 7 + skip) % (1 << ID_W);
      if (!id_busy[j]) return j;
    end
    return -1;
  endfunction

  int phase;
  initial begin
    for (int b = 0; b < (1 << BLK_W); b++)
      for (int w = 0; w < BLOCK_WORDS; w++) begin
        lower[b][w] = word_t'(b * 131 + w * 7 + 1);
        shadow[b * BLOCK_WORDS + w] = word_t'(b * 131 + w * 7 + 1);
      end
    for (int k = 0; k < (1 << ID_W); k++) id_busy[k] = 1'b0;
    for (int i = 0; i < NRP; i++) begin rd_valid[i] = 0; rd_addr[i] = 0; rd_id[i] = 0; end
    for (int p = 0; p < NWP; p++) begin wr_valid[p] = 0; wr_addr[p] = 0; wr_data[p] = 0; end
    pf_valid = 0; pf_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      phase = (c / 2000) % 3;   // 0: mixed, 1: store burst, 2: load heavy
      for (int i = 0; i < NRP; i++) begin
        int id;
        if (rd_valid[i] && !rd_acc[i]) continue;   // hold a refused read
        id = free_id(c + i * 13);
        rd_valid[i] = (phase != 1) && ($urandom_range(0, 99) < 60) && (id >= 0) &&
                      !(i == 1 && rd_valid[0] && rd_id[0] == id_t'(id));
        rd_addr[i]  = pick_addr($urandom_range(0, 1));
        rd_id[i]    = id_t'(id < 0 ? 0 : id);
        if (rd_valid[i]) id_busy[rd_id[i]] = 1'b1;  // reserve; released on return
      end
      for (int p = 0; p < NWP; p++) begin
        if (wr_valid[p] && !wr_acc[p]) continue;
        wr_valid[p] = ($urandom_range(0, 99) < (phase == 1 ? 95 : 30));
        wr_addr[p]  = pick_addr(phase == 1 ? 1 : $urandom_range(0, 1));
        wr_data[p]  = $urandom;
      end
      if (!(pf_valid && !pf_acc)) begin
        pf_valid = ($urandom_range(0, 99) < 5);
        pf_addr  = pick_addr(1);
      end
    end
    // let everything drain
    @(negedge clk);
    for (int i = 0; i < NRP; i++) if (rd_valid[i] && !rd_acc[i]) id_busy[rd_id[i]] = 1'b0;
    for (int i = 0; i < NRP; i++) rd_valid[i] = 0;
    for (int p = 0; p < NWP; p++) wr_valid[p] = 0;
    pf_valid = 0;
    repeat (3000) @(posedge clk);
    for (int k = 0; k < (1 << ID_W); k++) begin
      checks++;
      if (id_busy[k]) begin failures++; $display("FAIL id %0d never returned", k); end
    end
    begin
      int cnt [11];
      string nm [11];
      cnt = '{n_dwb_hit, n_cache_hit, n_miss, n_merge, n_wmiss, n_wb, n_byp, n_wstall, n_drain2, n_pf, n_req};
      nm  = '{"dwb_hit", "cache_hit", "read_miss", "orb_merge", "write_miss", "write_back",
              "bypass", "write_stall", "dual_drain", "prefetch", "block_request"};
      for (int k = 0; k < 11; k++) begin
        $display("event %s = %0d", nm[k], cnt[k]);
        checks++;
        if (cnt[k] == 0) begin failures++; $display("FAIL event %s never happened", nm[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
