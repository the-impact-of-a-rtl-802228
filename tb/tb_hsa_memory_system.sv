// tb_hsa_memory_system: end-to-end test of the whole memory hierarchy at
// its default (full) size: instruction cache, data-cache level, arbiter and
// ten-cycle main memory.
//
// Main memory is preloaded with a known pattern. The test fetches
// 16-instruction groups from a code region (many of them crossing a block
// boundary) and checks every instruction word, while it drives loads,
// stores and prefetches on the data ports and keeps a shadow copy of the
// data region. A fetch that did not miss must be answered one cycle after
// it was taken, and main memory must never start two accesses less than
// ten cycles apart. Every load must return the value its
// address held when the load was accepted, whether it comes back one cycle
// later (Data Write Buffer or cache hit) or later over the bypass line. A
// hit must be answered exactly one cycle after acceptance. The test counts
// each mechanism of the level (buffer hits, cache hits, misses, merged
// references, write misses, write-backs, bypass returns, full-buffer
// stalls, multi-record drains, prefetches, block reads answered by the
// write buffer above memory) and fails if one never occurs.
module tb_hsa_memory_system;
  import hsa_cache_pkg::*;

  localparam int NRP = 2, NWP = 2, FETCH_W = 16, MLAT = 10;
  localparam waddr_t CODE = waddr_t'(16'h8000);
  localparam int REGION = 2048;       // words exercised (4x the cache)
  localparam int NCYC   = 30000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    rd_valid [NRP]; waddr_t rd_addr [NRP]; id_t rd_id [NRP]; logic rd_ready [NRP];
  logic    rsp_valid [NRP]; id_t rsp_id [NRP]; word_t rsp_data [NRP];
  logic    wr_valid [NWP]; waddr_t wr_addr [NWP]; word_t wr_data [NWP]; logic wr_ready [NWP];
  logic    pf_valid, pf_ready; waddr_t pf_addr;
  logic    byp_valid; id_t byp_id; word_t byp_data;
  dcache_events_t ev;

  logic   if_valid, if_ready, if_rsp_valid, ic_miss, mwb_hit;
  waddr_t if_addr, if_rsp_addr;
  word_t  if_rsp_instr [FETCH_W];
  dcache_events_t dc_ev;

  hsa_memory_system dut (.*);

  function automatic word_t init_word(int a);
    return word_t'(a * 40503 + 17);
  endfunction

  // ------------------------------------------------- instruction fetch
  int n_fetch = 0, n_ic_miss = 0, n_cross = 0, n_mem_ops = 0, n_mwb_hit = 0;
  int f_acc_cycle, last_mem_start = -100;
  logic f_missed;
  always @(posedge clk) if (rst_n) begin
    if (if_rsp_valid) begin
      n_fetch++;
      if (if_rsp_addr[3:0] != 4'd0) n_cross++;
      for (int i = 0; i < FETCH_W; i++) begin
        checks++;
        if (if_rsp_instr[i] !== init_word(int'(if_rsp_addr) + i)) begin
          failures++;
          $display("FAIL fetch %h word %0d = %h", if_rsp_addr, i, if_rsp_instr[i]);
        end
      end
      checks++;
      if (!f_missed && f_acc_cycle != cyc - 1) begin
        failures++; $display("FAIL fetch hit latency");
      end
    end
    if (if_valid && if_ready) begin
      f_acc_cycle = cyc;
      f_missed = ic_miss;
      n_ic_miss += int'(ic_miss);
    end
    n_mwb_hit += int'(mwb_hit);
    if (dut.m_req_valid && dut.m_req_ready) begin
      n_mem_ops++;
      checks++;
      if (cyc - last_mem_start < MLAT) begin
        failures++; $display("FAIL memory started twice within %0d cycles", cyc - last_mem_start);
      end
      last_mem_start = cyc;
    end
  end

  assign ev = dc_ev;

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

  logic rd_acc [NRP], wr_acc [NWP], pf_acc, if_acc;
  always @(posedge clk) begin
    for (int i = 0; i < NRP; i++) rd_acc[i] = rd_valid[i] && rd_ready[i];
    for (int p = 0; p < NWP; p++) wr_acc[p] = wr_valid[p] && wr_ready[p];
    pf_acc = pf_valid && pf_ready;
    if_acc = if_valid && if_ready;
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
        dut.u_mem.mem[b][w] = init_word(b * BLOCK_WORDS + w);
        shadow[b * BLOCK_WORDS + w] = init_word(b * BLOCK_WORDS + w);
      end
    if_valid = 0; if_addr = 0;
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
      if (!(if_valid && !if_acc)) begin
        if_valid = ($urandom_range(0, 99) < 40);
        if_addr  = CODE + waddr_t'($urandom_range(0, 1023));
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
    if_valid = 0;
    repeat (3000) @(posedge clk);
    // directed: a dirty block is evicted while memory is busy with an
    // instruction fetch, and is read back before its write-back has left
    // the write buffer above memory
    for (int r = 0; r < 8; r++) begin
      waddr_t a, b;
      int id;
      a = waddr_t'(r * BLOCK_WORDS + 3);
      b = a + waddr_t'(32 * BLOCK_WORDS);          // same set, other block
      @(negedge clk);
      wr_valid[0] = 1'b1; wr_addr[0] = a; wr_data[0] = $urandom;
      do @(negedge clk); while (!wr_acc[0]);
      wr_valid[0] = 1'b0;
      repeat (100) @(negedge clk);
      id = free_id(r);
      rd_valid[0] = 1'b1; rd_addr[0] = b; rd_id[0] = id_t'(id); id_busy[id] = 1'b1;
      do @(negedge clk); while (!rd_acc[0]);
      rd_valid[0] = 1'b0;
      repeat (5) @(negedge clk);
      if_valid = 1'b1; if_addr = CODE + waddr_t'(2048 + r * 64);
      do @(negedge clk); while (!if_acc);
      if_valid = 1'b0;
      while (id_busy[id]) @(negedge clk);
      id = free_id(r + 1);
      rd_valid[0] = 1'b1; rd_addr[0] = a; rd_id[0] = id_t'(id); id_busy[id] = 1'b1;
      do @(negedge clk); while (!rd_acc[0]);
      rd_valid[0] = 1'b0;
      repeat (100) @(negedge clk);
    end
    for (int k = 0; k < (1 << ID_W); k++) begin
      checks++;
      if (id_busy[k]) begin failures++; $display("FAIL id %0d never returned", k); end
    end
    begin
      int cnt [16];
      string nm [16];
      cnt = '{n_dwb_hit, n_cache_hit, n_miss, n_merge, n_wmiss, n_wb, n_byp, n_wstall, n_drain2, n_pf, n_req,
              n_fetch, n_ic_miss, n_cross, n_mem_ops, n_mwb_hit};
      nm  = '{"dwb_hit", "cache_hit", "read_miss", "orb_merge", "write_miss", "write_back",
              "bypass", "write_stall", "dual_drain", "prefetch", "block_request",
              "fetch", "icache_miss", "fetch_across_blocks", "memory_access",
              "memory_buffer_hit"};
      for (int k = 0; k < 16; k++) begin
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
