// tb_data_write_buffer: random writes, cache-hit patterns, drain enables,
// write-miss hand-offs and wake-ups against a record-queue model. Checks
// every cycle: accepted ports, youngest-record read lookups, in-order drain
// of up to NWP hitting records, the write-miss request of the oldest record
// (made once, until woken) and the record count; also that a record is
// visible to reads the cycle after it was written.
module tb_data_write_buffer;
  import hsa_cache_pkg::*;
  localparam int DEPTH = 8, NWP = 2, NRP = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic enq_valid [NWP]; waddr_t enq_addr [NWP]; word_t enq_data [NWP]; logic enq_ready [NWP];
  waddr_t lk_addr [NRP]; logic lk_hit [NRP]; word_t lk_data [NRP];
  waddr_t head_addr [NWP]; logic head_hit [NWP]; logic drain_en;
  logic cw_en [NWP]; waddr_t cw_addr [NWP]; word_t cw_data [NWP];
  logic miss_valid, miss_ready, wake_valid; waddr_t miss_addr; baddr_t wake_blk;
  logic [$clog2(DEPTH+1)-1:0] count;
  data_write_buffer #(.DEPTH(DEPTH), .NWP(NWP), .NRP(NRP)) dut (.*);

  dwb_rec_t model [$];
  logic present [8];   // which of blocks 0..7 "are in the cache"
  int checks = 0, failures = 0, n_full = 0, n_drain2 = 0, n_miss = 0, n_lkhit = 0, n_wake = 0;
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int b = 0; b < 8; b++) present[b] = 0;
    for (int p = 0; p < NWP; p++) begin enq_valid[p] = 0; enq_addr[p] = 0; enq_data[p] = 0; end
    for (int r = 0; r < NRP; r++) lk_addr[r] = 0;
    drain_en = 0; miss_ready = 0; wake_valid = 0; wake_blk = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 10000; t++) begin
      int free, nacc, nd;
      logic go, mv;
      @(negedge clk);
      if ($urandom_range(0, 9) == 0) present[$urandom_range(0, 7)] = $urandom_range(0, 1);
      for (int p = 0; p < NWP; p++) begin
        enq_valid[p] = ($urandom_range(0, 99) < ((t / 1000) % 2 ? 80 : 30));
        enq_addr[p]  = waddr_t'($urandom_range(0, 8 * BLOCK_WORDS - 1) & 16'h7F);
        enq_data[p]  = $urandom;
      end
      for (int r = 0; r < NRP; r++)
        lk_addr[r] = (model.size() > 0 && $urandom_range(0, 1)) ?
                     model[$urandom_range(0, model.size() - 1)].addr : waddr_t'($urandom_range(0, 127));
      drain_en   = ($urandom_range(0, 9) != 0);
      miss_ready = ($urandom_range(0, 1) == 0);
      wake_valid = ($urandom_range(0, 9) == 0);
      wake_blk   = (model.size() > 0 && $urandom_range(0, 1)) ? blk_of(model[0].addr) : baddr_t'($urandom_range(0, 7));
      #1;
      for (int p = 0; p < NWP; p++) head_hit[p] = present[int'(blk_of(head_addr[p])) % 8];
      #1;
      // expected values
      check(int'(count) == model.size(), "count");
      free = DEPTH - model.size();
      nacc = 0;
      for (int p = 0; p < NWP; p++) begin
        check(enq_ready[p] == (nacc < free), "enq_ready");
        if (enq_valid[p] && nacc < free) nacc++;
      end
      for (int r = 0; r < NRP; r++) begin
        logic h; word_t d;
        h = 0; d = '0;
        foreach (model[i]) if (model[i].addr == lk_addr[r]) begin h = 1; d = model[i].data; end
        check(lk_hit[r] == h, "lookup hit");
        if (h) begin n_lkhit++; check(lk_data[r] == d, "lookup youngest data"); end
      end
      go = drain_en; nd = 0;
      for (int p = 0; p < NWP; p++) begin
        go = go && (p < model.size()) && present[int'(blk_of(model[p].addr)) % 8];
        check(cw_en[p] == go, "drain enable");
        if (go) begin
          check(cw_addr[p] == model[p].addr && cw_data[p] == model[p].data, "drain record");
          nd++;
        end
      end
      mv = (model.size() > 0) && !present[int'(blk_of(model[0].addr)) % 8] && !model[0].miss;
      check(miss_valid == mv, "write miss request");
      if (mv) check(miss_addr == model[0].addr, "write miss address");
      if (nacc == free && free < NWP) n_full++;
      if (nd == 2) n_drain2++;
      @(posedge clk);
      // update model
      if (mv && miss_ready) begin model[0].miss = 1; n_miss++; end
      if (wake_valid && model.size() > 0 && blk_of(model[0].addr) == wake_blk) begin
        if (model[0].miss) n_wake++;
        model[0].miss = 0;
      end
      repeat (nd) void'(model.pop_front());
      nacc = 0;
      for (int p = 0; p < NWP; p++)
        if (enq_valid[p] && nacc < free) begin
          model.push_back('{miss: 1'b0, addr: enq_addr[p], data: enq_data[p]});
          nacc++;
        end
    end
    check(n_full > 0 && n_drain2 > 0 && n_miss > 0 && n_lkhit > 0 && n_wake > 0, "all cases reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
