// tb_outstanding_refs_buffer: random allocations, activations and frees
// against a slot-by-slot model. Checks merge detection (a second reference
// to a block issues no block request), free-slot and request-buffer
// back-pressure, the read record offered on activation, and freeing of the
// write-miss and prefetch records of a returned block.
module tb_outstanding_refs_buffer;
  import hsa_cache_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic alloc_valid, alloc_ready, alloc_merge, issue_valid, issue_ready;
  miss_ref_t alloc_ref, act_ref;
  baddr_t issue_blk, act_blk;
  logic act_valid, act_take, act_free_rest, act_has_write;
  logic [$clog2(DEPTH+1)-1:0] count;
  outstanding_refs_buffer #(.DEPTH(DEPTH)) dut (.*);

  logic      mv [DEPTH];
  miss_ref_t mr [DEPTH];
  int checks = 0, failures = 0, n_merge = 0, n_issue = 0, n_full = 0, n_take = 0;
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) mv[i] = 0;
    alloc_valid = 0; alloc_ref = '0; issue_ready = 0; act_blk = 0; act_take = 0; act_free_rest = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8000; t++) begin
      int free_i, act_i, cnt;
      logic merge, has_w;
      @(negedge clk);
      alloc_valid = ($urandom_range(0, 99) < 60);
      alloc_ref = '{kind: ref_kind_e'($urandom_range(0, 2)), blk: baddr_t'($urandom_range(0, 5)),
                    off: off_t'($urandom), id: id_t'($urandom)};
      issue_ready = ($urandom_range(0, 99) < 70);
      act_blk = baddr_t'($urandom_range(0, 5));
      act_take = ($urandom_range(0, 99) < 25);
      act_free_rest = ($urandom_range(0, 99) < 15);
      // model
      free_i = -1; act_i = -1; merge = 0; has_w = 0; cnt = 0;
      for (int i = DEPTH - 1; i >= 0; i--) begin
        if (!mv[i]) free_i = i;
        if (mv[i] && mr[i].blk == alloc_ref.blk) merge = 1;
        if (mv[i] && mr[i].blk == act_blk && mr[i].kind == REF_READ) act_i = i;
        if (mv[i] && mr[i].blk == act_blk && mr[i].kind == REF_WRITE) has_w = 1;
        if (mv[i]) cnt++;
      end
      #1;
      check(int'(count) == cnt, "count");
      check(alloc_merge == merge, "merge");
      check(alloc_ready == (free_i >= 0 && (merge || issue_ready)), "alloc_ready");
      check(issue_valid == (alloc_valid && free_i >= 0 && !merge), "issue_valid");
      if (issue_valid) check(issue_blk == alloc_ref.blk, "issue_blk");
      check(act_valid == (act_i >= 0), "act_valid");
      if (act_i >= 0) check(act_ref == mr[act_i], "act_ref");
      check(act_has_write == has_w, "has_write");
      if (free_i < 0) n_full++;
      @(posedge clk);
      if (act_take && act_i >= 0) begin mv[act_i] = 0; n_take++; end
      if (act_free_rest)
        for (int i = 0; i < DEPTH; i++)
          if (mv[i] && mr[i].blk == act_blk && mr[i].kind != REF_READ) mv[i] = 0;
      if (alloc_valid && free_i >= 0 && (merge || issue_ready)) begin
        mv[free_i] = 1; mr[free_i] = alloc_ref;
        if (merge) n_merge++; else n_issue++;
      end
    end
    check(n_merge > 0 && n_issue > 0 && n_full > 0 && n_take > 0, "all cases reached");
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
