// tb_dcache_array: random word writes and block fills against a model of a
// direct-mapped write-back cache; checks hit, data, dirty victim, victim
// address and data on every cycle, and that the younger of two same-cycle
// writes to one word wins.
module tb_dcache_array;
  import hsa_cache_pkg::*;
  localparam int SETS = 32, NL = 3, NWP = 2;
  localparam int SET_W = $clog2(SETS);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  waddr_t lk_addr [NL]; logic lk_hit [NL]; word_t lk_data [NL];
  logic wr_en [NWP]; waddr_t wr_addr [NWP]; word_t wr_data [NWP];
  logic fill_en; baddr_t fill_blk; block_t fill_data;
  logic victim_dirty; baddr_t victim_blk; block_t victim_data;
  dcache_array #(.SETS(SETS), .NL(NL), .NWP(NWP)) dut (.*);

  logic   m_valid [SETS], m_dirty [SETS];
  baddr_t m_blk [SETS];
  block_t m_data [SETS];
  int checks = 0, failures = 0, n_dirty_victim = 0, n_hits = 0;
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic int set_of(baddr_t b); return int'(b) % SETS; endfunction
  function automatic logic m_hit(waddr_t a);
    return m_valid[set_of(blk_of(a))] && m_blk[set_of(blk_of(a))] == blk_of(a);
  endfunction
  // addresses from 96 blocks so that sets conflict
  function automatic waddr_t rnd_addr();
    return waddr_t'($urandom_range(0, 96 * BLOCK_WORDS - 1));
  endfunction

  initial begin
    for (int s = 0; s < SETS; s++) begin m_valid[s] = 0; m_dirty[s] = 0; end
    fill_en = 0; fill_blk = 0; fill_data = '0;
    for (int p = 0; p < NWP; p++) begin wr_en[p] = 0; wr_addr[p] = 0; wr_data[p] = 0; end
    for (int l = 0; l < NL; l++) lk_addr[l] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      for (int l = 0; l < NL; l++) lk_addr[l] = rnd_addr();
      fill_en = ($urandom_range(0, 99) < 20);
      fill_blk = blk_of(rnd_addr());
      fill_data = {16{$urandom}};
      for (int p = 0; p < NWP; p++) begin
        automatic waddr_t a = rnd_addr();
        if (p == 1 && $urandom_range(0, 3) == 0) a = wr_addr[0];
        wr_addr[p] = a;
        wr_data[p] = $urandom;
        wr_en[p]   = !fill_en && m_hit(a) && ($urandom_range(0, 99) < 80);
      end
      #1;
      for (int l = 0; l < NL; l++) begin
        check(lk_hit[l] == m_hit(lk_addr[l]), "hit");
        if (m_hit(lk_addr[l])) begin
          n_hits++;
          check(lk_data[l] == m_data[set_of(blk_of(lk_addr[l]))][off_of(lk_addr[l])], "data");
        end
      end
      if (fill_en) begin
        automatic int s = set_of(fill_blk);
        check(victim_dirty == (m_valid[s] && m_dirty[s]), "victim dirty");
        if (m_valid[s] && m_dirty[s]) begin
          n_dirty_victim++;
          check(victim_blk == m_blk[s] && victim_data == m_data[s], "victim block");
        end
      end
      @(posedge clk);
      for (int p = 0; p < NWP; p++) if (wr_en[p]) begin
        m_data[set_of(blk_of(wr_addr[p]))][off_of(wr_addr[p])] = wr_data[p];
        m_dirty[set_of(blk_of(wr_addr[p]))] = 1;
      end
      if (fill_en) begin
        m_valid[set_of(fill_blk)] = 1; m_dirty[set_of(fill_blk)] = 0;
        m_blk[set_of(fill_blk)] = fill_blk; m_data[set_of(fill_blk)] = fill_data;
      end
    end
    check(n_dirty_victim > 0 && n_hits > 0, "dirty victims and hits occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
