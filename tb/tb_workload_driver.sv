// tb_workload_driver: runs one synthetic program's memory traffic through one
// instance of the hierarchy and reports how many cycles it took.
//
// The traffic imitates the two kinds of program the evaluated benchmark set
// contains (this imitation is the testbench's own, not a benchmark):
//  * array phases: passes over a 256-word array, loading neighbouring
//    elements and storing them back (a bubble-sort-like pattern, small
//    contiguous working set);
//  * scattered phases: loads and stores to pseudo-random words of a 1024-word
//    region (a tree-like pattern with a fragmented working set).
// Memory operations are issued in order, in groups of at most ISSUE_W, no
// more loads than read ports and no more stores than write ports per group,
// and a group only after the previous one was fully accepted (in-order
// issue). A group never holds two operations on one word. In parallel an
// instruction-fetch stream walks a 384-word loop of code in 16-word groups.
// Every load and fetched word is checked against a shadow memory. done
// rises when all operations, loads and fetches have completed; cycles then
// holds the count.
module tb_workload_driver
  import hsa_cache_pkg::*;
#(
  parameter int DSETS   = 32,
  parameter int ISETS   = 32,
  parameter int NRP     = 2,
  parameter int NWP     = 2,
  parameter int ACC_LAT = 1,
  parameter int ISSUE_W = 16,
  parameter int NOPS    = 6000,
  parameter int NFETCH  = 1200
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   cycles,
  output int   checks,
  output int   failures,
  output int   block_requests,
  output int   icache_misses
);
  localparam int FETCH_W = 16;
  localparam int CODE_W  = 384;
  localparam waddr_t CODE = waddr_t'(16'hC000);

  logic   if_valid, if_ready, if_rsp_valid, ic_miss, mwb_hit;
  waddr_t if_addr, if_rsp_addr;
  word_t  if_rsp_instr [FETCH_W];
  logic   rd_valid [NRP]; waddr_t rd_addr [NRP]; id_t rd_id [NRP]; logic rd_ready [NRP];
  logic   rsp_valid [NRP]; id_t rsp_id [NRP]; word_t rsp_data [NRP];
  logic   wr_valid [NWP]; waddr_t wr_addr [NWP]; word_t wr_data [NWP]; logic wr_ready [NWP];
  logic   pf_valid, pf_ready; waddr_t pf_addr;
  logic   byp_valid; id_t byp_id; word_t byp_data;
  dcache_events_t dc_ev;

  hsa_memory_system #(.DSETS(DSETS), .ISETS(ISETS), .NRP(NRP), .NWP(NWP), .ACC_LAT(ACC_LAT)) dut (.*);

  function automatic word_t init_word(int a);
    return word_t'(a * 69069 + 12345);
  endfunction

  // operation k of the program
  function automatic void op_of(int k, output logic is_store, output waddr_t a);
    int ph, i, h;
    ph = k / 500;
    h  = (k * 1103515245 + 12345) >>> 8;
    if (ph % 2 == 0) begin
      i = (k % 500) / 2;                           // element pair index
      a = waddr_t'((i % 255) + (k % 2));
      is_store = ((k / 2) % 3 == 2);
    end else begin
      a = waddr_t'(16'h1000 + (h & 1023));
      is_store = ((h >> 13) & 3) == 0;
    end
  endfunction

  word_t shadow [1 << AW];
  word_t expect_v [1 << ID_W];
  logic  id_busy  [1 << ID_W];
  int    outstanding, n_fetched, pc, cyc;
  logic  rd_acc [NRP], wr_acc [NWP];
  logic  f_pend;
  waddr_t f_next;

  initial begin
    for (int a = 0; a < (1 << AW); a++) shadow[a] = init_word(a);
    for (int b = 0; b < (1 << BLK_W); b++)
      for (int w = 0; w < BLOCK_WORDS; w++) dut.u_mem.mem[b][w] = init_word(b * BLOCK_WORDS + w);
    for (int k = 0; k < (1 << ID_W); k++) id_busy[k] = 1'b0;
  end

  // monitor: responses, acceptances, fetches
  always @(posedge clk) begin
    if (!rst_n) begin
      cyc = 0; checks = 0; failures = 0; outstanding = 0; n_fetched = 0;
      block_requests = 0; icache_misses = 0; f_pend = 0;
    end else begin
      cyc++;
      for (int i = 0; i < NRP; i++) if (rsp_valid[i]) begin
        checks++;
        if (rsp_data[i] !== expect_v[rsp_id[i]]) failures++;
        id_busy[rsp_id[i]] = 1'b0; outstanding--;
      end
      if (byp_valid) begin
        checks++;
        if (byp_data !== expect_v[byp_id]) failures++;
        id_busy[byp_id] = 1'b0; outstanding--;
      end
      for (int i = 0; i < NRP; i++) begin
        rd_acc[i] = rd_valid[i] && rd_ready[i];
        if (rd_acc[i]) expect_v[rd_id[i]] = shadow[rd_addr[i]];
      end
      for (int p = 0; p < NWP; p++) begin
        wr_acc[p] = wr_valid[p] && wr_ready[p];
        if (wr_acc[p]) shadow[wr_addr[p]] = wr_data[p];
      end
      if (if_rsp_valid) begin
        for (int i = 0; i < FETCH_W; i++) begin
          checks++;
          if (if_rsp_instr[i] !== init_word(int'(if_rsp_addr) + i)) failures++;
        end
        n_fetched++; f_pend = 0;
      end
      if (if_valid && if_ready) f_pend = 1;
      block_requests += int'(dc_ev.block_request);
      icache_misses  += int'(ic_miss);
    end
  end

  // in-order issue of memory operations
  initial begin
    done = 0; cycles = 0; pc = 0;
    for (int i = 0; i < NRP; i++) begin rd_valid[i] = 0; rd_addr[i] = 0; rd_id[i] = 0; rd_acc[i] = 0; end
    for (int p = 0; p < NWP; p++) begin wr_valid[p] = 0; wr_addr[p] = 0; wr_data[p] = 0; wr_acc[p] = 0; end
    pf_valid = 0; pf_addr = 0; if_valid = 0; if_addr = CODE; f_next = CODE;
    @(posedge rst_n);
    while (pc < NOPS || outstanding > 0 || n_fetched < NFETCH) begin
      logic pending;
      @(negedge clk);
      // drop what was accepted; a group ends when nothing of it is left
      pending = 0;
      for (int i = 0; i < NRP; i++) begin
        if (rd_acc[i]) begin rd_valid[i] = 0; rd_acc[i] = 0; end
        pending |= rd_valid[i];
      end
      for (int p = 0; p < NWP; p++) begin
        if (wr_acc[p]) begin wr_valid[p] = 0; wr_acc[p] = 0; end
        pending |= wr_valid[p];
      end
      if (!pending && pc < NOPS) begin
        int nr, nw, n;
        waddr_t used [$];
        nr = 0; nw = 0; n = 0;
        used.delete();
        while (pc < NOPS && n < ISSUE_W) begin
          logic st; waddr_t a; int id; logic clash;
          op_of(pc, st, a);
          clash = 0;
          foreach (used[u]) if (used[u] == a) clash = 1;
          if (clash) break;
          if (st) begin
            if (nw == NWP) break;
            wr_valid[nw] = 1; wr_addr[nw] = a; wr_data[nw] = word_t'(pc * 7 + 3);
            nw++;
          end else begin
            if (nr == NRP) break;
            id = -1;
            for (int j = 0; j < (1 << ID_W); j++) if (id < 0 && !id_busy[j]) id = j;
            if (id < 0) break;
            id_busy[id] = 1'b1; outstanding++;
            rd_valid[nr] = 1; rd_addr[nr] = a; rd_id[nr] = id_t'(id);
            nr++;
          end
          used.push_back(a);
          pc++; n++;
        end
      end
      // instruction fetch: one group outstanding at a time
      if (if_valid && !f_pend) begin end
      else if (if_valid && f_pend) if_valid = 0;
      if (!if_valid && !f_pend && n_fetched < NFETCH && !(if_rsp_valid)) begin
        if_valid = 1; if_addr = f_next;
        f_next = (f_next + FETCH_W >= CODE + CODE_W) ? CODE + waddr_t'((f_next + FETCH_W - CODE) % CODE_W)
                                                     : f_next + FETCH_W;
      end
    end
    cycles = cyc;
    done = 1;
  end

endmodule
