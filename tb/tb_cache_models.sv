// tb_cache_models: runs the same synthetic program on the hierarchy in each
// configuration the cache study evaluated that this RTL can express:
//  * cache sizes 256 B, 512 B, 1 KB, 2 KB and 4 KB (4 to 64 sets) on the
//    standard 2-read/2-write-port data cache,
//  * the 16-read/16-write-port ("maximal") data cache with 2 KB caches,
//  * 2 KB caches with a two-cycle pipelined access time,
//  * a single-issue ("baseline") processor on 2 KB caches.
// Every configuration must produce correct data; the run time must fall
// as the caches grow from 256 B to 2 KB, the single-issue run must be the
// slowest of the 2 KB runs, and the 4 KB run must not be slower than the
// 256 B one. The cycle counts are printed.
module tb_cache_models;
  localparam int NCFG = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [NCFG];
  int   cycles [NCFG], ck [NCFG], fl [NCFG], breq [NCFG], imiss [NCFG];
  string name [NCFG] = '{"256B", "512B", "1KB", "2KB", "4KB", "2KB-16ports", "2KB-2cycle", "2KB-single-issue"};

  tb_workload_driver #(.DSETS(4), .ISETS(4))   c0 (.clk, .rst_n, .done(done[0]), .cycles(cycles[0]), .checks(ck[0]), .failures(fl[0]), .block_requests(breq[0]), .icache_misses(imiss[0]));
  tb_workload_driver #(.DSETS(8), .ISETS(8))   c1 (.clk, .rst_n, .done(done[1]), .cycles(cycles[1]), .checks(ck[1]), .failures(fl[1]), .block_requests(breq[1]), .icache_misses(imiss[1]));
  tb_workload_driver #(.DSETS(16), .ISETS(16)) c2 (.clk, .rst_n, .done(done[2]), .cycles(cycles[2]), .checks(ck[2]), .failures(fl[2]), .block_requests(breq[2]), .icache_misses(imiss[2]));
  tb_workload_driver #(.DSETS(32), .ISETS(32)) c3 (.clk, .rst_n, .done(done[3]), .cycles(cycles[3]), .checks(ck[3]), .failures(fl[3]), .block_requests(breq[3]), .icache_misses(imiss[3]));
  tb_workload_driver #(.DSETS(64), .ISETS(64)) c4 (.clk, .rst_n, .done(done[4]), .cycles(cycles[4]), .checks(ck[4]), .failures(fl[4]), .block_requests(breq[4]), .icache_misses(imiss[4]));
  tb_workload_driver #(.NRP(16), .NWP(16))     c5 (.clk, .rst_n, .done(done[5]), .cycles(cycles[5]), .checks(ck[5]), .failures(fl[5]), .block_requests(breq[5]), .icache_misses(imiss[5]));
  tb_workload_driver #(.ACC_LAT(2))            c6 (.clk, .rst_n, .done(done[6]), .cycles(cycles[6]), .checks(ck[6]), .failures(fl[6]), .block_requests(breq[6]), .icache_misses(imiss[6]));
  tb_workload_driver #(.ISSUE_W(1))            c7 (.clk, .rst_n, .done(done[7]), .cycles(cycles[7]), .checks(ck[7]), .failures(fl[7]), .block_requests(breq[7]), .icache_misses(imiss[7]));

  int checks = 0, failures = 0;
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6] && done[7]);
    for (int c = 0; c < NCFG; c++) begin
      $display("config %-16s cycles %0d  data block requests %0d  instruction misses %0d  checks %0d failures %0d",
               name[c], cycles[c], breq[c], imiss[c], ck[c], fl[c]);
      checks += ck[c];
      failures += fl[c];
    end
    check(cycles[0] > cycles[1] && cycles[1] > cycles[2] && cycles[2] > cycles[3], "run time falls with cache size");
    check(cycles[4] <= cycles[0], "4 KB not slower than 256 B");
    check(cycles[7] >= cycles[3] && cycles[7] >= cycles[5], "single issue slowest of the 2 KB runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
