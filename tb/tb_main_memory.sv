// tb_main_memory: writes blocks, reads them back and checks the data, that
// each access keeps the port busy for exactly LATENCY cycles (a read answers
// LATENCY cycles after acceptance, a write lets the next request in
// LATENCY cycles later) and that a response is held until taken.
module tb_main_memory;
  import hsa_cache_pkg::*;
  localparam int LAT = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, req_write, rsp_valid, rsp_ready;
  baddr_t req_blk, rsp_blk;
  block_t req_data, rsp_data;
  main_memory #(.LATENCY(LAT), .BLOCKS(64)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0d", what, cyc); end
  endtask

  function automatic block_t pat(int b);
    block_t d;
    for (int w = 0; w < BLOCK_WORDS; w++) d[w] = word_t'(b * 1000 + w * 3 + 5);
    return d;
  endfunction

  task automatic access(logic wr, int b, int hold);
    int t0;
    @(negedge clk);
    req_valid = 1; req_write = wr; req_blk = baddr_t'(b); req_data = pat(b);
    check(req_ready, "ready when idle");
    @(posedge clk); t0 = cyc;
    @(negedge clk); req_valid = 0;
    // the port stays busy
    while (!(wr ? req_ready : rsp_valid)) begin
      check(!req_ready, "busy");
      @(negedge clk);
    end
    check(cyc - t0 == LAT, $sformatf("latency %0d", cyc - t0));
    if (!wr) begin
      repeat (hold) begin
        @(negedge clk); check(rsp_valid && !req_ready, "response held");
      end
      check(rsp_data == pat(b) && rsp_blk == baddr_t'(b), "read data");
      rsp_ready = 1;
      @(negedge clk); rsp_ready = 0;
      check(req_ready && !rsp_valid, "idle after response");
    end
  endtask

  initial begin
    req_valid = 0; req_write = 0; req_blk = 0; req_data = '0; rsp_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 64; b++) access(1'b1, b, 0);
    for (int b = 63; b >= 0; b--) access(1'b0, b, b % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
