// tb_memory_write_buffer: self-checking test of the write buffer above main
// memory, at DEPTH 4 so that it fills often.
//
// Random write-backs, drains and block reads (from eight block addresses,
// so that reads often find their block) are driven on the falling edge. A
// queue model in the testbench predicts, before every rising edge: the
// ready and valid outputs, the head record offered to memory, whether a
// read hits and which (youngest) record answers it, the forwarded block
// address of a read that misses, and the count. A read that hits must
// appear in the return register one cycle later and stay there, unchanged,
// until it is taken; a read must be held while a write-back is waiting.
module tb_memory_write_buffer;
  import hsa_cache_pkg::*;

  localparam int DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     in_valid, in_ready, out_valid, out_ready;
  blk_wr_t  in_req, out_req;
  logic     rq_valid, rq_ready, fw_valid, fw_ready, hr_valid, hr_ready, ev_hit;
  baddr_t   rq_blk, fw_blk;
  blk_ret_t hr_ret;
  logic [$clog2(DEPTH+1)-1:0] count;

  memory_write_buffer #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_hit = 0, n_fw = 0, n_full = 0, n_held = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  blk_wr_t  model [$];
  logic     m_hr_valid = 1'b0;
  blk_ret_t m_hr;

  always @(posedge clk) if (rst_n) begin
    logic   hit;
    block_t hd;
    logic   acc_rq, acc_in, acc_out;
    hit = 1'b0;
    hd  = '0;
    foreach (model[k]) if (model[k].blk == rq_blk) begin hit = 1'b1; hd = model[k].data; end
    check(in_ready == (model.size() < DEPTH), "in_ready");
    check(out_valid == (model.size() != 0), "out_valid");
    if (model.size() != 0) check(out_req == model[0], "head record");
    check(int'(count) == model.size(), "count");
    check(hr_valid == m_hr_valid, "hr_valid");
    if (m_hr_valid) check(hr_ret == m_hr, "return register");
    check(fw_valid == (rq_valid && !in_valid && !hit), "fw_valid");
    if (fw_valid) check(fw_blk == rq_blk, "fw_blk");
    check(rq_ready == (!in_valid && (hit ? !m_hr_valid : fw_ready)), "rq_ready");
    check(ev_hit == (rq_valid && rq_ready && hit), "ev_hit");
    acc_rq  = rq_valid && rq_ready;
    acc_in  = in_valid && in_ready;
    acc_out = out_valid && out_ready;
    n_full += int'(in_valid && !in_ready);
    n_held += int'(rq_valid && in_valid);
    if (acc_rq && !hit) n_fw++;
    // model update
    if (m_hr_valid && hr_ready) m_hr_valid = 1'b0;
    if (acc_rq && hit) begin
      n_hit++;
      m_hr_valid = 1'b1;
      m_hr = '{blk: rq_blk, data: hd};
    end
    if (acc_out) void'(model.pop_front());
    if (acc_in) model.push_back(in_req);
  end

  initial begin
    in_valid = 0; in_req = '0; out_ready = 0;
    rq_valid = 0; rq_blk = '0; fw_ready = 0; hr_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      in_valid    = ($urandom_range(0, 99) < 35);
      in_req.blk  = baddr_t'($urandom_range(0, 7));
      for (int w = 0; w < BLOCK_WORDS; w++) in_req.data[w] = $urandom;
      out_ready   = ($urandom_range(0, 99) < (((c / 1000) % 2) != 0 ? 15 : 60));
      rq_valid    = ($urandom_range(0, 99) < 50);
      rq_blk      = baddr_t'($urandom_range(0, 9));
      fw_ready    = ($urandom_range(0, 99) < 50);
      hr_ready    = ($urandom_range(0, 99) < 50);
    end
    @(negedge clk);
    $display("hits %0d forwarded %0d full %0d held %0d", n_hit, n_fw, n_full, n_held);
    check(n_hit > 0 && n_fw > 0 && n_full > 0 && n_held > 0, "every case seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
