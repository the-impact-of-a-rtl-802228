// tb_mem_arbiter: random requests from the three requesters; checks the
// priority (write-backs, then instruction reads, then data reads), that
// the memory request carries the winner's address, data and direction, and
// that each read response is steered to the requester that issued it.
module tb_mem_arbiter;
  import hsa_cache_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic dw_valid, dw_ready, ir_valid, ir_ready, ir_rsp_valid, ir_rsp_ready;
  logic dr_valid, dr_ready, dr_rsp_valid, dr_rsp_ready;
  blk_wr_t dw_req; baddr_t ir_blk, dr_blk, rsp_blk;
  block_t rsp_data;
  logic m_req_valid, m_req_ready, m_req_write, m_rsp_valid, m_rsp_ready;
  baddr_t m_req_blk, m_rsp_blk; block_t m_req_data, m_rsp_data;
  mem_arbiter dut (.*);
  int checks = 0, failures = 0;
  logic owner_i;   // model
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    dw_valid = 0; ir_valid = 0; dr_valid = 0; m_req_ready = 0; m_rsp_valid = 0;
    ir_rsp_ready = 0; dr_rsp_ready = 0; dw_req = '0; ir_blk = 0; dr_blk = 0;
    m_rsp_blk = 0; m_rsp_data = '0; owner_i = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      dw_valid = $urandom_range(0, 2) == 0; ir_valid = $urandom_range(0, 1) == 0;
      dr_valid = $urandom_range(0, 1) == 0; m_req_ready = $urandom_range(0, 1) == 0;
      dw_req = '{blk: baddr_t'($urandom), data: {16{$urandom}}};
      ir_blk = baddr_t'($urandom); dr_blk = baddr_t'($urandom);
      m_rsp_valid = $urandom_range(0, 1) == 0; m_rsp_blk = baddr_t'($urandom);
      ir_rsp_ready = $urandom_range(0, 1) == 0; dr_rsp_ready = $urandom_range(0, 1) == 0;
      #1;
      check(m_req_valid == (dw_valid || ir_valid || dr_valid), "req valid");
      if (dw_valid) begin
        check(m_req_write && m_req_blk == dw_req.blk && m_req_data == dw_req.data &&
              dw_ready == m_req_ready && !ir_ready && !dr_ready, "write-back first");
      end else if (ir_valid) begin
        check(!m_req_write && m_req_blk == ir_blk && ir_ready == m_req_ready && !dr_ready, "instruction read second");
      end else if (dr_valid) begin
        check(!m_req_write && m_req_blk == dr_blk && dr_ready == m_req_ready, "data read third");
      end
      check(ir_rsp_valid == (m_rsp_valid && owner_i) && dr_rsp_valid == (m_rsp_valid && !owner_i), "steering");
      check(m_rsp_ready == (owner_i ? ir_rsp_ready : dr_rsp_ready), "response ready");
      check(rsp_blk == m_rsp_blk, "response address");
      @(posedge clk);
      if (ir_valid && ir_ready) owner_i = 1;
      else if (dr_valid && dr_ready) owner_i = 0;
    end
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
