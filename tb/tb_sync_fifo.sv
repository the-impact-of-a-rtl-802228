// tb_sync_fifo: random push/pop against a queue model; checks order, data,
// count, full and empty, and that a pushed word is poppable one cycle later.
module tb_sync_fifo;
  localparam int DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic push_valid, push_ready, pop_valid, pop_ready;
  logic [15:0] push_data, pop_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  sync_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (.*);

  logic [15:0] model [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    push_valid = 0; pop_ready = 0; push_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      push_valid = ($urandom_range(0, 99) < ((c / 500) % 2 ? 70 : 35));
      pop_ready  = ($urandom_range(0, 99) < ((c / 500) % 2 ? 35 : 70));
      push_data  = 16'($urandom);
      #1;
      check(int'(count) == model.size(), "count");
      check(push_ready == (model.size() < DEPTH), "push_ready");
      check(pop_valid == (model.size() > 0), "pop_valid");
      if (model.size() > 0) check(pop_data == model[0], "pop_data");
      if (model.size() == DEPTH) n_full++;
      if (model.size() == 0) n_empty++;
      @(posedge clk);
      if (pop_valid && pop_ready) void'(model.pop_front());
      if (push_valid && push_ready) model.push_back(push_data);
    end
    check(n_full > 0 && n_empty > 0, "full and empty both reached");
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
