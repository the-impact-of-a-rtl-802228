// tb_miss_mux: random request patterns; checks that the lowest-numbered
// valid input is passed on and that only it sees ready, and only when the
// output is taken.
module tb_miss_mux;
  import hsa_cache_pkg::*;
  localparam int N = 4;
  logic      in_valid [N];
  miss_ref_t in_ref   [N];
  logic      in_ready [N];
  logic      out_valid, out_ready;
  miss_ref_t out_ref;
  logic [$clog2(N)-1:0] out_sel;
  miss_mux #(.N(N)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 2000; t++) begin
      int first;
      first = -1;
      for (int i = 0; i < N; i++) begin
        in_valid[i] = ($urandom_range(0, 99) < 40);
        in_ref[i]   = miss_ref_t'($urandom);
        if (in_valid[i] && first < 0) first = i;
      end
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (out_valid != (first >= 0)) failures++;
      if (first >= 0) begin
        checks++;
        if (out_ref != in_ref[first] || int'(out_sel) != first) failures++;
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (in_ready[i] != (i == first && out_ready)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
