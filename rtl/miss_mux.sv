// miss_mux: the multiplexor that feeds the Outstanding References Buffer
// and the block-request buffer toward the next level.
//
// N requesters (read misses of each read port, the Data Write Buffer's
// write miss, the prefetch buffer) each offer one reference. One is passed
// on per cycle, the lowest-numbered valid input first; in_ready[i] is high
// only for the selected input and only when the output is taken. Purely
// combinational. One reference per cycle and the fixed priority are this
// design's choices; the cache structure shows a single multiplexor here.
module miss_mux
  import hsa_cache_pkg::*;
#(
  parameter int N = 4
) (
  input  logic      in_valid [N],
  input  miss_ref_t in_ref   [N],
  output logic      in_ready [N],
  output logic      out_valid,
  output miss_ref_t out_ref,
  output logic [$clog2(N)-1:0] out_sel,
  input  logic      out_ready
);
  always_comb begin
    out_valid = 1'b0;
    out_ref   = in_ref[0];
    out_sel   = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (in_valid[i]) begin
        out_valid = 1'b1;
        out_ref   = in_ref[i];
        out_sel   = $clog2(N)'(i);
      end
    end
    for (int i = 0; i < N; i++)
      in_ready[i] = out_valid && out_ready && (out_sel == $clog2(N)'(i));
  end
endmodule
