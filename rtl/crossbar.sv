// crossbar: the multiplexing units of an elementary router.
//
// Purely combinational.  Output o carries the transmit stream of input
// sel[o] while sel_v[o] is set and is all zeros otherwise; the acknowledge
// arriving on output o is steered back to the input that owns it.  The
// routing unit guarantees that an input owns at most one output.
//
// From the publication: combinational multiplexing units.  This design's choices:
// everything else (the publication gives no insides).
module crossbar
  import vnoc_pkg::*;
#(
  parameter int N = 5
) (
  input  logic [2:0]    sel    [N],
  input  logic [N-1:0] sel_v,
  input  link_fwd_t     in_fwd [N],
  output link_bwd_t     in_bwd [N],
  output link_fwd_t     out_fwd[N],
  input  link_bwd_t     out_bwd[N]
);

  always_comb begin
    for (int i = 0; i < N; i++) in_bwd[i] = BWD_IDLE;
    for (int o = 0; o < N; o++) begin
      out_fwd[o] = FWD_IDLE;
      if (sel_v[o] && int'(sel[o]) < N) begin
        out_fwd[o]     = in_fwd[sel[o]];
        in_bwd[sel[o]] = out_bwd[o];
      end
    end
  end

endmodule
