// or_combiner: OR-gate multiplexer of the time-shared RVNOC local wires.
//
// dout is the bitwise OR of the N inputs.  Each input is forced to 0 by its
// source outside its own time slot, so in every slot at most one input is
// non-zero and the OR passes it unchanged.  Used for the local output of a
// global router (the local outputs of its elementary routers, DATA OUT
// LOCAL R0..R2 -> DATA OUT LOCAL RG) and for the input side of the network
// interface, after the zero-set unit.  Combinational.
//
// From the publication: OR gates merging the local outputs of the levels.  This
// design's choice: the whole link bundle (and the acknowledges) is merged the same way.
module or_combiner #(
  parameter int N = 3,
  parameter int W = 37
) (
  input  logic [W-1:0] din [N],
  output logic [W-1:0] dout
);

  always_comb begin
    dout = '0;
    for (int i = 0; i < N; i++) dout |= din[i];
  end

endmodule
