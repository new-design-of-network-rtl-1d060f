// zero_set_unit: forces inputs to 0 outside their time slot (RVNOC NI).
//
// Input i passes unchanged while it is active (act[i]) and the current slot
// equals lvl_slot[i], the slot of the virtual level the network interface has
// given it; otherwise its output is 0.  Followed by an or_combiner, this lets
// the IPs of one network interface share the single local input of their
// global router, one level per slot.  Combinational.
//
// From the publication: the 0-set control unit driven by the counter.  This design's
// choice: each input passes in the slot of the level the interface assigned to it.
module zero_set_unit #(
  parameter int N  = 3,
  parameter int W  = 37,
  parameter int SW = 2
) (
  input  logic [W-1:0]  din      [N],
  input  logic [N-1:0]  act,
  input  logic [SW-1:0] lvl_slot [N],
  input  logic [SW-1:0] slot,
  output logic [W-1:0]  dout     [N]
);

  always_comb begin
    for (int i = 0; i < N; i++)
      dout[i] = (act[i] && lvl_slot[i] == slot) ? din[i] : '0;
  end

endmodule
