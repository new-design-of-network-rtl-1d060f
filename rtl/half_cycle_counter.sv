// half_cycle_counter: time-slot counter of the RVNOC.
//
// The elementary routers of an RVNOC global router take turns: slot 1 is
// the base router's, slot 2 the first virtual router's, slot 0 the second
// one's, repeating 1,2,0,1,2,0 (for NLEV elementary routers the count runs
// modulo NLEV and starts at 1 after reset).  One slot (the "half cycle") is
// one period of clk, so level k works in slot (k+1) mod NLEV.  All counters
// of a network leave reset together and so stay in step.
//
// From the publication: the slot sequence 1,2,0 of three routers.  This design's
// choices: modulo NLEV (the text's "modulo N-1" is not followed), one slot = one clock.
module half_cycle_counter #(
  parameter int NLEV = 3,
  localparam int SW  = (NLEV > 1) ? $clog2(NLEV) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [SW-1:0] slot
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      slot <= SW'(1 % NLEV);
    else if (int'(slot) == NLEV - 1) slot <= '0;
    else                             slot <= slot + 1'b1;
  end

endmodule
