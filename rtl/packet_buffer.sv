// packet_buffer: the storage memory of one router input port.
//
// DEPTH flits of FLIT_W bits (16 x 32 by default, the buffer size given for
// each input port).  One synchronous write port and one asynchronous read
// port, so the flit at raddr is on rdata in the same cycle; this lets a
// router forward a flit one clock after it was stored.  The array is not
// reset: the input port only reads addresses it has written.
//
// From the publication: 16 flits per input port.  This design's choices: flit width 32
// (the header width), one write and one asynchronous read port.
module packet_buffer #(
  parameter int DEPTH  = 16,
  parameter int FLIT_W = 32,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [FLIT_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [FLIT_W-1:0] rdata
);

  logic [FLIT_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
