// elementary_router: one five-port router (West, East, North, South, Local).
//
// Each input stores its packets in a 16-flit buffer (input_port); the
// routing unit picks outputs at the clock edge and the crossbar, which is
// combinational, connects the buffers to the outputs.  A flit stored at one
// edge can be on an output link right after it, so crossing a router takes
// one step.  Link numbering follows dir_e: 0 W, 1 E, 2 N, 3 S, 4 L.
//
// RVNOC variant (RVNOC = 1): the router belongs to level LEVEL of a global
// router with NLEV levels and has its own half-cycle counter.  It works only
// in its slot, (LEVEL+1) mod NLEV: all its registers advance only then, and
// outside that slot its local output and the acknowledge on its local input
// are forced to 0, so the local signals of the NLEV routers can be ORed onto
// shared wires.  Its neighbours in the four directions are routers of the
// same level and work in the same slot.  LVNOC variant (RVNOC = 0): works on
// every clock edge and has no counter.
//
// The router coordinates x, y are inputs so that one module serves every
// position; COLS and ROWS tell which border ports are missing.
//
// From the publication: buffers, routing unit, combinational crossbar, one clock
// per crossing, RVNOC router working only in its half cycle with its output at 0 otherwise.
// This design's choices: the acknowledge of the local input is gated the same way.
module elementary_router
  import vnoc_pkg::*;
#(
  parameter int  COLS  = 3,
  parameter int  ROWS  = 3,
  parameter int  TNB   = 3,
  parameter bit  RVNOC = 1'b1,
  parameter int  NLEV  = 3,
  parameter int  LEVEL = 0,
  parameter int  DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] x,
  input  logic [COORD_W-1:0] y,
  input  link_fwd_t          in_fwd [NP],
  output link_bwd_t          in_bwd [NP],
  output link_fwd_t          out_fwd[NP],
  input  link_bwd_t          out_bwd[NP],
  output logic               en,          // this router's step
  output logic [NP-1:0]      sta,         // STA.PW .. STA.PL
  output logic [NP-1:0]      misroute     // adaptive choice taken this step
);

  localparam int SW = (NLEV > 1) ? $clog2(NLEV) : 1;

  // ------------------------------------------------------------ time slot
  if (RVNOC) begin : g_slot
    logic [SW-1:0] slot;
    half_cycle_counter #(.NLEV(NLEV)) u_hcc (.clk, .rst_n, .slot);
    assign en = (int'(slot) == (LEVEL + 1) % NLEV);
  end else begin : g_noslot
    assign en = 1'b1;
  end

  // ---------------------------------------------------------- input ports
  logic [NP-1:0]   hdr_v, tx_busy, tx_end, start;
  header_t         hdr     [NP];
  logic [NB_W-1:0] hdr_nb  [NP];
  logic [NB_W-1:0] start_nb[NP];
  link_fwd_t       tx_fwd  [NP];
  link_bwd_t       tx_bwd  [NP];
  link_bwd_t       rx_bwd  [NP];
  link_fwd_t       xb_out  [NP];
  logic [2:0]      sel     [NP];
  logic [NP-1:0]   sel_v;

  for (genvar p = 0; p < NP; p++) begin : g_in
    input_port #(.DEPTH(DEPTH)) u_in (
      .clk, .rst_n, .en,
      .rx_fwd  (in_fwd[p]),
      .rx_bwd  (rx_bwd[p]),
      .hdr_v   (hdr_v[p]),
      .hdr     (hdr[p]),
      .hdr_nb  (hdr_nb[p]),
      .tx_busy (tx_busy[p]),
      .tx_end  (tx_end[p]),
      .start   (start[p]),
      .start_nb(start_nb[p]),
      .tx_fwd  (tx_fwd[p]),
      .tx_bwd  (tx_bwd[p])
    );
  end

  // --------------------------------------------------------- routing unit
  routing_unit #(.COLS(COLS), .ROWS(ROWS), .TNB(TNB)) u_ru (
    .clk, .rst_n, .en, .x, .y,
    .hdr_v, .hdr, .hdr_nb, .tx_busy, .tx_end,
    .start, .start_nb, .sel, .sel_v, .sta, .misroute
  );

  // ------------------------------------------------------------- crossbar
  crossbar #(.N(NP)) u_xbar (
    .sel, .sel_v,
    .in_fwd (tx_fwd),
    .in_bwd (tx_bwd),
    .out_fwd(xb_out),
    .out_bwd(out_bwd)
  );

  // local signals are 0 outside this router's slot
  always_comb begin
    for (int p = 0; p < NP; p++) begin
      out_fwd[p] = xb_out[p];
      in_bwd[p]  = rx_bwd[p];
    end
    if (!en) begin
      out_fwd[DIR_L] = FWD_IDLE;
      in_bwd[DIR_L]  = BWD_IDLE;
    end
  end

endmodule
