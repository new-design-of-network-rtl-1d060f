// rvnoc_rg: global router of the reduced-resources network (RVNOC).
//
// Holds NLEV elementary routers with the same (x, y): the base router R0 and
// the virtual routers R1..R(NLEV-1).  Router k belongs to the k-th separate
// 2D mesh, so its West/East/North/South links go only to routers of level k
// in the neighbouring global routers; there are no links between levels.
// The routers take turns by time slot (router k works in slot (k+1) mod
// NLEV, each with its own half-cycle counter), which lets them share one
// local input and one local output:
//   * DATA_IN_LOCAL_RG (loc_in_fwd) goes to every router; each takes it only
//     in its slot.  Their acknowledges are 0 outside their slot and ORed.
//   * The local outputs are 0 outside each router's slot and ORed into
//     DATA_OUT_LOCAL_RG (loc_out_fwd); the acknowledge from the network
//     interface (loc_out_bwd) goes to all of them.
// dir_* arrays are indexed [level][direction], direction 0 W, 1 E, 2 N, 3 S.
//
// From the publication: base and virtual routers with the same coordinates in separate
// meshes, shared local input and OR-merged local output.  This design's choices: the
// acknowledges are shared the same way.  en/sta/misroute of each level are left unused
// here (observed by testbenches only).
module rvnoc_rg
  import vnoc_pkg::*;
#(
  parameter int COLS = 3,
  parameter int ROWS = 3,
  parameter int TNB  = 3,
  parameter int NLEV = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] x,
  input  logic [COORD_W-1:0] y,
  input  link_fwd_t          dir_in_fwd [NLEV][4],
  output link_bwd_t          dir_in_bwd [NLEV][4],
  output link_fwd_t          dir_out_fwd[NLEV][4],
  input  link_bwd_t          dir_out_bwd[NLEV][4],
  input  link_fwd_t          loc_in_fwd,
  output link_bwd_t          loc_in_bwd,
  output link_fwd_t          loc_out_fwd,
  input  link_bwd_t          loc_out_bwd
);

  logic [FWD_W-1:0] lo_fwd_bits [NLEV];
  logic [BWD_W-1:0] li_bwd_bits [NLEV];
  logic [FWD_W-1:0] lo_fwd_or;
  logic [BWD_W-1:0] li_bwd_or;

  for (genvar k = 0; k < NLEV; k++) begin : g_lvl
    link_fwd_t in_fwd [NP];
    link_bwd_t in_bwd [NP];
    link_fwd_t out_fwd[NP];
    link_bwd_t out_bwd[NP];
    logic          en;
    logic [NP-1:0] sta, misroute;

    for (genvar p = 0; p < 4; p++) begin : g_dir
      assign in_fwd[p]         = dir_in_fwd[k][p];
      assign dir_in_bwd[k][p]  = in_bwd[p];
      assign dir_out_fwd[k][p] = out_fwd[p];
      assign out_bwd[p]        = dir_out_bwd[k][p];
    end
    assign in_fwd[DIR_L]  = loc_in_fwd;
    assign out_bwd[DIR_L] = loc_out_bwd;
    assign lo_fwd_bits[k] = out_fwd[DIR_L];
    assign li_bwd_bits[k] = in_bwd[DIR_L];

    elementary_router #(
      .COLS(COLS), .ROWS(ROWS), .TNB(TNB),
      .RVNOC(1'b1), .NLEV(NLEV), .LEVEL(k)
    ) u_r (
      .clk, .rst_n, .x, .y,
      .in_fwd, .in_bwd, .out_fwd, .out_bwd,
      .en, .sta, .misroute
    );
  end

  or_combiner #(.N(NLEV), .W(FWD_W)) u_or_out (.din(lo_fwd_bits), .dout(lo_fwd_or));
  or_combiner #(.N(NLEV), .W(BWD_W)) u_or_ack (.din(li_bwd_bits), .dout(li_bwd_or));

  assign loc_out_fwd = link_fwd_t'(lo_fwd_or);
  assign loc_in_bwd  = link_bwd_t'(li_bwd_or);

endmodule
