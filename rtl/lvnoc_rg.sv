// lvnoc_rg: global router of the reduced-latency network (LVNOC).
//
// NLEV elementary routers with the same (x, y), router k in the k-th
// separate 2D mesh.  Unlike the RVNOC global router nothing is shared: every
// router has its own local input and output, and all work on every clock
// edge.  dir_* arrays are indexed [level][direction] (0 W, 1 E, 2 N, 3 S);
// loc_* arrays by level.
//
// From the publication: one local port per level, no time sharing.  en/sta/misroute of
// each level are left unused here (observed by testbenches only).
module lvnoc_rg
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
  input  link_fwd_t          loc_in_fwd [NLEV],
  output link_bwd_t          loc_in_bwd [NLEV],
  output link_fwd_t          loc_out_fwd[NLEV],
  input  link_bwd_t          loc_out_bwd[NLEV]
);

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
    assign in_fwd[DIR_L]  = loc_in_fwd[k];
    assign loc_in_bwd[k]  = in_bwd[DIR_L];
    assign loc_out_fwd[k] = out_fwd[DIR_L];
    assign out_bwd[DIR_L] = loc_out_bwd[k];

    elementary_router #(
      .COLS(COLS), .ROWS(ROWS), .TNB(TNB),
      .RVNOC(1'b0), .NLEV(NLEV), .LEVEL(k)
    ) u_r (
      .clk, .rst_n, .x, .y,
      .in_fwd, .in_bwd, .out_fwd, .out_bwd,
      .en, .sta, .misroute
    );
  end

endmodule
