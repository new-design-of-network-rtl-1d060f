// rvnoc_mesh: the reduced-resources virtual-router network (RVNOC).
//
// COLS x ROWS global routers (rvnoc_rg), each with its network interface
// (rvnoc_ni) and NLEV IPs, so COLS*ROWS*NLEV IPs in all: as many as a
// COLS x ROWS x NLEV 3D mesh, without any vertical links.  Level k of every
// global router forms the k-th separate 2D mesh; West/East/North/South links
// join routers of the same level only (East is x+1, North is y-1).  The
// levels take turns by time slot, and each global router shares a single
// local port among its levels.
//
// IP numbering: IP i = (y*COLS + x)*NLEV + j is IP j of global router
// (x, y); its packets address it as X@D = x, Y@D = y, @IP D = j.
// ip_fwd/ip_bwd/ip_step: IP sending links (the link moves on clock edges
// with ip_step set); ip_out_v/ip_out_data: flits delivered to the IPs.
//
// From the publication: each level is a separate 2D mesh; no links between levels.
// This design's choice: IP numbering (y*COLS + x)*NLEV + j.
module rvnoc_mesh
  import vnoc_pkg::*;
#(
  parameter int COLS = 3,
  parameter int ROWS = 3,
  parameter int NLEV = 3,
  parameter int TNB  = 3,
  localparam int NIP = COLS * ROWS * NLEV
) (
  input  logic           clk,
  input  logic           rst_n,
  input  link_fwd_t      ip_fwd [NIP],
  output link_bwd_t      ip_bwd [NIP],
  output logic [NIP-1:0] ip_step,
  output logic [NIP-1:0] ip_out_v,
  output flit_t          ip_out_data[NIP]
);

  // direction index of the four mesh links: 0 W, 1 E, 2 N, 3 S
  localparam int PW = 0, PE = 1, PN = 2, PS = 3;

  // router-to-router links, indexed [y][x][level][direction]
  link_fwd_t d_in_fwd [ROWS][COLS][NLEV][4];
  link_bwd_t d_in_bwd [ROWS][COLS][NLEV][4];
  link_fwd_t d_out_fwd[ROWS][COLS][NLEV][4];
  link_bwd_t d_out_bwd[ROWS][COLS][NLEV][4];
  link_fwd_t li_fwd [ROWS][COLS];
  link_bwd_t li_bwd [ROWS][COLS];
  link_fwd_t lo_fwd [ROWS][COLS];
  link_bwd_t lo_bwd [ROWS][COLS];

  for (genvar yy = 0; yy < ROWS; yy++) begin : g_y
    for (genvar xx = 0; xx < COLS; xx++) begin : g_x
      for (genvar k = 0; k < NLEV; k++) begin : g_k
        // inputs come from the neighbour's opposite output
        if (xx > 0) begin : g_w
          assign d_in_fwd[yy][xx][k][PW]  = d_out_fwd[yy][xx-1][k][PE];
          assign d_out_bwd[yy][xx][k][PW] = d_in_bwd[yy][xx-1][k][PE];
        end else begin : g_w0
          assign d_in_fwd[yy][xx][k][PW]  = FWD_IDLE;
          assign d_out_bwd[yy][xx][k][PW] = BWD_IDLE;
        end
        if (xx < COLS - 1) begin : g_e
          assign d_in_fwd[yy][xx][k][PE]  = d_out_fwd[yy][xx+1][k][PW];
          assign d_out_bwd[yy][xx][k][PE] = d_in_bwd[yy][xx+1][k][PW];
        end else begin : g_e0
          assign d_in_fwd[yy][xx][k][PE]  = FWD_IDLE;
          assign d_out_bwd[yy][xx][k][PE] = BWD_IDLE;
        end
        if (yy > 0) begin : g_n
          assign d_in_fwd[yy][xx][k][PN]  = d_out_fwd[yy-1][xx][k][PS];
          assign d_out_bwd[yy][xx][k][PN] = d_in_bwd[yy-1][xx][k][PS];
        end else begin : g_n0
          assign d_in_fwd[yy][xx][k][PN]  = FWD_IDLE;
          assign d_out_bwd[yy][xx][k][PN] = BWD_IDLE;
        end
        if (yy < ROWS - 1) begin : g_s
          assign d_in_fwd[yy][xx][k][PS]  = d_out_fwd[yy+1][xx][k][PN];
          assign d_out_bwd[yy][xx][k][PS] = d_in_bwd[yy+1][xx][k][PN];
        end else begin : g_s0
          assign d_in_fwd[yy][xx][k][PS]  = FWD_IDLE;
          assign d_out_bwd[yy][xx][k][PS] = BWD_IDLE;
        end
      end

      localparam int BASE = (yy * COLS + xx) * NLEV;
      link_fwd_t ni_ip_fwd [NLEV];
      link_bwd_t ni_ip_bwd [NLEV];
      flit_t     ni_out_data[NLEV];
      for (genvar j = 0; j < NLEV; j++) begin : g_ip
        assign ni_ip_fwd[j]          = ip_fwd[BASE + j];
        assign ip_bwd[BASE + j]      = ni_ip_bwd[j];
        assign ip_out_data[BASE + j] = ni_out_data[j];
      end

      rvnoc_rg #(.COLS(COLS), .ROWS(ROWS), .TNB(TNB), .NLEV(NLEV)) u_rg (
        .clk, .rst_n,
        .x(COORD_W'(xx)), .y(COORD_W'(yy)),
        .dir_in_fwd (d_in_fwd[yy][xx]),
        .dir_in_bwd (d_in_bwd[yy][xx]),
        .dir_out_fwd(d_out_fwd[yy][xx]),
        .dir_out_bwd(d_out_bwd[yy][xx]),
        .loc_in_fwd (li_fwd[yy][xx]),
        .loc_in_bwd (li_bwd[yy][xx]),
        .loc_out_fwd(lo_fwd[yy][xx]),
        .loc_out_bwd(lo_bwd[yy][xx])
      );

      rvnoc_ni #(.NLEV(NLEV)) u_ni (
        .clk, .rst_n,
        .rg_in_fwd (li_fwd[yy][xx]),
        .rg_in_bwd (li_bwd[yy][xx]),
        .rg_out_fwd(lo_fwd[yy][xx]),
        .rg_out_bwd(lo_bwd[yy][xx]),
        .ip_fwd    (ni_ip_fwd),
        .ip_bwd    (ni_ip_bwd),
        .ip_step   (ip_step[BASE +: NLEV]),
        .ip_out_v  (ip_out_v[BASE +: NLEV]),
        .ip_out_data(ni_out_data)
      );
    end
  end

endmodule
