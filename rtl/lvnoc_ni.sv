// lvnoc_ni: network interface of an LVNOC global router.
//
// NLEV IPs and NLEV separate local links, one per elementary router of the
// global router; everything works on every clock edge, so there is no slot
// counting.  ni_inject connects each IP's outgoing packet to a level
// (preferring the level of the destination IP, else any free one);
// ni_eject delivers incoming packets to their IP directly or through the
// NLEV-1 buffers of that IP.  ip_step is always 1 here and is kept so that
// both interfaces look alike to the IPs.
//
// From the publication: one local link per level.  Nothing is time-shared.
module lvnoc_ni
  import vnoc_pkg::*;
#(
  parameter int NLEV  = 3,
  parameter int DEPTH = 16,
  localparam int LW   = (NLEV > 1) ? $clog2(NLEV) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  output link_fwd_t       rg_in_fwd [NLEV],
  input  link_bwd_t       rg_in_bwd [NLEV],
  input  link_fwd_t       rg_out_fwd[NLEV],
  output link_bwd_t       rg_out_bwd[NLEV],
  input  link_fwd_t       ip_fwd [NLEV],
  output link_bwd_t       ip_bwd [NLEV],
  output logic [NLEV-1:0] ip_step,
  output logic [NLEV-1:0] ip_out_v,
  output flit_t           ip_out_data[NLEV]
);

  logic [NLEV-1:0] cur_v;
  logic [LW-1:0]   cur_lvl[NLEV];

  ni_inject #(.NLEV(NLEV)) u_inj (
    .clk, .rst_n, .lv_en('1), .ip_fwd, .ip_bwd, .ip_step,
    .lv_fwd(rg_in_fwd), .lv_bwd(rg_in_bwd), .cur_v, .cur_lvl
  );

  ni_eject #(.NLEV(NLEV), .DEPTH(DEPTH)) u_ej (
    .clk, .rst_n, .lv_en('1), .lv_fwd(rg_out_fwd), .lv_bwd(rg_out_bwd),
    .ip_out_v, .ip_out_data
  );

endmodule
