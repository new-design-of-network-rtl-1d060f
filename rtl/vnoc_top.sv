// vnoc_top: the two virtual-router networks side by side.
//
// An RVNOC (time-shared local ports, fewer links) and an LVNOC (one local
// link per level, lower latency), each COLS x ROWS global routers with NLEV
// levels, i.e. COLS*ROWS*NLEV IPs each (27 with the default 3x3x3).  The
// two networks share only clock and reset; each has its own IP ports
// (rv_* and lv_*), numbered as in rvnoc_mesh / lvnoc_mesh.
//
// The publication proposes both versions; neither is preferred, so both are built.
module vnoc_top
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
  input  link_fwd_t      rv_ip_fwd [NIP],
  output link_bwd_t      rv_ip_bwd [NIP],
  output logic [NIP-1:0] rv_ip_step,
  output logic [NIP-1:0] rv_ip_out_v,
  output flit_t          rv_ip_out_data[NIP],
  input  link_fwd_t      lv_ip_fwd [NIP],
  output link_bwd_t      lv_ip_bwd [NIP],
  output logic [NIP-1:0] lv_ip_step,
  output logic [NIP-1:0] lv_ip_out_v,
  output flit_t          lv_ip_out_data[NIP]
);

  rvnoc_mesh #(.COLS(COLS), .ROWS(ROWS), .NLEV(NLEV), .TNB(TNB)) u_rvnoc (
    .clk, .rst_n,
    .ip_fwd(rv_ip_fwd), .ip_bwd(rv_ip_bwd), .ip_step(rv_ip_step),
    .ip_out_v(rv_ip_out_v), .ip_out_data(rv_ip_out_data)
  );

  lvnoc_mesh #(.COLS(COLS), .ROWS(ROWS), .NLEV(NLEV), .TNB(TNB)) u_lvnoc (
    .clk, .rst_n,
    .ip_fwd(lv_ip_fwd), .ip_bwd(lv_ip_bwd), .ip_step(lv_ip_step),
    .ip_out_v(lv_ip_out_v), .ip_out_data(lv_ip_out_data)
  );

endmodule
