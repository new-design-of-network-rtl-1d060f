// tb_rvnoc_rg: one RVNOC global router (three time-shared levels with one
// shared local input and output) surrounded by neighbour models; the checks
// are described in tb_rg_body.svh.  The shared local input is driven by the
// model of the level whose slot it is; the shared local output is read by
// that level's receiver model, which also drives the shared acknowledge.
//
// Reference: routers sharing the global router's links in turn (slots 1,2,0) follow the
// publication.  This bench's choices: the shared body, neighbour models and checks.
module tb_rvnoc_rg;
  import vnoc_pkg::*;
  localparam bit RV = 1'b1;

  link_fwd_t loc_in_fwd, loc_out_fwd;
  link_bwd_t loc_in_bwd, loc_out_bwd;
  link_fwd_t dir_in_fwd [3][4], dir_out_fwd [3][4];
  link_bwd_t dir_in_bwd [3][4], dir_out_bwd [3][4];

`include "tb_rg_body.svh"

  rvnoc_rg dut (.clk, .rst_n, .x, .y, .dir_in_fwd, .dir_in_bwd, .dir_out_fwd, .dir_out_bwd,
                .loc_in_fwd, .loc_in_bwd, .loc_out_fwd, .loc_out_bwd);

  always_comb begin
    loc_in_fwd  = FWD_IDLE;
    loc_out_bwd = BWD_IDLE;
    for (int k = 0; k < 3; k++) begin
      for (int p = 0; p < 4; p++) begin
        dir_in_fwd[k][p]  = in_fwd_v[k][p];
        in_bwd_v[k][p]    = dir_in_bwd[k][p];
        out_fwd_v[k][p]   = dir_out_fwd[k][p];
        dir_out_bwd[k][p] = out_bwd_v[k][p];
      end
      in_bwd_v[k][4]  = lv_step[k] ? loc_in_bwd  : BWD_IDLE;
      out_fwd_v[k][4] = lv_step[k] ? loc_out_fwd : FWD_IDLE;
      if (lv_step[k]) begin
        loc_in_fwd  = in_fwd_v[k][4];
        loc_out_bwd = out_bwd_v[k][4];
      end
    end
  end

  // the shared local wires carry nothing of the other levels
  always @(negedge clk) if (rst_n)
    for (int k = 0; k < 3; k++)
      if (!lv_step[k] && in_fwd_v[k][4].req) check(0, "local input driven off-slot");
endmodule
