// tb_lvnoc_rg: one LVNOC global router (three levels working on every
// clock, each with its own local input and output) surrounded by neighbour
// models; the checks are described in tb_rg_body.svh.
//
// Reference: three independent elementary routers per global router follow the
// publication.  This bench's choices: the shared body, neighbour models and checks.
module tb_lvnoc_rg;
  import vnoc_pkg::*;
  localparam bit RV = 1'b0;

  link_fwd_t loc_in_fwd [3], loc_out_fwd [3];
  link_bwd_t loc_in_bwd [3], loc_out_bwd [3];
  link_fwd_t dir_in_fwd [3][4], dir_out_fwd [3][4];
  link_bwd_t dir_in_bwd [3][4], dir_out_bwd [3][4];

`include "tb_rg_body.svh"

  lvnoc_rg dut (.clk, .rst_n, .x, .y, .dir_in_fwd, .dir_in_bwd, .dir_out_fwd, .dir_out_bwd,
                .loc_in_fwd, .loc_in_bwd, .loc_out_fwd, .loc_out_bwd);

  always_comb
    for (int k = 0; k < 3; k++) begin
      for (int p = 0; p < 4; p++) begin
        dir_in_fwd[k][p]  = in_fwd_v[k][p];
        in_bwd_v[k][p]    = dir_in_bwd[k][p];
        out_fwd_v[k][p]   = dir_out_fwd[k][p];
        dir_out_bwd[k][p] = out_bwd_v[k][p];
      end
      loc_in_fwd[k]  = in_fwd_v[k][4];
      in_bwd_v[k][4] = loc_in_bwd[k];
      out_fwd_v[k][4] = loc_out_fwd[k];
      loc_out_bwd[k] = out_bwd_v[k][4];
    end
endmodule
