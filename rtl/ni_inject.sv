// ni_inject: network-interface side that sends IP packets into the levels.
//
// NLEV IPs share one network interface and NLEV virtual levels (separate
// meshes).  When IP j raises req with a header on its link, the interface
// gives it a level: the level numbered like the destination IP (@IP D) if
// that level is free in this step, or, when that level is already carrying
// another IP's packet (or @IP D names no level), the lowest-numbered free
// level.  IPs are served in index order.  The IP stays connected to its level
// until the router answers ack 11 (packet delivered) or ack 10 (refused; the
// IP resends and is given a level again).  The connection is
// combinational, so the header reaches the router in the step the level is
// given.
//
// lv_en[k] is the step of level k: always 1 in the LVNOC, level k's time slot
// in the RVNOC.  ip_step[j] tells IP j in which clock edges its link moves.
// lv_fwd/lv_bwd are the per-level links (used directly by the LVNOC);
// cur_v/cur_lvl give each IP's level, with which the RVNOC interface gates
// the IP links onto its single time-shared wire.
//
// From the publication: a packet goes on the level of its destination IP unless another
// IP of the same interface uses it, then on another free level.  This design's choices:
// lowest free level, IP index order, level held until ack 11/10.
module ni_inject
  import vnoc_pkg::*;
#(
  parameter int NLEV = 3,
  localparam int LW  = (NLEV > 1) ? $clog2(NLEV) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NLEV-1:0] lv_en,
  input  link_fwd_t       ip_fwd [NLEV],
  output link_bwd_t       ip_bwd [NLEV],
  output logic [NLEV-1:0] ip_step,
  output link_fwd_t       lv_fwd [NLEV],
  input  link_bwd_t       lv_bwd [NLEV],
  output logic [NLEV-1:0] cur_v,
  output logic [LW-1:0]   cur_lvl[NLEV]
);

  logic [NLEV-1:0] asg_v;
  logic [LW-1:0]   asg_lvl[NLEV];
  logic [NLEV-1:0] new_v;
  logic [LW-1:0]   new_lvl[NLEV];

  always_comb begin
    logic [NLEV-1:0] busy;
    header_t         h;
    int              pick;
    busy = '0;
    for (int j = 0; j < NLEV; j++)
      if (asg_v[j]) busy[asg_lvl[j]] = 1'b1;
    new_v = '0;
    for (int j = 0; j < NLEV; j++) begin
      new_lvl[j] = '0;
      h    = header_t'(ip_fwd[j].data);
      pick = -1;
      if (!asg_v[j] && ip_fwd[j].req) begin
        if (int'(h.ipd) < NLEV && !busy[h.ipd[LW-1:0]]) begin
          // preferred level is free: wait for its step
          if (lv_en[h.ipd[LW-1:0]]) pick = int'(h.ipd);
        end else begin
          for (int k = NLEV - 1; k >= 0; k--)
            if (!busy[k] && lv_en[k]) pick = k;
        end
      end
      if (pick >= 0) begin
        new_v[j]    = 1'b1;
        new_lvl[j]  = LW'(pick);
        busy[pick]  = 1'b1;
      end
    end
  end

  always_comb begin
    for (int j = 0; j < NLEV; j++) begin
      cur_v[j]   = asg_v[j] || new_v[j];
      cur_lvl[j] = asg_v[j] ? asg_lvl[j] : new_lvl[j];
    end
    for (int k = 0; k < NLEV; k++) lv_fwd[k] = FWD_IDLE;
    for (int j = 0; j < NLEV; j++) begin
      ip_bwd[j]  = BWD_IDLE;
      ip_step[j] = 1'b0;
      if (cur_v[j]) begin
        lv_fwd[cur_lvl[j]] = ip_fwd[j];
        ip_bwd[j]          = lv_bwd[cur_lvl[j]];
        ip_step[j]         = lv_en[cur_lvl[j]];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asg_v <= '0;
      for (int j = 0; j < NLEV; j++) asg_lvl[j] <= '0;
    end else begin
      for (int j = 0; j < NLEV; j++) begin
        if (new_v[j]) begin
          asg_v[j]   <= 1'b1;
          asg_lvl[j] <= new_lvl[j];
        end else if (asg_v[j] && lv_en[asg_lvl[j]] && lv_bwd[asg_lvl[j]].ack_v &&
                     (lv_bwd[asg_lvl[j]].ack == ACK_DONE || lv_bwd[asg_lvl[j]].ack == ACK_ERR)) begin
          asg_v[j] <= 1'b0;
        end
      end
    end
  end

  // A level carries one IP at a time.
  for (genvar a = 0; a < NLEV; a++) begin : g_chk_a
    for (genvar b = a + 1; b < NLEV; b++) begin : g_chk_b
      a_one_ip_per_level: assert property (@(posedge clk) disable iff (!rst_n)
        !(cur_v[a] && cur_v[b] && cur_lvl[a] == cur_lvl[b]));
    end
  end

endmodule
