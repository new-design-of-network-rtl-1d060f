// rvnoc_ni: network interface of an RVNOC global router.
//
// NLEV IPs talk to one global router through a single local input and a
// single local output, shared in time: slot (k+1) mod NLEV belongs to level
// k (its own half-cycle counter, in step with the routers' counters).
//   * Sending: ni_inject gives each IP a level; the zero-set unit lets IP j
//     through only in the slot of its level, and OR gates merge the IPs onto
//     DATA_IN_LOCAL_RG (rg_in_fwd).  The shared acknowledge is read by the
//     level whose slot it is.
//   * Receiving: the word on DATA_OUT_LOCAL_RG (rg_out_fwd) in slot k is
//     level k's; ni_eject stores or passes it and its per-level
//     acknowledges are gated to their slots and ORed back (rg_out_bwd).
// ip_step[j] marks the clock edges at which IP j's sending link moves;
// ip_out_v[d] marks a flit for IP d, which comes only in IP d's own slot.
//
// From the publication: 0-set unit, OR gates and counter on a single shared local link.
// This design's choice: the unused per-level sending links of ni_inject (inj_lv_fwd) are
// replaced by the gated shared wire.
module rvnoc_ni
  import vnoc_pkg::*;
#(
  parameter int NLEV  = 3,
  parameter int DEPTH = 16,
  localparam int SW   = (NLEV > 1) ? $clog2(NLEV) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // shared local port of the global router
  output link_fwd_t       rg_in_fwd,
  input  link_bwd_t       rg_in_bwd,
  input  link_fwd_t       rg_out_fwd,
  output link_bwd_t       rg_out_bwd,
  // IPs
  input  link_fwd_t       ip_fwd [NLEV],
  output link_bwd_t       ip_bwd [NLEV],
  output logic [NLEV-1:0] ip_step,
  output logic [NLEV-1:0] ip_out_v,
  output flit_t           ip_out_data[NLEV]
);

  logic [SW-1:0]   slot;
  logic [NLEV-1:0] lv_en;
  logic [SW-1:0]   lv_slot[NLEV];

  half_cycle_counter #(.NLEV(NLEV)) u_hcc (.clk, .rst_n, .slot);

  for (genvar k = 0; k < NLEV; k++) begin : g_slot
    assign lv_slot[k] = SW'((k + 1) % NLEV);
    assign lv_en[k]   = (slot == lv_slot[k]);
  end

  // ------------------------------------------------------------- sending
  link_fwd_t        inj_lv_fwd[NLEV];
  link_bwd_t        inj_lv_bwd[NLEV];
  logic [NLEV-1:0]  cur_v;
  logic [SW-1:0]    cur_lvl[NLEV];
  logic [SW-1:0]    cur_slot[NLEV];
  logic [FWD_W-1:0] ip_bits[NLEV], ip_gated[NLEV];
  logic [FWD_W-1:0] rg_in_bits;

  ni_inject #(.NLEV(NLEV)) u_inj (
    .clk, .rst_n, .lv_en, .ip_fwd, .ip_bwd, .ip_step,
    .lv_fwd(inj_lv_fwd), .lv_bwd(inj_lv_bwd), .cur_v, .cur_lvl
  );

  for (genvar j = 0; j < NLEV; j++) begin : g_ip
    assign inj_lv_bwd[j] = lv_en[j] ? rg_in_bwd : BWD_IDLE;
    assign cur_slot[j]   = lv_slot[cur_lvl[j]];
    assign ip_bits[j]    = ip_fwd[j];
  end

  zero_set_unit #(.N(NLEV), .W(FWD_W), .SW(SW)) u_zero_in (
    .din(ip_bits), .act(cur_v), .lvl_slot(cur_slot), .slot, .dout(ip_gated)
  );
  or_combiner #(.N(NLEV), .W(FWD_W)) u_or_in (.din(ip_gated), .dout(rg_in_bits));
  assign rg_in_fwd = link_fwd_t'(rg_in_bits);

  // ----------------------------------------------------------- receiving
  link_fwd_t        ej_lv_fwd[NLEV];
  link_bwd_t        ej_lv_bwd[NLEV];
  logic [BWD_W-1:0] ack_bits[NLEV], ack_gated[NLEV];
  logic [BWD_W-1:0] rg_out_bwd_bits;

  for (genvar k = 0; k < NLEV; k++) begin : g_ej
    assign ej_lv_fwd[k] = lv_en[k] ? rg_out_fwd : FWD_IDLE;
    assign ack_bits[k]  = ej_lv_bwd[k];
  end

  ni_eject #(.NLEV(NLEV), .DEPTH(DEPTH)) u_ej (
    .clk, .rst_n, .lv_en, .lv_fwd(ej_lv_fwd), .lv_bwd(ej_lv_bwd),
    .ip_out_v, .ip_out_data
  );

  zero_set_unit #(.N(NLEV), .W(BWD_W), .SW(SW)) u_zero_ack (
    .din(ack_bits), .act('1), .lvl_slot(lv_slot), .slot, .dout(ack_gated)
  );
  or_combiner #(.N(NLEV), .W(BWD_W)) u_or_ack (.din(ack_gated), .dout(rg_out_bwd_bits));
  assign rg_out_bwd = link_bwd_t'(rg_out_bwd_bits);

endmodule
