// routing_unit: output allocation of one elementary router.
//
// In every step (clock edge with en high) it looks at each input that
// offers a packet header and is not already sending, and chooses an output:
//   * the port given by XY routing when its state signal STA.P is 0;
//   * otherwise, while the packet's misroute count NB is below TNB, another
//     free port: first the two ports at right angles (the one that shortens
//     the remaining distance on the other axis first), then the port
//     opposite to the XY port.  Taking a port other than the XY port adds
//     one to NB;
//   * when NB has reached TNB only the XY port is allowed;
//   * if nothing can be taken, the packet waits for its XY port.  A waiting
//     packet reserves that port (its STA.P reads 1 for everyone else) and is
//     served before new requests, which gives first-come first-served order.
// Requests in the same step are served one after the other, highest NB
// first and then in the fixed order E > S > W > N > L, so one output is
// never given to two inputs.  The adaptive rule never sends a packet back
// through the port it came in on, and ports that would leave the mesh are
// never free.  An output stays owned until its input ends the transfer
// (ack 11 or ack 10 from downstream); after ack 10 the packet is routed
// again.  STA.PW..STA.PL are brought out as `sta`.
//
// East is x+1 and North is y-1.  The grant takes effect at the step edge:
// `start`/`start_nb` go to the input port, `sel`/`sel_v` to the crossbar.
//
// From the publication: XY routing, adaptive choice while NB < TNB, NB counting,
// priorities NB then E > S > W > N > L, first-come first-served on a busy port.  This
// design's choices: the generalised port order, reservation of the XY port by a waiting
// packet, sequential allocation instead of detecting double grants, border ports busy.
module routing_unit
  import vnoc_pkg::*;
#(
  parameter int COLS = 3,
  parameter int ROWS = 3,
  parameter int TNB  = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [COORD_W-1:0]      x,
  input  logic [COORD_W-1:0]      y,
  input  logic [NP-1:0]           hdr_v,
  input  header_t                 hdr     [NP],
  input  logic [NB_W-1:0]         hdr_nb  [NP],
  input  logic [NP-1:0]           tx_busy,
  input  logic [NP-1:0]           tx_end,
  output logic [NP-1:0]           start,
  output logic [NB_W-1:0]         start_nb[NP],
  output logic [2:0]              sel     [NP],   // per output: owning input
  output logic [NP-1:0]           sel_v,
  output logic [NP-1:0]           sta,            // STA.PW .. STA.PL
  output logic [NP-1:0]           misroute        // grant this step is not the XY port
);

  // fixed priority rank, higher wins: E > S > W > N > L
  function automatic logic [2:0] rank(input logic [2:0] p);
    case (dir_e'(p))
      DIR_E:   return 3'd4;
      DIR_S:   return 3'd3;
      DIR_W:   return 3'd2;
      DIR_N:   return 3'd1;
      default: return 3'd0;
    endcase
  endfunction

  function automatic dir_e opposite(input dir_e d);
    case (d)
      DIR_E:   return DIR_W;
      DIR_W:   return DIR_E;
      DIR_N:   return DIR_S;
      DIR_S:   return DIR_N;
      default: return DIR_L;
    endcase
  endfunction

  logic [2:0]  owner   [NP];
  logic [NP-1:0] own_v;
  logic [NP-1:0] wait_v;
  dir_e        wait_dir[NP];

  // ports that exist in this position of the mesh
  logic [NP-1:0] present;
  always_comb begin
    present        = '1;
    present[DIR_W] = (x != 0);
    present[DIR_E] = (int'(x) != COLS-1);
    present[DIR_N] = (y != 0);
    present[DIR_S] = (int'(y) != ROWS-1);
  end

  // state signals: busy, reserved by a waiting packet, or absent
  always_comb begin
    sta = own_v | ~present;
    for (int i = 0; i < NP; i++)
      if (wait_v[i]) sta[wait_dir[i]] = 1'b1;
  end

  // ------------------------------------------------------------ allocation
  logic [NP-1:0] grant;
  dir_e          grant_dir [NP];
  logic [NP-1:0] new_wait;
  dir_e          new_wait_dir[NP];

  always_comb begin
    logic [NP-1:0] taken;      // outputs unavailable during this pass
    logic [NP-1:0] done;
    logic [NP-1:0] reqs;
    int            best;
    logic [NB_W+3:0] best_key, key;
    header_t       h;
    dir_e          xyd, p1, p2, opp, pick;
    logic          found;
    logic [NP-1:0] avail;
    grant        = '0;
    new_wait     = '0;
    misroute     = '0;
    taken        = own_v | ~present;
    done         = '0;
    reqs         = hdr_v & ~tx_busy;
    for (int i = 0; i < NP; i++) begin
      grant_dir[i]    = DIR_L;
      new_wait_dir[i] = DIR_L;
      start_nb[i]     = hdr_nb[i];
    end
    for (int step = 0; step < NP; step++) begin
      // pick the highest-priority request not yet served
      best     = -1;
      best_key = '0;
      key      = '0;
      h        = hdr[0];
      xyd      = DIR_L;
      p1       = DIR_N;
      p2       = DIR_S;
      opp      = DIR_L;
      pick     = DIR_L;
      found    = 1'b0;
      avail    = '0;
      for (int i = 0; i < NP; i++) begin
        key = {wait_v[i], hdr_nb[i], rank(3'(i))};
        if (reqs[i] && !done[i] && (best < 0 || key > best_key)) begin
          best     = i;
          best_key = key;
        end
      end
      if (best >= 0) begin
        done[best] = 1'b1;
        h     = hdr[best];
        xyd   = xy_dir(x, y, h.xd, h.yd);
        // reserved ports are unavailable to new requests
        avail = ~taken;
        if (!wait_v[best])
          for (int j = 0; j < NP; j++)
            if (wait_v[j] && j != best) avail[wait_dir[j]] = 1'b0;
        found = 1'b0;
        pick  = xyd;
        if (avail[xyd]) begin
          found = 1'b1;
        end else if (!wait_v[best] && int'(hdr_nb[best]) < TNB && xyd != DIR_L) begin
          if (xyd == DIR_E || xyd == DIR_W) begin
            p1 = (h.yd > y) ? DIR_S : DIR_N;
            p2 = (h.yd > y) ? DIR_N : DIR_S;
          end else begin
            p1 = DIR_E;
            p2 = DIR_W;
          end
          opp = opposite(xyd);
          if (avail[p1] && int'(p1) != best) begin
            found = 1'b1; pick = p1;
          end else if (avail[p2] && int'(p2) != best) begin
            found = 1'b1; pick = p2;
          end else if (avail[opp] && int'(opp) != best) begin
            found = 1'b1; pick = opp;
          end
        end
        if (found) begin
          grant[best]     = 1'b1;
          grant_dir[best] = pick;
          taken[pick]     = 1'b1;
          if (pick != xyd) begin
            misroute[best] = 1'b1;
            start_nb[best] = (hdr_nb[best] == '1) ? hdr_nb[best] : hdr_nb[best] + 1'b1;
          end
        end else begin
          new_wait[best]     = 1'b1;
          new_wait_dir[best] = xyd;
        end
      end
    end
  end

  assign start = en ? grant : '0;

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_v  <= '0;
      wait_v <= '0;
      for (int i = 0; i < NP; i++) begin
        owner[i]    <= '0;
        wait_dir[i] <= DIR_L;
      end
    end else if (en) begin
      for (int o = 0; o < NP; o++)
        if (own_v[o] && tx_end[owner[o]]) own_v[o] <= 1'b0;
      for (int i = 0; i < NP; i++) begin
        if (grant[i]) begin
          own_v[grant_dir[i]] <= 1'b1;
          owner[grant_dir[i]] <= 3'(i);
          wait_v[i]           <= 1'b0;
        end else if (new_wait[i]) begin
          wait_v[i]   <= 1'b1;
          wait_dir[i] <= new_wait_dir[i];
        end
      end
    end
  end

  assign sel   = owner;
  assign sel_v = own_v;

  // No output is owned twice: each input owns at most one output.
  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(grant & ~(hdr_v & ~tx_busy)) == 0);

endmodule
