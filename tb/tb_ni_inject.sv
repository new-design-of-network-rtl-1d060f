// tb_ni_inject: the sending side of the network interface.
//
// Three IP models send random packets (random destination IP @IP D and
// length) through the interface; three level models acknowledge like router
// local inputs and refuse about 15% of headers with ack 10.  Level steps
// follow the RVNOC slot sequence (1,2,0) in the first half of the run and
// are always on (LVNOC) in the second half.  At every clock edge the bench
// computes, from its own record of which IP holds which level, which IP must
// get which level: the @IP D level when no other IP holds it (waiting for that
// level's step), otherwise the lowest free level whose step it is, IPs in
// index order; it compares this with cur_v / cur_lvl.  It also checks that
// an IP's link moves only in its level's step and that every packet arrives
// whole on the level that was chosen.
//
// Reference: sending on the IP's own level when free, else another free level, follows
// the publication.  This bench's choices: tie-breaking by lower IP index, as in the RTL.
module tb_ni_inject;
  import vnoc_pkg::*;
  localparam int NL = 3, NPK = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NL-1:0] lv_en, ip_step, cur_v;
  link_fwd_t     ip_fwd [NL], lv_fwd [NL];
  link_bwd_t     ip_bwd [NL], lv_bwd [NL];
  logic [1:0]    cur_lvl [NL];
  int checks = 0, failures = 0;
  int n_pref = 0, n_other = 0, n_refuse = 0, n_recv = 0;
  int slot = 1;
  bit lv_mode = 0;

  ni_inject dut (.clk, .rst_n, .lv_en, .ip_fwd, .ip_bwd, .ip_step, .lv_fwd, .lv_bwd,
                 .cur_v, .cur_lvl);

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endfunction

  always @(posedge clk or negedge rst_n)
    if (!rst_n) slot <= 1; else slot <= (slot + 1) % NL;
  always_comb
    for (int k = 0; k < NL; k++) lv_en[k] = lv_mode ? 1'b1 : (slot == (k + 1) % NL);

  flit_t pk [NL][NPK][16];
  int    pk_len [NL][NPK];
  bit    pk_got [NL][NPK];

  // ------------------------------------------------------------- IP models
  bit s_act [NL], s_gap [NL];
  int s_idx [NL], s_cnt [NL];
  always_comb
    for (int j = 0; j < NL; j++) begin
      ip_fwd[j] = FWD_IDLE;
      if (s_act[j] && !s_gap[j] && s_idx[j] <= pk_len[j][s_cnt[j]] &&
          !(ip_bwd[j].ack_v && ip_bwd[j].ack == ACK_ERR)) begin
        ip_fwd[j].req  = 1'b1;
        ip_fwd[j].data = pk[j][s_cnt[j]][s_idx[j]];
      end
    end

  // model of the level assignment
  int held [NL];   // level held by IP j, -1 if none
  always @(posedge clk) begin
    bit        st [NL];
    link_bwd_t b  [NL];
    bit        rq [NL];
    bit        busy [NL];
    if (rst_n) begin
      for (int j = 0; j < NL; j++) begin st[j] = ip_step[j]; b[j] = ip_bwd[j]; rq[j] = ip_fwd[j].req; end
      // expected assignment in this step
      for (int k = 0; k < NL; k++) busy[k] = 1'b0;
      for (int j = 0; j < NL; j++) if (held[j] >= 0) busy[held[j]] = 1'b1;
      for (int j = 0; j < NL; j++) begin
        if (held[j] >= 0) begin
          check(cur_v[j] && int'(cur_lvl[j]) == held[j], "IP keeps its level");
        end else if (rq[j]) begin
          int d, pick;
          d = int'(ip_fwd[j].data[19:16]);
          pick = -1;
          if (d < NL && !busy[d]) begin
            if (lv_en[d]) pick = d;
          end else
            for (int k = NL - 1; k >= 0; k--) if (!busy[k] && lv_en[k]) pick = k;
          if (pick >= 0) begin
            check(cur_v[j] && int'(cur_lvl[j]) == pick, "level chosen as modelled");
            busy[pick] = 1'b1;
            held[j] = pick;
            if (pick == d) n_pref++; else n_other++;
          end else
            check(!cur_v[j], "no level while none may be given");
        end else
          check(!cur_v[j], "no level without a request");
        if (cur_v[j]) check(ip_step[j] == lv_en[cur_lvl[j]], "IP moves in its level's step");
        else          check(!ip_step[j], "no step without a level");
      end
      for (int j = 0; j < NL; j++)
        if (held[j] >= 0 && st[j] && b[j].ack_v && (b[j].ack == ACK_DONE || b[j].ack == ACK_ERR))
          held[j] = -1;
      #1;
      for (int j = 0; j < NL; j++)
        if (!st[j]) s_gap[j] = 1'b0;     // resend after one clock
        else if (s_act[j]) begin
          s_gap[j] = 1'b0;
          if (b[j].ack_v && b[j].ack == ACK_ERR) begin
            s_idx[j] = 0; s_gap[j] = 1'b1;
          end else if (b[j].ack_v && b[j].ack == ACK_DONE) begin
            s_act[j] = 1'b0; s_cnt[j]++;
          end else if (rq[j]) s_idx[j]++;
        end
      for (int j = 0; j < NL; j++)
        if (!s_act[j] && s_cnt[j] < NPK && ($urandom % 4 == 0)) begin
          s_act[j] = 1'b1; s_idx[j] = 0; s_gap[j] = 1'b0;
        end
    end
  end

  // ----------------------------------------------------------- level models
  bit    r_act [NL];
  int    r_n [NL], r_tot [NL];
  flit_t r_buf [NL][16];
  always @(posedge clk) if (rst_n)
    for (int k = 0; k < NL; k++)
      if (lv_en[k]) begin
        link_bwd_t b;
        b = BWD_IDLE;
        if (lv_fwd[k].req) begin
          if (!r_act[k]) begin
            if ($urandom % 100 < 15) begin
              b.ack_v = 1'b1; b.ack = ACK_ERR; n_refuse++;
            end else begin
              r_act[k] = 1'b1; r_n[k] = 0;
              r_tot[k] = int'(lv_fwd[k].data[15:8]) + 1;
            end
          end
          if (r_act[k]) begin
            r_buf[k][r_n[k]] = lv_fwd[k].data;
            r_n[k]++;
            b.ack_v = (r_n[k] <= 2 || r_n[k] == r_tot[k]);
            b.ack   = (r_n[k] == r_tot[k]) ? ACK_DONE : (r_n[k] == 1) ? ACK_HDR : ACK_BODY;
            if (r_n[k] == r_tot[k]) begin
              r_act[k] = 1'b0;
              deliver(k);
            end
          end
        end
        lv_bwd[k] <= b;
      end

  function automatic void deliver(int k);
    int j, s;
    bit ok;
    j = int'(r_buf[k][0][23:20]);
    s = -1;
    if (j < NL) s = s_cnt[j];
    n_recv++;
    if (s < 0 || s >= NPK) begin check(0, "unknown packet"); return; end
    check(!pk_got[j][s], "packet delivered once");
    pk_got[j][s] = 1'b1;
    ok = (r_tot[k] == pk_len[j][s] + 1);
    for (int i = 0; i < r_tot[k] && i < 16; i++) ok &= (r_buf[k][i] == pk[j][s][i]);
    check(ok, "packet contents");
  endfunction

  initial begin
    for (int j = 0; j < NL; j++) begin
      held[j] = -1; s_act[j] = 0; s_cnt[j] = 0; s_gap[j] = 0; s_idx[j] = 0;
      r_act[j] = 0; lv_bwd[j] = BWD_IDLE;
      for (int q = 0; q < NPK; q++) begin
        pk_len[j][q] = $urandom % 16;
        pk_got[j][q] = 0;
        pk[j][q][0] = make_header(4'd1, 4'd1, 4'(j), 4'($urandom % NL), 8'(pk_len[j][q]),
                                  4'($urandom % 3), 4'($urandom % 3));
        for (int i = 1; i < 16; i++) pk[j][q][i] = {2'(j), 8'(q), 4'(i), 18'($urandom)};
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (s_cnt[0] < NPK / 2 || s_cnt[1] < NPK / 2 || s_cnt[2] < NPK / 2) @(negedge clk);
    lv_mode = 1'b1;
    while (s_cnt[0] < NPK || s_cnt[1] < NPK || s_cnt[2] < NPK) @(negedge clk);
    repeat (10) @(negedge clk);
    for (int j = 0; j < NL; j++) for (int q = 0; q < NPK; q++) check(pk_got[j][q], "packet arrived");
    $display("preferred=%0d other=%0d refused=%0d received=%0d", n_pref, n_other, n_refuse, n_recv);
    check(n_pref > 0 && n_other > 0 && n_refuse > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("stuck: sent %0d %0d %0d", s_cnt[0], s_cnt[1], s_cnt[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
