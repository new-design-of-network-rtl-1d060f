// tb_rg_body.svh: common body of the global-router testbenches.
//
// Included inside a module that declares `localparam bit RV` (1 = RVNOC
// global router, 0 = LVNOC), instantiates the router as `dut` and maps its
// ports onto per-level views:
//   in_fwd_v[k][p] / in_bwd_v[k][p]   inputs of level k, p = W E N S L
//   out_fwd_v[k][p] / out_bwd_v[k][p] outputs of level k
// and uses lv_step[k] (this file's model of level k's step).
//
// For each of the 9 positions of a 3x3 mesh every present input of every
// level sends random packets, and every output has a receiver model that
// acknowledges like a router input and refuses about 15% of headers.
// Checks: every packet arrives once, complete, on the level it was sent on,
// on its XY port with unchanged NB or on a legal adaptive port with NB + 1;
// the level's step follows the slot sequence 1,2,0 (RVNOC); in the RVNOC
// the shared local output and local-input acknowledge only carry the signals
// of the level whose slot it is.
//
// Reference: router rules as in the publication.  This file's choices: the neighbour
// models, the per-level views and the slot model.

  localparam int TNB = 3, NPK = 6, NL = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]    x = 4'd1, y = 4'd1;
  link_fwd_t     in_fwd_v [NL][5], out_fwd_v [NL][5];
  link_bwd_t     in_bwd_v [NL][5], out_bwd_v [NL][5];
  logic [NL-1:0] lv_step;
  int            tb_slot;
  int checks = 0, failures = 0;
  int n_sent = 0, n_recv = 0, n_refuse = 0, n_adapt = 0;

  // slot model: 1 after reset, then +1 mod NL every clock
  always @(posedge clk or negedge rst_n)
    if (!rst_n) tb_slot <= 1;
    else        tb_slot <= (tb_slot + 1) % NL;
  always_comb
    for (int k = 0; k < NL; k++) lv_step[k] = RV ? (tb_slot == (k + 1) % NL) : 1'b1;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endfunction

  function automatic int mxy(int cx, int cy, int dx, int dy);
    if (dx > cx) return 1;
    if (dx < cx) return 0;
    if (dy < cy) return 2;
    if (dy > cy) return 3;
    return 4;
  endfunction

  function automatic bit present(int p);
    case (p)
      0: return x != 0;
      1: return x != 2;
      2: return y != 0;
      3: return y != 2;
      default: return 1;
    endcase
  endfunction

  flit_t pk    [NL][5][NPK][16];
  int    pk_len[NL][5][NPK];
  int    pk_nb [NL][5][NPK];
  bit    pk_got[NL][5][NPK];

  // ---------------------------------------------------------------- senders
  bit s_act [NL][5], s_gap [NL][5];
  int s_idx [NL][5], s_seq [NL][5], s_cnt [NL][5];
  always_comb
    for (int k = 0; k < NL; k++)
      for (int p = 0; p < 5; p++) begin
        in_fwd_v[k][p] = FWD_IDLE;
        if (s_act[k][p] && !s_gap[k][p] && s_idx[k][p] <= pk_len[k][p][s_seq[k][p]] &&
            (p != 4 || lv_step[k]) &&
            !(in_bwd_v[k][p].ack_v && in_bwd_v[k][p].ack == ACK_ERR)) begin
          in_fwd_v[k][p].req  = 1'b1;
          in_fwd_v[k][p].data = pk[k][p][s_seq[k][p]][s_idx[k][p]];
          in_fwd_v[k][p].nb   = NB_W'(pk_nb[k][p][s_seq[k][p]]);
        end
      end

  always @(posedge clk) begin
    logic [NL-1:0] e;
    link_bwd_t     b  [NL][5];
    bit            rq [NL][5];
    e = rst_n ? lv_step : '0;
    for (int k = 0; k < NL; k++)
      for (int p = 0; p < 5; p++) begin b[k][p] = in_bwd_v[k][p]; rq[k][p] = in_fwd_v[k][p].req; end
    #1;
    for (int k = 0; k < NL; k++)
      if (e[k])
        for (int p = 0; p < 5; p++) begin
          if (s_act[k][p]) begin
            s_gap[k][p] = 1'b0;
            if (b[k][p].ack_v && b[k][p].ack == ACK_ERR) begin
              s_idx[k][p] = 0; s_gap[k][p] = 1'b1;
            end else if (b[k][p].ack_v && b[k][p].ack == ACK_DONE) begin
              s_act[k][p] = 1'b0; s_cnt[k][p]++;
            end else if (rq[k][p]) s_idx[k][p]++;
          end
          if (!s_act[k][p] && s_cnt[k][p] < NPK && present(p) && ($urandom % 3 == 0)) begin
            s_act[k][p] = 1'b1; s_seq[k][p] = s_cnt[k][p]; s_idx[k][p] = 0;
            s_gap[k][p] = 1'b0; n_sent++;
          end
        end
  end

  // -------------------------------------------------------------- receivers
  bit    r_act [NL][5];
  int    r_n [NL][5], r_tot [NL][5], r_nb [NL][5];
  flit_t r_buf [NL][5][16];
  always @(posedge clk) if (rst_n)
    for (int k = 0; k < NL; k++)
      if (lv_step[k])
        for (int o = 0; o < 5; o++) begin
          link_bwd_t b;
          b = BWD_IDLE;
          if (out_fwd_v[k][o].req) begin
            check(present(o), "flit on an absent port");
            if (!r_act[k][o]) begin
              if ($urandom % 100 < 15) begin
                b.ack_v = 1'b1; b.ack = ACK_ERR; n_refuse++;
              end else begin
                r_act[k][o] = 1'b1; r_n[k][o] = 0; r_nb[k][o] = int'(out_fwd_v[k][o].nb);
                r_tot[k][o] = int'(out_fwd_v[k][o].data[15:8]) + 1;
              end
            end
            if (r_act[k][o]) begin
              r_buf[k][o][r_n[k][o]] = out_fwd_v[k][o].data;
              r_n[k][o]++;
              b.ack_v = (r_n[k][o] <= 2 || r_n[k][o] == r_tot[k][o]);
              b.ack   = (r_n[k][o] == r_tot[k][o]) ? ACK_DONE :
                        (r_n[k][o] == 1) ? ACK_HDR : ACK_BODY;
              if (r_n[k][o] == r_tot[k][o]) begin
                r_act[k][o] = 1'b0;
                deliver(k, o);
              end
            end
          end
          out_bwd_v[k][o] <= b;
        end

  function automatic void deliver(int k, int o);
    int lv, p, s, xyd;
    bit ok;
    header_t h;
    h = header_t'(r_buf[k][o][0]);
    lv = -1; p = -1; s = -1;
    if (r_tot[k][o] > 1) begin
      lv = int'(r_buf[k][o][1][31:30]); p = int'(r_buf[k][o][1][29:27]);
      s = int'(r_buf[k][o][1][26:20]);
    end else
      for (int q = 0; q < 5; q++) for (int r = 0; r < NPK; r++)
        if (!pk_got[k][q][r] && pk_len[k][q][r] == 0 && pk[k][q][r][0] == r_buf[k][o][0] && p < 0) begin
          lv = k; p = q; s = r;
        end
    n_recv++;
    if (lv < 0 || lv >= NL || p < 0 || p > 4 || s < 0 || s >= NPK) begin
      check(0, "unknown packet"); return;
    end
    check(lv == k, "packet stays on its level");
    check(!pk_got[lv][p][s], "packet delivered once");
    pk_got[lv][p][s] = 1'b1;
    ok = (r_tot[k][o] == pk_len[lv][p][s] + 1);
    for (int i = 0; i < r_tot[k][o] && i < 16; i++) ok &= (r_buf[k][o][i] == pk[lv][p][s][i]);
    check(ok, "packet contents");
    xyd = mxy(int'(x), int'(y), int'(h.xd), int'(h.yd));
    if (o == xyd) check(r_nb[k][o] == pk_nb[lv][p][s], "NB kept on XY port");
    else begin
      n_adapt++;
      check(xyd != 4 && o != p && pk_nb[lv][p][s] < TNB && r_nb[k][o] == pk_nb[lv][p][s] + 1,
            "legal adaptive choice with NB + 1");
    end
  endfunction

  // the routers' own step signals agree with the slot model
  always @(negedge clk) if (rst_n)
    check({dut.g_lvl[2].u_r.en, dut.g_lvl[1].u_r.en, dut.g_lvl[0].u_r.en} == lv_step,
          "level steps follow the slot sequence");

  function automatic bit all_sent();
    for (int k = 0; k < NL; k++)
      for (int p = 0; p < 5; p++)
        if (present(p) && s_cnt[k][p] < NPK) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    for (int k = 0; k < NL; k++) for (int o = 0; o < 5; o++) out_bwd_v[k][o] = BWD_IDLE;
    repeat (2) @(negedge clk);
    for (int pos = 0; pos < 9; pos++) begin
      rst_n = 1'b0;
      x = 4'(pos % 3); y = 4'(pos / 3);
      for (int k = 0; k < NL; k++)
        for (int p = 0; p < 5; p++) begin
          s_act[k][p] = 0; s_cnt[k][p] = 0; s_gap[k][p] = 0; r_act[k][p] = 0;
          out_bwd_v[k][p] = BWD_IDLE;
          for (int q = 0; q < NPK; q++) begin
            int dx, dy;
            pk_got[k][p][q] = present(p) ? 1'b0 : 1'b1;
            pk_len[k][p][q] = $urandom % 16;
            pk_nb[k][p][q]  = $urandom % 4;
            dx = $urandom % 3; dy = $urandom % 3;
            pk[k][p][q][0] = make_header(4'($urandom % 3), 4'($urandom % 3), 4'($urandom % 3),
                                         4'($urandom % 3), 8'(pk_len[k][p][q]), 4'(dx), 4'(dy));
            for (int i = 1; i < 16; i++)
              pk[k][p][q][i] = {2'(k), 3'(p), 7'(q), 4'(i), 16'($urandom)};
          end
        end
      @(negedge clk); rst_n = 1'b1;
      while (!all_sent()) @(negedge clk);
      repeat (300) @(negedge clk);
      for (int k = 0; k < NL; k++) for (int p = 0; p < 5; p++) for (int q = 0; q < NPK; q++)
        check(pk_got[k][p][q], "packet arrived");
    end
    $display("sent=%0d received=%0d refused=%0d adaptive=%0d", n_sent, n_recv, n_refuse, n_adapt);
    check(n_refuse > 0 && n_adapt > 0, "refusals and adaptive choices happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
