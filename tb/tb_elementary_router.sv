// tb_elementary_router: one RVNOC elementary router (level 0, so it works in
// slot 1 of every 3 clocks) surrounded by models of its five neighbours.
//
// For each of the 9 positions of a 3x3 mesh, every present input sends a
// stream of random packets (random destination, length 0..15 body flits and
// incoming NB) following the link protocol; it stops a transfer at once when
// it sees ack 10 and sends the packet again one step later.  Every output has
// a receiver model that answers ack 00 / 01 / 11 like a router input and
// refuses about 15% of headers with ack 10.  Checks:
//   * every packet arrives once, complete and unchanged;
//   * it leaves on its XY port with unchanged NB, or (only while NB < TNB)
//     on another port that is not its input port, with NB + 1;
//   * nothing moves outside the router's slot, and the local output and the
//     local-input acknowledge are 0 outside it.
//
// Reference: port set, XY/adaptive rules, ack codes and resend follow the publication.
// This bench's choices: refusing neighbour models, random packet mix, the slot model.
module tb_elementary_router;
  import vnoc_pkg::*;
  localparam int TNB = 3, NPK = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]    x = 4'd1, y = 4'd1;
  link_fwd_t     in_fwd [5], out_fwd [5];
  link_bwd_t     in_bwd [5], out_bwd [5];
  logic          en;
  logic [4:0]    sta, misroute;
  int checks = 0, failures = 0;
  int n_sent = 0, n_recv = 0, n_refuse = 0, n_adapt = 0;

  elementary_router dut (.clk, .rst_n, .x, .y, .in_fwd, .in_bwd, .out_fwd, .out_bwd,
                         .en, .sta, .misroute);

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

  // packets: [input][seq] -> flits, NB
  flit_t     pk   [5][NPK][16];
  int        pk_len[5][NPK];
  int        pk_nb [5][NPK];
  bit        pk_got[5][NPK];

  // ---------------------------------------------------------------- senders
  bit  s_act [5], s_gap [5];
  int  s_idx [5], s_seq [5], s_cnt [5];
  always_comb
    for (int p = 0; p < 5; p++) begin
      in_fwd[p] = FWD_IDLE;
      if (s_act[p] && !s_gap[p] && s_idx[p] <= pk_len[p][s_seq[p]] &&
          !(in_bwd[p].ack_v && in_bwd[p].ack == ACK_ERR)) begin
        in_fwd[p].req  = 1'b1;
        in_fwd[p].data = pk[p][s_seq[p]][s_idx[p]];
        in_fwd[p].nb   = NB_W'(pk_nb[p][s_seq[p]]);
      end
    end

  // the sender state is updated 1 ns after the edge, from the values the
  // router saw at the edge, so the router never samples a changing input
  always @(posedge clk) begin
    bit        e;
    link_bwd_t b [5];
    bit        rq [5];
    e = rst_n && en;
    for (int p = 0; p < 5; p++) begin b[p] = in_bwd[p]; rq[p] = in_fwd[p].req; end
    #1;
    if (e)
      for (int p = 0; p < 5; p++) begin
        if (s_act[p]) begin
          s_gap[p] = 1'b0;
          if (b[p].ack_v && b[p].ack == ACK_ERR) begin
            s_idx[p] = 0; s_gap[p] = 1'b1;
          end else if (b[p].ack_v && b[p].ack == ACK_DONE) begin
            s_act[p] = 1'b0; s_cnt[p]++;
          end else if (rq[p]) s_idx[p]++;
        end
        if (!s_act[p] && s_cnt[p] < NPK && present(p) && ($urandom % 3 == 0)) begin
          s_act[p] = 1'b1; s_seq[p] = s_cnt[p]; s_idx[p] = 0; s_gap[p] = 1'b0;
          n_sent++;
        end
      end
  end

  // -------------------------------------------------------------- receivers
  bit    r_act [5];
  int    r_n [5], r_tot [5];
  flit_t r_buf [5][16];
  int    r_nb [5];
  always @(posedge clk) if (rst_n && en)
    for (int o = 0; o < 5; o++) begin
      link_bwd_t b;
      b = BWD_IDLE;
      if (out_fwd[o].req) begin
        check(present(o), "flit on an absent port");
        if (!r_act[o]) begin
          if ($urandom % 100 < 15) begin
            b.ack_v = 1'b1; b.ack = ACK_ERR; n_refuse++;
          end else begin
            r_act[o] = 1'b1; r_n[o] = 0; r_nb[o] = int'(out_fwd[o].nb);
            r_tot[o] = int'(out_fwd[o].data[15:8]) + 1;
          end
        end
        if (r_act[o]) begin
          r_buf[o][r_n[o]] = out_fwd[o].data;
          r_n[o]++;
          b.ack_v = (r_n[o] == 1 || r_n[o] == 2 || r_n[o] == r_tot[o]);
          b.ack   = (r_n[o] == r_tot[o]) ? ACK_DONE : (r_n[o] == 1) ? ACK_HDR : ACK_BODY;
          if (r_n[o] == r_tot[o]) begin
            r_act[o] = 1'b0;
            deliver(o);
          end
        end
      end
      out_bwd[o] <= b;
    end

  function automatic void deliver(int o);
    int p, s, xyd;
    bit ok;
    header_t h;
    h = header_t'(r_buf[o][0]);
    p = -1; s = -1;
    if (r_tot[o] > 1) begin
      p = int'(r_buf[o][1][31:29]); s = int'(r_buf[o][1][28:21]);
    end else
      for (int i = 0; i < 5; i++) for (int q = 0; q < NPK; q++)
        if (!pk_got[i][q] && pk_len[i][q] == 0 && pk[i][q][0] == r_buf[o][0] && p < 0) begin
          p = i; s = q;
        end
    n_recv++;
    if (p < 0 || p > 4 || s < 0 || s >= NPK) begin check(0, "unknown packet"); return; end
    check(!pk_got[p][s], "packet delivered once");
    pk_got[p][s] = 1'b1;
    ok = (r_tot[o] == pk_len[p][s] + 1);
    for (int i = 0; i < r_tot[o] && i < 16; i++) ok &= (r_buf[o][i] == pk[p][s][i]);
    check(ok, "packet contents");
    xyd = mxy(int'(x), int'(y), int'(h.xd), int'(h.yd));
    if (o == xyd) check(r_nb[o] == pk_nb[p][s], "NB kept on XY port");
    else begin
      n_adapt++;
      check(xyd != 4 && o != p && pk_nb[p][s] < TNB && r_nb[o] == pk_nb[p][s] + 1,
            "legal adaptive choice with NB + 1");
    end
  endfunction

  // local port silent outside the slot
  always @(negedge clk) if (rst_n && !en)
    check(out_fwd[DIR_L] == FWD_IDLE && in_bwd[DIR_L] == BWD_IDLE, "local port idle off-slot");

  initial begin
    for (int o = 0; o < 5; o++) out_bwd[o] = BWD_IDLE;
    repeat (2) @(negedge clk);
    for (int pos = 0; pos < 9; pos++) begin
      rst_n = 1'b0;
      x = 4'(pos % 3); y = 4'(pos / 3);
      for (int p = 0; p < 5; p++) begin
        s_act[p] = 0; s_cnt[p] = 0; s_gap[p] = 0; r_act[p] = 0; out_bwd[p] = BWD_IDLE;
        for (int q = 0; q < NPK; q++) begin
          int dx, dy;
          pk_got[p][q] = present(p) ? 1'b0 : 1'b1;
          pk_len[p][q] = $urandom % 16;
          pk_nb[p][q]  = $urandom % 4;
          dx = $urandom % 3; dy = $urandom % 3;
          pk[p][q][0] = make_header(4'($urandom % 3), 4'($urandom % 3), 4'($urandom % 3),
                                    4'($urandom % 3), 8'(pk_len[p][q]), 4'(dx), 4'(dy));
          for (int i = 1; i < 16; i++)
            pk[p][q][i] = {3'(p), 8'(q), 4'(i), 17'($urandom)};
        end
      end
      @(negedge clk); rst_n = 1'b1;
      wait (s_cnt[0] == (present(0) ? NPK : 0) && s_cnt[1] == (present(1) ? NPK : 0) &&
            s_cnt[2] == (present(2) ? NPK : 0) && s_cnt[3] == (present(3) ? NPK : 0) &&
            s_cnt[4] == NPK);
      repeat (300) @(negedge clk);
      for (int p = 0; p < 5; p++) for (int q = 0; q < NPK; q++)
        check(pk_got[p][q], "packet arrived");
    end
    $display("sent=%0d received=%0d refused=%0d adaptive=%0d", n_sent, n_recv, n_refuse, n_adapt);
    check(n_refuse > 0 && n_adapt > 0, "refusals and adaptive choices happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
