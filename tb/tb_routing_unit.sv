// tb_routing_unit: output allocation of one router (3x3 mesh, TNB = 3).
//
// Each scenario resets the unit, puts it at a random mesh position and
// occupies a random set of its outputs with "blocker" packets (NB = TNB, so
// they must take their XY port).  A test packet with random destination,
// input port and NB is then offered, and the grant is compared with a small
// model of the routing rules: XY port if free; else, while NB < TNB, the
// perpendicular port nearer the destination, the other perpendicular port,
// then the opposite port (never back through the input, never off the mesh),
// NB + 1; else wait.  A waiting packet must reserve its XY port, and when
// that port is released it must be served before a new request for it.
// A second kind of scenario offers two fresh requests for one free port and
// checks the priority: higher NB first, then E > S > W > N > L.
//
// Reference: XY, adaptive while NB < TNB, NB priority and E > S > W > N > L follow the
// publication.  This bench's choices: the generalised port order and XY-port
// reservation, mirrored from the RTL.
module tb_routing_unit;
  import vnoc_pkg::*;
  localparam int TNB = 3;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  always #5 clk = ~clk;

  logic [3:0]      x = '0, y = '0;
  logic [4:0]      hdr_v = '0, tx_busy = '0, tx_end = '0;
  header_t         hdr [5];
  logic [NB_W-1:0] hdr_nb [5];
  logic [4:0]      start, sel_v, sta, misroute;
  logic [NB_W-1:0] start_nb [5];
  logic [2:0]      sel [5];
  int checks = 0, failures = 0;
  int n_grant_xy = 0, n_grant_adapt = 0, n_wait = 0, n_prio = 0;

  routing_unit #(.COLS(3), .ROWS(3), .TNB(TNB)) dut (
    .clk, .rst_n, .en, .x, .y, .hdr_v, .hdr, .hdr_nb, .tx_busy, .tx_end,
    .start, .start_nb, .sel, .sel_v, .sta, .misroute);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int mxy(int cx, int cy, int dx, int dy);
    if (dx > cx) return 1;        // E
    if (dx < cx) return 0;        // W
    if (dy < cy) return 2;        // N
    if (dy > cy) return 3;        // S
    return 4;                     // L
  endfunction

  function automatic bit present(int p, int cx, int cy);
    case (p)
      0: return cx != 0;
      1: return cx != 2;
      2: return cy != 0;
      3: return cy != 2;
      default: return 1;
    endcase
  endfunction

  // destination reached from (cx,cy) through port p in one hop
  task automatic dest_for(input int p, input int cx, input int cy, output int dx, output int dy);
    dx = cx; dy = cy;
    case (p)
      0: dx = cx - 1;
      1: dx = cx + 1;
      2: dy = cy - 1;
      3: dy = cy + 1;
      default: ;
    endcase
  endtask

  function automatic header_t mk(int dx, int dy);
    return make_header(4'($urandom % 3), 4'($urandom % 3), 4'($urandom % 3),
                       4'($urandom % 3), 8'($urandom % 16), 4'(dx), 4'(dy));
  endfunction

  task automatic tick();
    @(posedge clk); #1;
  endtask

  task automatic do_reset();
    hdr_v = '0; tx_busy = '0; tx_end = '0;
    rst_n = 1'b0; #1; rst_n = 1'b1; #1;
  endtask

  task automatic offer(input int i, input int dx, input int dy, input int nb);
    hdr[i] = mk(dx, dy); hdr_nb[i] = NB_W'(nb); hdr_v[i] = 1'b1;
  endtask

  initial begin
    for (int i = 0; i < 5; i++) begin hdr[i] = '0; hdr_nb[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    tick();
    for (int n = 0; n < 400; n++) begin
      int cx, cy, ti, dx, dy, nb, xyd, blk_in [5], nblk, exp_port, p1, p2, opp;
      bit busy [5];
      do_reset();
      cx = $urandom % 3; cy = $urandom % 3;
      x = 4'(cx); y = 4'(cy);
      ti = $urandom % 5;
      for (int p = 0; p < 5; p++) begin busy[p] = !present(p, cx, cy); blk_in[p] = -1; end
      #1;
      for (int p = 0; p < 5; p++) check(sta[p] == busy[p], "sta of absent port");
      if (n % 4 == 3) begin
        // ---------------------------------------------- priority scenario
        int a, b, pa, pb, xa, ya, ka, kb, win;
        int rnk [5] = '{2, 4, 1, 3, 0};
        a = $urandom % 5;
        do b = $urandom % 5; while (b == a);
        do begin xa = $urandom % 3; ya = $urandom % 3; end while (mxy(cx, cy, xa, ya) == 4 && 0);
        pa = $urandom % 4; pb = $urandom % 4;
        offer(a, xa, ya, pa);
        offer(b, xa, ya, pb);
        ka = pa * 8 + rnk[a]; kb = pb * 8 + rnk[b];
        win = (ka > kb) ? a : b;
        #1;
        check(start[win] && !misroute[win], "priority winner gets the XY port");
        tick();
        hdr_v = '0;
        check(sel_v[mxy(cx, cy, xa, ya)] && int'(sel[mxy(cx, cy, xa, ya)]) == win, "winner owns port");
        n_prio++;
        continue;
      end
      // ------------------------------------------------- blockers
      nblk = 0;
      for (int p = 0; p < 5; p++) begin
        if (busy[p] || ($urandom % 2) == 0) continue;
        for (int i = 0; i < 5; i++) begin
          int bi;
          bi = (p + i) % 5;
          if (bi == ti || blk_in[0] == bi || blk_in[1] == bi || blk_in[2] == bi ||
              blk_in[3] == bi || blk_in[4] == bi) continue;
          blk_in[p] = bi;
          dest_for(p, cx, cy, dx, dy);
          offer(bi, dx, dy, TNB);
          break;
        end
      end
      #1;
      for (int p = 0; p < 5; p++)
        if (blk_in[p] >= 0) check(start[blk_in[p]] && !misroute[blk_in[p]], "blocker granted XY");
      tick();
      for (int p = 0; p < 5; p++)
        if (blk_in[p] >= 0) begin
          busy[p] = 1; hdr_v[blk_in[p]] = 1'b0; tx_busy[blk_in[p]] = 1'b1;
          check(sel_v[p] && int'(sel[p]) == blk_in[p], "blocker owns port");
        end
      // --------------------------------------------------- test packet
      dx = $urandom % 3; dy = $urandom % 3;
      nb = $urandom % 4;
      offer(ti, dx, dy, nb);
      xyd = mxy(cx, cy, dx, dy);
      exp_port = -1;
      if (!busy[xyd]) exp_port = xyd;
      else if (nb < TNB && xyd != 4) begin
        if (xyd == 0 || xyd == 1) begin
          p1 = (dy > cy) ? 3 : 2; p2 = (dy > cy) ? 2 : 3;
        end else begin
          p1 = 1; p2 = 0;
        end
        opp = (xyd == 0) ? 1 : (xyd == 1) ? 0 : (xyd == 2) ? 3 : 2;
        if (!busy[p1] && p1 != ti)       exp_port = p1;
        else if (!busy[p2] && p2 != ti)  exp_port = p2;
        else if (!busy[opp] && opp != ti) exp_port = opp;
      end
      #1;
      if (exp_port >= 0) begin
        check(start[ti], "test packet granted");
        check(misroute[ti] == (exp_port != xyd), "misroute flag");
        check(int'(start_nb[ti]) == nb + ((exp_port != xyd) ? 1 : 0), "NB update");
        tick();
        check(sel_v[exp_port] && int'(sel[exp_port]) == ti, "granted port as modelled");
        if (exp_port == xyd) n_grant_xy++; else n_grant_adapt++;
      end else begin
        int bx, cdx, cdy;
        check(!start[ti], "no grant when modelled to wait");
        tick();
        check(sta[xyd], "waiting packet reserves its XY port");
        n_wait++;
        // release the XY port's blocker and let it compete for the port
        bx = blk_in[xyd];
        if (bx < 0) continue;            // absent port cannot occur for XY
        tx_end[bx] = 1'b1;
        #1 check(!start[ti], "still waiting while port owned");
        tick();
        tx_end[bx] = 1'b0; tx_busy[bx] = 1'b0;
        dest_for(xyd, cx, cy, cdx, cdy);
        offer(bx, cdx, cdy, TNB);
        #1;
        check(start[ti] && !start[bx], "waiting packet served first");
        tick();
        check(sel_v[xyd] && int'(sel[xyd]) == ti, "waiting packet owns its XY port");
      end
    end
    // en low: nothing is granted
    do_reset();
    x = 4'd1; y = 4'd1; en = 1'b0;
    offer(0, 2, 1, 0);
    #1 check(start == '0, "no grant outside the router's step");
    tick();
    check(sel_v == '0, "no state change outside the step");
    $display("grants xy=%0d adaptive=%0d waits=%0d priority=%0d", n_grant_xy, n_grant_adapt, n_wait, n_prio);
    check(n_grant_xy > 0 && n_grant_adapt > 0 && n_wait > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
