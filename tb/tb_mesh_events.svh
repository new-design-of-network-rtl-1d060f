// Event counters shared by the network testbenches.  Before including,
// define MESH as the hierarchical path of the rvnoc_mesh/lvnoc_mesh instance
// and have COLS, ROWS, NLEV, clk, rst_n, checks and failures in scope.
// Counts, over all global routers, how often each mechanism of the design
// happened, and report_events() fails every mechanism that never did.
//
// Reference: the counted mechanisms are those the publication describes.  This file's
// choices: how each is recognised from internal signals.

  int cyc_cnt = 0;
  always @(posedge clk) cyc_cnt <= cyc_cnt + 1;

  int c_mis [ROWS][COLS][NLEV];   // adaptive choice of a non-XY port
  int c_wait[ROWS][COLS][NLEV];   // all ports unavailable: wait for the XY port
  int c_xy  [ROWS][COLS][NLEV];   // NB reached TNB: XY forced
  int c_rej [ROWS][COLS][NLEV];   // ack 10 from a router input
  int c_lout[ROWS][COLS][NLEV];   // flits on a router's local output
  int c_alt [ROWS][COLS];         // NI gave a level other than @IP D
  int c_buf [ROWS][COLS];         // NI stored a packet for another level
  int c_dir [ROWS][COLS];         // NI direct path
  int c_nrej[ROWS][COLS];         // NI refused a packet (ack 10)

  for (genvar yy = 0; yy < ROWS; yy++) begin : g_ey
    for (genvar xx = 0; xx < COLS; xx++) begin : g_ex
      for (genvar k = 0; k < NLEV; k++) begin : g_ek
        initial begin
          c_mis[yy][xx][k] = 0; c_wait[yy][xx][k] = 0; c_xy[yy][xx][k] = 0;
          c_rej[yy][xx][k] = 0; c_lout[yy][xx][k] = 0;
        end
        always @(posedge clk) if (rst_n && `MESH.g_y[yy].g_x[xx].u_rg.g_lvl[k].u_r.en) begin
          c_mis[yy][xx][k]  <= c_mis[yy][xx][k] +
            $countones(`MESH.g_y[yy].g_x[xx].u_rg.g_lvl[k].u_r.u_ru.misroute);
          c_wait[yy][xx][k] <= c_wait[yy][xx][k] +
            $countones(`MESH.g_y[yy].g_x[xx].u_rg.g_lvl[k].u_r.u_ru.new_wait &
                       ~`MESH.g_y[yy].g_x[xx].u_rg.g_lvl[k].u_r.u_ru.wait_v);
          for (int i = 0; i < NP; i++)
            if (`MESH.g_y[yy].g_x[xx].u_rg.g_lvl[k].u_r.u_ru.grant[i] &&
                int'(`MESH.g_y[yy].g_x[xx].u_rg.g_lvl[k].u_r.u_ru.hdr_nb[i]) >= 3)
              c_xy[yy][xx][k] <= c_xy[yy][xx][k] + 1;
          for (int p = 0; p < NP; p++)
            if (`MESH.g_y[yy].g_x[xx].u_rg.g_lvl[k].u_r.in_bwd[p].ack_v &&
                `MESH.g_y[yy].g_x[xx].u_rg.g_lvl[k].u_r.in_bwd[p].ack == ACK_ERR)
              c_rej[yy][xx][k] <= c_rej[yy][xx][k] + 1;
          if (`MESH.g_y[yy].g_x[xx].u_rg.g_lvl[k].u_r.out_fwd[DIR_L].req)
            c_lout[yy][xx][k] <= c_lout[yy][xx][k] + 1;
        end
      end
      initial begin
        c_alt[yy][xx] = 0; c_buf[yy][xx] = 0; c_dir[yy][xx] = 0; c_nrej[yy][xx] = 0;
      end
      always @(posedge clk) if (rst_n) begin
        for (int j = 0; j < NLEV; j++)
          if (`MESH.g_y[yy].g_x[xx].u_ni.u_inj.new_v[j] &&
              int'(`MESH.g_y[yy].g_x[xx].u_ni.u_inj.new_lvl[j]) !=
              int'(`MESH.g_y[yy].g_x[xx].u_ni.u_inj.ip_fwd[j].data[19:16]))
            c_alt[yy][xx] <= c_alt[yy][xx] + 1;
        c_buf[yy][xx]  <= c_buf[yy][xx]  + $countones(`MESH.g_y[yy].g_x[xx].u_ni.u_ej.acc_buf);
        c_dir[yy][xx]  <= c_dir[yy][xx]  + $countones(`MESH.g_y[yy].g_x[xx].u_ni.u_ej.acc_direct);
        c_nrej[yy][xx] <= c_nrej[yy][xx] + $countones(`MESH.g_y[yy].g_x[xx].u_ni.u_ej.rej);
      end
    end
  end

  task automatic report_events();
    int mis = 0, wt = 0, xy = 0, rej = 0, alt = 0, bf = 0, dr = 0, nrej = 0;
    int lout[NLEV];
    for (int k = 0; k < NLEV; k++) lout[k] = 0;
    for (int yy = 0; yy < ROWS; yy++)
      for (int xx = 0; xx < COLS; xx++) begin
        for (int k = 0; k < NLEV; k++) begin
          mis += c_mis[yy][xx][k]; wt += c_wait[yy][xx][k]; xy += c_xy[yy][xx][k];
          rej += c_rej[yy][xx][k]; lout[k] += c_lout[yy][xx][k];
        end
        alt += c_alt[yy][xx]; bf += c_buf[yy][xx]; dr += c_dir[yy][xx]; nrej += c_nrej[yy][xx];
      end
    $display("events: misroute=%0d wait=%0d xy_forced=%0d router_ack10=%0d ni_other_level=%0d ni_buffered=%0d ni_direct=%0d ni_ack10=%0d",
             mis, wt, xy, rej, alt, bf, dr, nrej);
    check(mis > 0,  "adaptive misroute happened");
    check(wt > 0,   "wait for XY port happened");
    check(xy > 0,   "XY forced by NB >= TNB happened");
    check(rej > 0,  "router ack 10 / resend happened");
    check(alt > 0,  "NI used another level than @IP D");
    check(bf > 0,   "NI buffered a packet from another level");
    check(dr > 0,   "NI direct path used");
    for (int k = 0; k < NLEV; k++)
      check(lout[k] > 0, $sformatf("level %0d delivered flits on its local output", k));
  endtask
