// tb_vnoc_top: end-to-end test of the complete design at its default size,
// both 3x3x3 networks (27 IPs each) running side by side.
//
// Phase 1 (both networks at once): one packet from RG(0,2) IP 1 to RG(1,1)
// IP 1 in an idle network.  Its latency, from the clock edge at which the
// source IP's link moves to the clock at which the header reaches the
// destination IP, must be 3 clocks in the LVNOC (three router crossings of
// one clock) and 9 clocks in the RVNOC (three crossings of one 3-clock
// step).  Phase 2: uniform random traffic from every IP; phase 3: every IP
// sends to the IPs of the centre global router.  A scoreboard per network
// (noc_traffic) checks every delivered flit; every packet must arrive.
// Per network the bench counts each mechanism (adaptive misroute, waiting
// for the XY port, XY forced at NB = TNB, ack 10 and resend, use of a level
// other than @IP D, buffering in the interface, the direct path, local
// output of every level) and fails any that never happened.  Finally the
// mean latency of the LVNOC must be below that of the RVNOC.
//
// Reference: the two networks and their latency ranking come from the publication.  This
// bench's choices: the 3 / 9 clock figures of this RTL and the loads.
module tb_vnoc_top;
  import vnoc_pkg::*;

  localparam int COLS = 3, ROWS = 3, NLEV = 3, NIP = COLS * ROWS * NLEV;
  localparam int NPKT = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  link_fwd_t      rv_ip_fwd [NIP], lv_ip_fwd [NIP], rv_tg_fwd [NIP], lv_tg_fwd [NIP];
  link_bwd_t      rv_ip_bwd [NIP], lv_ip_bwd [NIP];
  logic [NIP-1:0] rv_ip_step, rv_ip_out_v, lv_ip_step, lv_ip_out_v;
  flit_t          rv_ip_out_data [NIP], lv_ip_out_data [NIP];

  vnoc_top dut (
    .clk, .rst_n,
    .rv_ip_fwd, .rv_ip_bwd, .rv_ip_step, .rv_ip_out_v, .rv_ip_out_data,
    .lv_ip_fwd, .lv_ip_bwd, .lv_ip_step, .lv_ip_out_v, .lv_ip_out_data
  );

  logic   hotspot = 1'b0, go = 1'b0, rv_done, lv_done;
  int     rv_checks, rv_fail, rv_sent, rv_deliv, rv_retry;
  int     lv_checks, lv_fail, lv_sent, lv_deliv, lv_retry;
  longint rv_lat, lv_lat;

  noc_traffic #(.COLS(COLS), .ROWS(ROWS), .NLEV(NLEV), .NPKT(NPKT), .RATE(30), .MAXLEN(8)) u_rv_tg (
    .clk, .rst_n, .hotspot, .go, .ip_fwd(rv_tg_fwd), .ip_bwd(rv_ip_bwd), .ip_step(rv_ip_step),
    .ip_out_v(rv_ip_out_v), .ip_out_data(rv_ip_out_data), .done(rv_done), .checks(rv_checks),
    .failures(rv_fail), .sent(rv_sent), .delivered(rv_deliv), .retries(rv_retry), .lat_sum(rv_lat)
  );
  noc_traffic #(.COLS(COLS), .ROWS(ROWS), .NLEV(NLEV), .NPKT(NPKT), .RATE(30), .MAXLEN(8)) u_lv_tg (
    .clk, .rst_n, .hotspot, .go, .ip_fwd(lv_tg_fwd), .ip_bwd(lv_ip_bwd), .ip_step(lv_ip_step),
    .ip_out_v(lv_ip_out_v), .ip_out_data(lv_ip_out_data), .done(lv_done), .checks(lv_checks),
    .failures(lv_fail), .sent(lv_sent), .delivered(lv_deliv), .retries(lv_retry), .lat_sum(lv_lat)
  );

  // directed packet, driven instead of the generator's link of that IP
  localparam int SRC = ((2 * COLS) + 0) * NLEV + 1;   // RG(0,2), IP 1
  localparam int DST = ((1 * COLS) + 1) * NLEV + 1;   // RG(1,1), IP 1
  link_fwd_t rv_dir = FWD_IDLE, lv_dir = FWD_IDLE;
  logic      dir_on = 1'b0;
  always_comb begin
    rv_ip_fwd = rv_tg_fwd;
    lv_ip_fwd = lv_tg_fwd;
    if (dir_on) begin
      rv_ip_fwd[SRC] = rv_dir;
      lv_ip_fwd[SRC] = lv_dir;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters, one set per network
  if (1) begin : g_rv
`define MESH dut.u_rvnoc
`include "tb_mesh_events.svh"
`undef MESH
  end
  if (1) begin : g_lv
`define MESH dut.u_lvnoc
`include "tb_mesh_events.svh"
`undef MESH
  end

  localparam flit_t DHDR = flit_t'(make_header(0, 2, 1, 1, 0, 1, 1));

  initial begin
    int rv_lat_d, lv_lat_d;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (4) @(posedge clk);
    #1;
    // ---------------- phase 1: zero-load latency, both networks
    dir_on = 1'b1;
    rv_dir = '{req: 1'b1, data: DHDR, nb: '0};
    lv_dir = '{req: 1'b1, data: DHDR, nb: '0};
    fork
      begin
        int t0;
        @(negedge clk);
        while (!rv_ip_step[SRC]) @(negedge clk);
        t0 = g_rv.cyc_cnt;
        @(posedge clk);
        #1 rv_dir = FWD_IDLE;
        while (!rv_ip_out_v[DST]) @(negedge clk);
        rv_lat_d = g_rv.cyc_cnt - t0;
        check(rv_ip_out_data[DST] == DHDR, "RVNOC directed header delivered intact");
      end
      begin
        int t0;
        @(negedge clk);
        while (!lv_ip_step[SRC]) @(negedge clk);
        t0 = g_lv.cyc_cnt;
        @(posedge clk);
        #1 lv_dir = FWD_IDLE;
        while (!lv_ip_out_v[DST]) @(negedge clk);
        lv_lat_d = g_lv.cyc_cnt - t0;
        check(lv_ip_out_data[DST] == DHDR, "LVNOC directed header delivered intact");
      end
    join
    $display("2-hop zero-load latency: LVNOC %0d clocks, RVNOC %0d clocks", lv_lat_d, rv_lat_d);
    check(lv_lat_d == 3, "LVNOC 2-hop latency is 3 clocks");
    check(rv_lat_d == 9, "RVNOC 2-hop latency is 9 clocks");
    repeat (5) @(posedge clk);
    #1 dir_on = 1'b0;
    // ---------------- phase 2/3: random traffic
    go = 1'b1;
    wait (rv_sent >= NIP * 3 && lv_sent >= NIP * 3);
    hotspot = 1'b1;
    wait (rv_done && lv_done);
    repeat (20) @(posedge clk);
    check(rv_fail == 0 && lv_fail == 0, "scoreboards");
    check(rv_deliv == NIP * NPKT, "RVNOC: all packets delivered");
    check(lv_deliv == NIP * NPKT, "LVNOC: all packets delivered");
    $write("RVNOC ");
    g_rv.report_events();
    $write("LVNOC ");
    g_lv.report_events();
    $display("RVNOC: %0d packets, mean latency %0d clocks, %0d IP resends",
             rv_deliv, rv_lat / rv_deliv, rv_retry);
    $display("LVNOC: %0d packets, mean latency %0d clocks, %0d IP resends",
             lv_deliv, lv_lat / lv_deliv, lv_retry);
    check(lv_lat * rv_deliv < rv_lat * lv_deliv, "LVNOC mean latency below RVNOC");
    checks += rv_checks + lv_checks; failures += rv_fail + lv_fail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: RVNOC sent %0d delivered %0d, LVNOC sent %0d delivered %0d",
             rv_sent, rv_deliv, lv_sent, lv_deliv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
