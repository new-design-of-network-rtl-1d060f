// tb_lvnoc_mesh: end-to-end test of the 3x3x3 LVNOC.
//
// Phase 1: one packet from RG(0,2) to RG(1,1) in an idle network; its
// latency is checked (three router crossings, one clock each, header at the
// destination IP three clocks after it left the source IP).  Phase 2:
// uniform random traffic; phase 3: every IP sends to the centre global
// router.  The scoreboard in noc_traffic checks every delivered flit.
//
// Reference: the 3x3 LVNOC and its hop-count latency come from the publication.  This
// bench's choices: the 3-clock figure of this RTL, the traffic loads and the mechanism
// counts.
module tb_lvnoc_mesh;
  import vnoc_pkg::*;

  localparam int COLS = 3, ROWS = 3, NLEV = 3, NIP = COLS * ROWS * NLEV;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  link_fwd_t      ip_fwd [NIP], tg_fwd[NIP];
  link_bwd_t      ip_bwd [NIP];
  logic [NIP-1:0] ip_step, ip_out_v;
  flit_t          ip_out_data[NIP];

  lvnoc_mesh dut (.clk, .rst_n, .ip_fwd, .ip_bwd, .ip_step, .ip_out_v, .ip_out_data);

  logic   hotspot = 1'b0, go = 1'b0, done;
  int     t_checks, t_fail, sent, delivered, retries;
  longint lat_sum;

  noc_traffic #(.COLS(COLS), .ROWS(ROWS), .NLEV(NLEV), .NPKT(6), .RATE(30), .MAXLEN(8)) u_tg (
    .clk, .rst_n, .hotspot, .go, .ip_fwd(tg_fwd), .ip_bwd, .ip_step, .ip_out_v, .ip_out_data,
    .done, .checks(t_checks), .failures(t_fail), .sent, .delivered, .retries, .lat_sum
  );

  // directed packet, driven instead of the generator's link of that IP
  localparam int SRC = ((2 * COLS) + 0) * NLEV + 1;   // RG(0,2), IP 1
  localparam int DST = ((1 * COLS) + 1) * NLEV + 1;   // RG(1,1), IP 1
  link_fwd_t dir_fwd = FWD_IDLE;
  logic      dir_on  = 1'b0;
  always_comb begin
    ip_fwd = tg_fwd;
    if (dir_on) ip_fwd[SRC] = dir_fwd;
  end

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

`define MESH dut
`include "tb_mesh_events.svh"

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (4) @(posedge clk);
    #1;
    // ---------------- phase 1: zero-load latency
    dir_on = 1'b1;
    dir_fwd.req  = 1'b1;
    dir_fwd.data = make_header(0, 2, 1, 1, 0, 1, 1);
    dir_fwd.nb   = '0;
    @(negedge clk);
    while (!ip_step[SRC]) @(negedge clk);
    t0 = cyc_cnt;
    @(posedge clk);
    #1 dir_fwd = FWD_IDLE;
    while (!ip_out_v[DST]) @(negedge clk);
    t1 = cyc_cnt;
    check(ip_out_data[DST] == flit_t'(make_header(0, 2, 1, 1, 0, 1, 1)), "directed header delivered intact");
    check(t1 - t0 == 3, $sformatf("LVNOC 2-hop latency %0d clocks", t1 - t0));
    repeat (5) @(posedge clk);
    #1 dir_on = 1'b0;
    // ---------------- phase 2/3: random traffic
    go = 1'b1;
    wait (u_tg.sent >= NIP * 3);
    hotspot = 1'b1;
    wait (done);
    repeat (20) @(posedge clk);
    check(t_fail == 0, "scoreboard");
    check(delivered == NIP * 6, "all packets delivered");
    report_events();
    $display("LVNOC: %0d packets, mean latency %0d clocks, %0d IP resends",
             delivered, lat_sum / delivered, retries);
    checks += t_checks; failures += t_fail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: sent %0d delivered %0d", sent, delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
