// tb_workload_4x4: both networks at the 4 x 4 size (three levels, 48 IPs
// each, TNB = 4 as the publication uses for 4 x 4) under uniform random
// traffic.  Parameters are overridden here; the default build is 3 x 3.
// Every IP sends 4 packets of 1..8 body flits to random other IPs; the
// scoreboard checks every delivered flit and every packet must arrive.  The
// mean latencies are printed, and the LVNOC's must be below the RVNOC's.
//
// Reference: the 4 x 4 size with TNB = 4 comes from the publication.  This bench's
// choices: the load and the comparison of means instead of latency curves.
module tb_workload_4x4;
  import vnoc_pkg::*;
  localparam int COLS = 4, ROWS = 4, NLEV = 3, TNB = 4, NIP = COLS * ROWS * NLEV, NPKT = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  link_fwd_t      rv_fwd [NIP], lv_fwd [NIP];
  link_bwd_t      rv_bwd [NIP], lv_bwd [NIP];
  logic [NIP-1:0] rv_step, rv_out_v, lv_step, lv_out_v;
  flit_t          rv_out [NIP], lv_out [NIP];

  rvnoc_mesh #(.COLS(COLS), .ROWS(ROWS), .NLEV(NLEV), .TNB(TNB)) u_rv (
    .clk, .rst_n, .ip_fwd(rv_fwd), .ip_bwd(rv_bwd), .ip_step(rv_step),
    .ip_out_v(rv_out_v), .ip_out_data(rv_out));
  lvnoc_mesh #(.COLS(COLS), .ROWS(ROWS), .NLEV(NLEV), .TNB(TNB)) u_lv (
    .clk, .rst_n, .ip_fwd(lv_fwd), .ip_bwd(lv_bwd), .ip_step(lv_step),
    .ip_out_v(lv_out_v), .ip_out_data(lv_out));

  logic   hotspot = 1'b0, go = 1'b0, rv_done, lv_done;
  int     rv_checks, rv_fail, rv_sent, rv_deliv, rv_retry;
  int     lv_checks, lv_fail, lv_sent, lv_deliv, lv_retry;
  longint rv_lat, lv_lat;

  noc_traffic #(.COLS(COLS), .ROWS(ROWS), .NLEV(NLEV), .NPKT(NPKT), .RATE(20), .MAXLEN(8)) u_rv_tg (
    .clk, .rst_n, .hotspot, .go, .ip_fwd(rv_fwd), .ip_bwd(rv_bwd), .ip_step(rv_step),
    .ip_out_v(rv_out_v), .ip_out_data(rv_out), .done(rv_done), .checks(rv_checks),
    .failures(rv_fail), .sent(rv_sent), .delivered(rv_deliv), .retries(rv_retry), .lat_sum(rv_lat));
  noc_traffic #(.COLS(COLS), .ROWS(ROWS), .NLEV(NLEV), .NPKT(NPKT), .RATE(20), .MAXLEN(8)) u_lv_tg (
    .clk, .rst_n, .hotspot, .go, .ip_fwd(lv_fwd), .ip_bwd(lv_bwd), .ip_step(lv_step),
    .ip_out_v(lv_out_v), .ip_out_data(lv_out), .done(lv_done), .checks(lv_checks),
    .failures(lv_fail), .sent(lv_sent), .delivered(lv_deliv), .retries(lv_retry), .lat_sum(lv_lat));

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1 go = 1'b1;
    wait (rv_done && lv_done);
    repeat (20) @(posedge clk);
    check(rv_fail == 0 && lv_fail == 0, "scoreboards");
    check(rv_deliv == NIP * NPKT, "RVNOC 4x4: all packets delivered");
    check(lv_deliv == NIP * NPKT, "LVNOC 4x4: all packets delivered");
    $display("4x4 uniform: RVNOC mean latency %0d clocks, LVNOC mean latency %0d clocks",
             rv_lat / (rv_deliv > 0 ? rv_deliv : 1), lv_lat / (lv_deliv > 0 ? lv_deliv : 1));
    check(lv_lat * rv_deliv < rv_lat * lv_deliv, "LVNOC mean latency below RVNOC");
    checks += rv_checks + lv_checks; failures += rv_fail + lv_fail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: RVNOC delivered %0d, LVNOC delivered %0d", rv_deliv, lv_deliv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
