// tb_rvnoc_ni: the RVNOC network interface: three IPs share one time-slotted local port.
//
// The interface is tested inside a one-router network: one global router
// (mesh size 1 x 1, so every packet goes from one IP to another through the
// local ports) and the interface under test.  The traffic generator makes
// every IP send packets of random length to the other IPs, first uniform and
// then at a high rate, so levels other than @IP D are given out, packets are
// buffered for a later output, taken on the direct path and refused with
// ack 10.  The scoreboard checks every delivered flit; each of those four
// interface events must have happened.
//
// Reference: the shared level wire and the N-1 receive buffers follow the publication.
// This bench's choices: the 1 x 1 mesh harness and the load.
module tb_rvnoc_ni;
  import vnoc_pkg::*;
  localparam int NLEV = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  link_fwd_t rg_in_fwd, rg_out_fwd;
  link_bwd_t rg_in_bwd, rg_out_bwd;
  link_fwd_t       dir_in_fwd [NLEV][4], dir_out_fwd [NLEV][4];
  link_bwd_t       dir_in_bwd [NLEV][4], dir_out_bwd [NLEV][4];
  link_fwd_t       ip_fwd [NLEV];
  link_bwd_t       ip_bwd [NLEV];
  logic [NLEV-1:0] ip_step, ip_out_v;
  flit_t           ip_out_data [NLEV];

  always_comb
    for (int k = 0; k < NLEV; k++)
      for (int p = 0; p < 4; p++) begin
        dir_in_fwd[k][p]  = FWD_IDLE;
        dir_out_bwd[k][p] = BWD_IDLE;
      end

  rvnoc_ni dut (.clk, .rst_n, .rg_in_fwd, .rg_in_bwd, .rg_out_fwd, .rg_out_bwd,
                .ip_fwd, .ip_bwd, .ip_step, .ip_out_v, .ip_out_data);

  rvnoc_rg #(.COLS(1), .ROWS(1)) u_rg (
    .clk, .rst_n, .x(4'd0), .y(4'd0),
    .dir_in_fwd, .dir_in_bwd, .dir_out_fwd, .dir_out_bwd,
    .loc_in_fwd(rg_in_fwd), .loc_in_bwd(rg_in_bwd),
    .loc_out_fwd(rg_out_fwd), .loc_out_bwd(rg_out_bwd));

  logic   hotspot = 1'b0, go = 1'b0, done;
  int     t_checks, t_fail, sent, delivered, retries;
  longint lat_sum;

  noc_traffic #(.COLS(1), .ROWS(1), .NLEV(NLEV), .NPKT(30), .RATE(40), .MAXLEN(12)) u_tg (
    .clk, .rst_n, .hotspot, .go, .ip_fwd, .ip_bwd, .ip_step, .ip_out_v, .ip_out_data,
    .done, .checks(t_checks), .failures(t_fail), .sent, .delivered, .retries, .lat_sum
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // an IP receives only in its own slot (slot d+1 mod 3 belongs to level d)
  int slot_m = 1;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) slot_m <= 1; else slot_m <= (slot_m + 1) % NLEV;
  always @(negedge clk) if (rst_n)
    for (int d = 0; d < NLEV; d++)
      if (ip_out_v[d]) check(slot_m == (d + 1) % NLEV, "IP output only in its slot");

  int n_alt = 0, n_buf = 0, n_dir = 0, n_rej = 0;
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < NLEV; j++)
      if (dut.u_inj.new_v[j] && int'(dut.u_inj.new_lvl[j]) != int'(dut.u_inj.ip_fwd[j].data[19:16]))
        n_alt++;
    n_buf += $countones(dut.u_ej.acc_buf);
    n_dir += $countones(dut.u_ej.acc_direct);
    n_rej += $countones(dut.u_ej.rej);
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1 go = 1'b1;
    wait (done);
    repeat (20) @(posedge clk);
    check(t_fail == 0, "scoreboard");
    check(delivered == NLEV * 30, "all packets delivered");
    $display("other level=%0d buffered=%0d direct=%0d refused=%0d mean latency=%0d",
             n_alt, n_buf, n_dir, n_rej, lat_sum / (delivered > 0 ? delivered : 1));
    check(n_alt > 0, "NI gave a level other than @IP D");
    check(n_buf > 0, "NI buffered a packet");
    check(n_dir > 0, "NI direct path");
    check(n_rej > 0, "NI refused a packet");
    checks += t_checks; failures += t_fail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog: sent %0d delivered %0d", sent, delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
