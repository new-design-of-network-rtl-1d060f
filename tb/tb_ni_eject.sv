// tb_ni_eject: the receiving side of the network interface.
//
// Three level models (standing for the local outputs of the three routers)
// send random packets to random destination IPs, stopping at once on ack 10
// and sending again later.  Level steps follow the RVNOC slot sequence in
// the first half of the run and are always on (LVNOC) in the second half.
// Checks:
//   * every packet reaches the IP named in its header, whole and unchanged,
//     and each IP output gives one packet at a time (header, then its body);
//   * an IP output moves only in that IP's step;
//   * a packet taken on the direct path (level number = IP number) is on the
//     IP output in the same step it arrives;
//   * direct, buffered and refused (ack 10) packets all occur.
//
// Reference: direct path, N-1 buffers and refusal when full follow the publication.
// This bench's choices: the reference model's timing, taken from the RTL.
module tb_ni_eject;
  import vnoc_pkg::*;
  localparam int NL = 3, NPK = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NL-1:0] lv_en, ip_out_v;
  link_fwd_t     lv_fwd [NL];
  link_bwd_t     lv_bwd [NL];
  flit_t         ip_out_data [NL];
  int checks = 0, failures = 0;
  int n_direct = 0, n_buf = 0, n_refuse = 0, n_recv = 0;
  int slot = 1;
  bit lv_mode = 0;

  ni_eject dut (.clk, .rst_n, .lv_en, .lv_fwd, .lv_bwd, .ip_out_v, .ip_out_data);

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

  // ----------------------------------------------------------- level models
  bit s_act [NL], s_gap [NL];
  int s_idx [NL], s_cnt [NL];
  always_comb
    for (int k = 0; k < NL; k++) begin
      lv_fwd[k] = FWD_IDLE;
      if (s_act[k] && !s_gap[k] && s_idx[k] <= pk_len[k][s_cnt[k]] &&
          !(lv_bwd[k].ack_v && lv_bwd[k].ack == ACK_ERR)) begin
        lv_fwd[k].req  = 1'b1;
        lv_fwd[k].data = pk[k][s_cnt[k]][s_idx[k]];
      end
    end

  always @(posedge clk) begin
    logic [NL-1:0] e;
    link_bwd_t     b  [NL];
    bit            rq [NL];
    if (rst_n) begin
      e = lv_en;
      for (int k = 0; k < NL; k++) begin
        b[k] = lv_bwd[k]; rq[k] = lv_fwd[k].req;
        if (dut.acc_direct[k]) begin
          n_direct++;
          check(ip_out_v[k] && ip_out_data[k] == lv_fwd[k].data, "direct path in the same step");
        end
        if (dut.acc_buf[k]) n_buf++;
        if (dut.rej[k]) n_refuse++;
      end
      #1;
      for (int k = 0; k < NL; k++)
        if (e[k]) begin
          if (s_act[k]) begin
            s_gap[k] = 1'b0;
            if (b[k].ack_v && b[k].ack == ACK_ERR) begin
              s_idx[k] = 0; s_gap[k] = 1'b1;
            end else if (b[k].ack_v && b[k].ack == ACK_DONE) begin
              s_act[k] = 1'b0; s_cnt[k]++;
            end else if (rq[k]) s_idx[k]++;
          end
          if (!s_act[k] && s_cnt[k] < NPK && ($urandom % 3 == 0)) begin
            s_act[k] = 1'b1; s_idx[k] = 0; s_gap[k] = 1'b0;
          end
        end
    end
  end

  // ------------------------------------------------------------ IP monitors
  int    o_n [NL], o_tot [NL];
  flit_t o_buf [NL][16];
  always @(posedge clk) if (rst_n)
    for (int d = 0; d < NL; d++)
      if (ip_out_v[d]) begin
        check(lv_en[d], "IP output moves only in its step");
        if (o_n[d] == 0) begin
          o_tot[d] = int'(ip_out_data[d][15:8]) + 1;
          check(int'(ip_out_data[d][19:16]) == d, "packet reaches the IP in its header");
        end
        o_buf[d][o_n[d]] = ip_out_data[d];
        o_n[d]++;
        if (o_n[d] == o_tot[d]) begin
          deliver(d);
          o_n[d] = 0;
        end
      end

  function automatic void deliver(int d);
    int k, s;
    bit ok;
    k = -1; s = -1;
    if (o_tot[d] > 1) begin
      k = int'(o_buf[d][1][31:30]); s = int'(o_buf[d][1][29:22]);
    end else begin
      k = int'(o_buf[d][0][23:20]);
      if (k < NL)
        for (int q = NPK - 1; q >= 0; q--)
          if (!pk_got[k][q] && pk_len[k][q] == 0 && pk[k][q][0] == o_buf[d][0]) s = q;
    end
    n_recv++;
    if (k < 0 || k >= NL || s < 0 || s >= NPK) begin check(0, "unknown packet"); return; end
    check(!pk_got[k][s], "packet delivered once");
    pk_got[k][s] = 1'b1;
    ok = (o_tot[d] == pk_len[k][s] + 1);
    for (int i = 0; i < o_tot[d] && i < 16; i++) ok &= (o_buf[d][i] == pk[k][s][i]);
    check(ok, "packet contents (one packet at a time)");
  endfunction

  initial begin
    for (int k = 0; k < NL; k++) begin
      s_act[k] = 0; s_cnt[k] = 0; s_gap[k] = 0; s_idx[k] = 0; o_n[k] = 0;
      for (int q = 0; q < NPK; q++) begin
        pk_len[k][q] = $urandom % 16;
        pk_got[k][q] = 0;
        pk[k][q][0] = make_header(4'($urandom % 3), 4'($urandom % 3), 4'(k), 4'($urandom % NL),
                                  8'(pk_len[k][q]), 4'd1, 4'd1);
        for (int i = 1; i < 16; i++) pk[k][q][i] = {2'(k), 8'(q), 4'(i), 18'($urandom)};
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (s_cnt[0] < NPK / 2 || s_cnt[1] < NPK / 2 || s_cnt[2] < NPK / 2) @(negedge clk);
    lv_mode = 1'b1;
    while (s_cnt[0] < NPK || s_cnt[1] < NPK || s_cnt[2] < NPK) @(negedge clk);
    repeat (100) @(negedge clk);
    for (int k = 0; k < NL; k++) for (int q = 0; q < NPK; q++) check(pk_got[k][q], "packet arrived");
    $display("direct=%0d buffered=%0d refused=%0d received=%0d", n_direct, n_buf, n_refuse, n_recv);
    check(n_direct > 0 && n_buf > 0 && n_refuse > 0, "all cases seen");
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
