// ni_eject: network-interface side that delivers packets from the levels
// to the IPs.
//
// A packet arrives on level k for IP d = @IP D.  If k == d it goes straight
// through to IP d (direct path), provided IP d's output is idle; otherwise
// it is stored whole in one of the NLEV-1 packet buffers reserved for IP d,
// the one that belongs to level k.  Each IP output is a multiplexer that
// gives one packet at a time: the direct path when a packet arrives on it,
// otherwise a complete buffered packet (lowest buffer first), one flit per
// step.  A packet that finds its direct path busy or its buffer occupied is
// refused with ack 10 and sent again by the router.  Receive handshake per
// level as in the routers: ack 00 after the header, 01 after the first body
// flit, 11 after the last one.
//
// lv_en[k] is level k's step (always 1 in the LVNOC, the level's slot in
// the RVNOC).  IP d's output moves in the steps of level d, so in the RVNOC a
// packet stored in the slot of the level it came on leaves in the slot of the
// destination IP.  ip_out_v[d] is high for one clock per flit.
//
// From the publication: N-1 buffers per destination IP and a multiplexer per IP.  This
// design's choices: direct path for level = IP, 16-flit buffers, refusal with ack 10 when
// busy, one packet at a time, IP output in the IP's own step.
module ni_eject
  import vnoc_pkg::*;
#(
  parameter int NLEV  = 3,
  parameter int DEPTH = 16,
  localparam int AW   = $clog2(DEPTH),
  localparam int NB   = (NLEV > 1) ? NLEV - 1 : 1,
  localparam int BW   = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NLEV-1:0] lv_en,
  input  link_fwd_t       lv_fwd [NLEV],
  output link_bwd_t       lv_bwd [NLEV],
  output logic [NLEV-1:0] ip_out_v,
  output flit_t           ip_out_data[NLEV]
);

  typedef enum logic [1:0] {RX_IDLE, RX_DIRECT, RX_BUF} rx_mode_e;

  // per level: receiver
  rx_mode_e        rx_mode [NLEV];
  int unsigned     rx_dst  [NLEV];
  logic [AW:0]     rx_wr   [NLEV];
  logic [AW:0]     rx_total[NLEV];
  // per destination IP: output multiplexer
  logic [NLEV-1:0] out_dir;            // direct path in use
  logic [NLEV-1:0] out_buf_v;          // draining a buffer
  logic [BW-1:0]   out_buf_b[NLEV];
  logic [AW:0]     out_rd   [NLEV];
  // per IP and buffer
  logic [NB-1:0]   buf_busy [NLEV];    // being written or holding a packet
  logic [NB-1:0]   buf_full [NLEV];    // holds a complete packet
  logic [AW:0]     buf_total[NLEV][NB];
  flit_t           buf_rdata[NLEV][NB];

  // level k's buffer slot inside IP d's buffers, and the reverse
  function automatic int bidx(input int k, input int d);
    return (k < d) ? k : k - 1;
  endfunction
  function automatic int blvl(input int b, input int d);
    return (b < d) ? b : b + 1;
  endfunction

  // ------------------------------------------------------ header decisions
  logic [NLEV-1:0] hdr_now, acc_direct, acc_buf, rej;
  int unsigned     hdr_dst[NLEV];
  logic [LEN_W-1:0] hdr_len[NLEV];

  always_comb begin
    header_t h;
    for (int k = 0; k < NLEV; k++) begin
      h          = header_t'(lv_fwd[k].data);
      hdr_dst[k] = (int'(h.ipd) < NLEV) ? int'(h.ipd) : NLEV - 1;
      hdr_len[k] = h.len;
      hdr_now[k] = lv_en[k] && rx_mode[k] == RX_IDLE && lv_fwd[k].req;
      acc_direct[k] = 1'b0;
      acc_buf[k]    = 1'b0;
      rej[k]        = 1'b0;
      if (hdr_now[k]) begin
        if (hdr_dst[k] == k) begin
          if (!out_dir[k] && !out_buf_v[k]) acc_direct[k] = 1'b1;
          else                              rej[k]        = 1'b1;
        end else begin
          if (!buf_busy[hdr_dst[k]][bidx(k, hdr_dst[k])]) acc_buf[k] = 1'b1;
          else                                             rej[k]     = 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------------- receivers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NLEV; k++) begin
        rx_mode[k]  <= RX_IDLE;
        rx_dst[k]   <= 0;
        rx_wr[k]    <= '0;
        rx_total[k] <= '0;
        lv_bwd[k]   <= BWD_IDLE;
      end
    end else begin
      for (int k = 0; k < NLEV; k++) begin
        if (lv_en[k]) begin
          lv_bwd[k].ack_v <= 1'b0;
          if (rej[k]) begin
            lv_bwd[k].ack_v <= 1'b1;
            lv_bwd[k].ack   <= ACK_ERR;
          end else if (acc_direct[k] || acc_buf[k]) begin
            rx_dst[k]   <= hdr_dst[k];
            rx_wr[k]    <= 1;
            rx_total[k] <= (AW+1)'(hdr_len[k]) + 1'b1;
            lv_bwd[k].ack_v <= 1'b1;
            if (hdr_len[k] == '0) begin
              lv_bwd[k].ack <= ACK_DONE;
              rx_mode[k]    <= RX_IDLE;
            end else begin
              lv_bwd[k].ack <= ACK_HDR;
              rx_mode[k]    <= acc_direct[k] ? RX_DIRECT : RX_BUF;
            end
          end else if (rx_mode[k] != RX_IDLE && lv_fwd[k].req) begin
            rx_wr[k] <= rx_wr[k] + 1'b1;
            if (rx_wr[k] + 1'b1 == rx_total[k]) begin
              lv_bwd[k].ack_v <= 1'b1;
              lv_bwd[k].ack   <= ACK_DONE;
              rx_mode[k]      <= RX_IDLE;
            end else if (rx_wr[k] == 1) begin
              lv_bwd[k].ack_v <= 1'b1;
              lv_bwd[k].ack   <= ACK_BODY;
            end
          end
        end
      end
    end
  end

  // --------------------------------------------------------------- buffers
  for (genvar d = 0; d < NLEV; d++) begin : g_ip
    for (genvar b = 0; b < NLEV - 1; b++) begin : g_buf
      localparam int K = blvl(b, d);
      logic          we;
      logic [AW-1:0] waddr, raddr;
      assign we    = (acc_buf[K] && hdr_dst[K] == d) ||
                     (lv_en[K] && rx_mode[K] == RX_BUF && rx_dst[K] == d && lv_fwd[K].req);
      assign waddr = acc_buf[K] ? '0 : rx_wr[K][AW-1:0];
      assign raddr = (out_buf_v[d] && int'(out_buf_b[d]) == b) ? out_rd[d][AW-1:0] : '0;
      packet_buffer #(.DEPTH(DEPTH), .FLIT_W(FLIT_W)) u_buf (
        .clk, .we, .waddr, .wdata(lv_fwd[K].data), .raddr, .rdata(buf_rdata[d][b])
      );
    end
  end

  // ------------------------------------------------- output multiplexers
  logic [NLEV-1:0] drain_start;
  logic [BW-1:0]   drain_b[NLEV];

  always_comb begin
    for (int d = 0; d < NLEV; d++) begin
      drain_start[d] = 1'b0;
      drain_b[d]     = '0;
      if (lv_en[d] && !out_dir[d] && !out_buf_v[d] && !acc_direct[d])
        for (int b = NLEV - 2; b >= 0; b--)
          if (buf_full[d][b]) begin
            drain_start[d] = 1'b1;
            drain_b[d]     = BW'(b);
          end
      // output flit
      ip_out_v[d]    = 1'b0;
      ip_out_data[d] = '0;
      if (lv_en[d]) begin
        if (acc_direct[d] || (out_dir[d] && lv_fwd[d].req)) begin
          ip_out_v[d]    = 1'b1;
          ip_out_data[d] = lv_fwd[d].data;
        end else if (out_buf_v[d]) begin
          ip_out_v[d]    = 1'b1;
          ip_out_data[d] = buf_rdata[d][out_buf_b[d]];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_dir   <= '0;
      out_buf_v <= '0;
      for (int d = 0; d < NLEV; d++) begin
        out_buf_b[d] <= '0;
        out_rd[d]    <= '0;
        buf_busy[d]  <= '0;
        buf_full[d]  <= '0;
        for (int b = 0; b < NB; b++) buf_total[d][b] <= '0;
      end
    end else begin
      // buffer filling (level k's steps)
      for (int k = 0; k < NLEV; k++) begin
        if (acc_buf[k]) begin
          buf_busy[hdr_dst[k]][bidx(k, hdr_dst[k])]  <= 1'b1;
          buf_total[hdr_dst[k]][bidx(k, hdr_dst[k])] <= (AW+1)'(hdr_len[k]) + 1'b1;
          if (hdr_len[k] == '0) buf_full[hdr_dst[k]][bidx(k, hdr_dst[k])] <= 1'b1;
        end else if (lv_en[k] && rx_mode[k] == RX_BUF && lv_fwd[k].req &&
                     rx_wr[k] + 1'b1 == rx_total[k]) begin
          buf_full[rx_dst[k]][bidx(k, rx_dst[k])] <= 1'b1;
        end
      end
      // output side (IP d's steps)
      for (int d = 0; d < NLEV; d++) begin
        if (lv_en[d]) begin
          // direct path
          if (acc_direct[d]) begin
            out_dir[d] <= (hdr_len[d] != '0);
          end else if (out_dir[d] && lv_fwd[d].req && rx_wr[d] + 1'b1 == rx_total[d]) begin
            out_dir[d] <= 1'b0;
          end
          // buffered packets
          if (drain_start[d]) begin
            out_buf_v[d] <= 1'b1;
            out_buf_b[d] <= drain_b[d];
            out_rd[d]    <= '0;
          end else if (out_buf_v[d]) begin
            out_rd[d] <= out_rd[d] + 1'b1;
            if (out_rd[d] + 1'b1 == buf_total[d][out_buf_b[d]]) begin
              out_buf_v[d]               <= 1'b0;
              buf_busy[d][out_buf_b[d]]  <= 1'b0;
              buf_full[d][out_buf_b[d]]  <= 1'b0;
            end
          end
        end
      end
    end
  end

  // One packet at a time on each IP output.
  for (genvar d = 0; d < NLEV; d++) begin : g_chk
    a_one_source: assert property (@(posedge clk) disable iff (!rst_n)
      !(out_dir[d] && out_buf_v[d]));
  end

endmodule
