// noc_traffic: IP traffic generator and scoreboard for a virtual-router
// network (testbench only).
//
// Every IP sends NPKT packets to random destinations (uniform over all other
// IPs, or, while `hotspot` is set, to the IPs of the centre global router).
// An idle IP starts a new packet with probability RATE/100 per step.
// Packets have 1..MAXLEN body flits; body flit i of packet (src, seq) holds
// {src, seq, i, src^seq^i}.  The sender follows the link handshake: it holds
// its header until the interface connects it (ip_step), sends one flit per
// step, drops req and starts over on ack 10, and finishes on ack 11.
// The scoreboard checks that every flit an IP receives belongs to a packet
// that was sent to that IP, in order and complete, and counts latency from
// packet creation to the last flit.  checks/failures are running totals.
//
// Reference: the uniform and hot-spot traffic kinds come from the publication's
// evaluation.  This bench's choices: packet counts, rates, lengths, the IP-side
// handshake and the scoreboard.
module noc_traffic
  import vnoc_pkg::*;
#(
  parameter int COLS   = 3,
  parameter int ROWS   = 3,
  parameter int NLEV   = 3,
  parameter int NPKT   = 4,
  parameter int RATE   = 20,
  parameter int MAXLEN = 6,
  localparam int NIP   = COLS * ROWS * NLEV
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           hotspot,
  input  logic           go,
  output link_fwd_t      ip_fwd [NIP],
  input  link_bwd_t      ip_bwd [NIP],
  input  logic [NIP-1:0] ip_step,
  input  logic [NIP-1:0] ip_out_v,
  input  flit_t          ip_out_data[NIP],
  output logic           done,
  output int             checks,
  output int             failures,
  output int             sent,
  output int             delivered,
  output int             retries,
  output longint         lat_sum
);

  // sender state
  logic        busy [NIP];
  int          idx  [NIP];
  int          plen [NIP];
  int          nsent[NIP];
  flit_t       pkt  [NIP][16];
  // scoreboard
  int          exp_dst[int];
  int          exp_len[int];
  longint      t_make [int];
  longint      cyc;
  // receiver state
  logic        r_in  [NIP];
  int          r_len [NIP];
  int          r_cnt [NIP];
  int          r_key [NIP];
  header_t     r_hdr [NIP];

  function automatic flit_t body(int src, int seq, int i);
    return {8'(src), 8'(seq), 8'(i), 8'(src ^ seq ^ i)};
  endfunction

  always_comb begin
    for (int j = 0; j < NIP; j++) begin
      ip_fwd[j] = FWD_IDLE;
      if (busy[j] && idx[j] <= plen[j] &&
          !(ip_bwd[j].ack_v && ip_bwd[j].ack == ACK_ERR)) begin
        ip_fwd[j].req  = 1'b1;
        ip_fwd[j].data = pkt[j][idx[j]];
      end
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0; checks <= 0; failures <= 0; sent <= 0; delivered <= 0;
      retries <= 0; lat_sum <= 0;
      for (int j = 0; j < NIP; j++) begin
        busy[j] <= 1'b0; idx[j] <= 0; plen[j] <= 0; nsent[j] <= 0;
        r_in[j] <= 1'b0; r_len[j] <= 0; r_cnt[j] <= 0; r_key[j] <= 0;
        r_hdr[j] <= '0;
      end
    end else begin
      cyc <= cyc + 1;
      // ------------------------------------------------------------ senders
      for (int j = 0; j < NIP; j++) begin
        if (!busy[j]) begin
          if (go && nsent[j] < NPKT &&
              ($urandom % 100) < RATE) begin
            int d, dn, len, key;
            int sx, sy, dx, dy;
            if (hotspot) begin
              dn = (ROWS / 2) * COLS + COLS / 2;
              d  = dn * NLEV + int'($urandom % NLEV);
              if (d == j) d = dn * NLEV + (d - dn * NLEV + 1) % NLEV;
            end else begin
              d = int'($urandom % (NIP - 1));
              if (d >= j) d++;
            end
            len = 1 + int'($urandom % MAXLEN);
            sx = (j / NLEV) % COLS; sy = (j / NLEV) / COLS;
            dx = (d / NLEV) % COLS; dy = (d / NLEV) / COLS;
            pkt[j][0] <= make_header(COORD_W'(sx), COORD_W'(sy), IPA_W'(j % NLEV),
                                     IPA_W'(d % NLEV), LEN_W'(len),
                                     COORD_W'(dx), COORD_W'(dy));
            for (int i = 1; i <= len; i++) pkt[j][i] <= body(j, nsent[j], i);
            key = j * 256 + nsent[j];
            exp_dst[key] = d;
            exp_len[key] = len;
            t_make[key]  = cyc;
            busy[j]  <= 1'b1;
            idx[j]   <= 0;
            plen[j]  <= len;
            nsent[j] <= nsent[j] + 1;
            sent = sent + 1;
          end
        end else if (ip_step[j]) begin
          if (ip_bwd[j].ack_v && ip_bwd[j].ack == ACK_ERR) begin
            idx[j]  <= 0;
            retries = retries + 1;
          end else if (ip_bwd[j].ack_v && ip_bwd[j].ack == ACK_DONE) begin
            busy[j] <= 1'b0;
          end else if (ip_fwd[j].req) begin
            idx[j] <= idx[j] + 1;
          end
        end
      end
      // ---------------------------------------------------------- receivers
      for (int d = 0; d < NIP; d++) begin
        if (ip_out_v[d]) begin
          flit_t f;
          f = ip_out_data[d];
          if (!r_in[d]) begin
            header_t h;
            h = header_t'(f);
            r_hdr[d] <= h;
            r_len[d] <= int'(h.len);
            r_cnt[d] <= 0;
            r_in[d]  <= (h.len != '0);   // a header-only packet ends here
            checks = checks + 1;
            if (int'(h.xd) != (d / NLEV) % COLS || int'(h.yd) != (d / NLEV) / COLS ||
                int'(h.ipd) != d % NLEV) begin
              failures = failures + 1;
              $display("ERROR: IP %0d got header for (%0d,%0d,%0d)", d, h.xd, h.yd, h.ipd);
            end
          end else begin
            int src, seq, i, key;
            src = int'(r_hdr[d].ips) + NLEV * (int'(r_hdr[d].xs) + COLS * int'(r_hdr[d].ys));
            seq = int'(f[23:16]);
            i   = r_cnt[d] + 1;
            key = src * 256 + seq;
            checks = checks + 1;
            if (f !== body(src, seq, i) || !exp_dst.exists(key) || exp_dst[key] != d ||
                exp_len[key] != r_len[d]) begin
              failures = failures + 1;
              $display("ERROR: IP %0d flit %0d of packet from %0d: %h", d, i, src, f);
            end
            r_cnt[d] <= i;
            if (i == r_len[d]) begin
              r_in[d]   <= 1'b0;
              delivered = delivered + 1;
              if (exp_dst.exists(key)) begin
                lat_sum = lat_sum + (cyc - t_make[key]);
                exp_dst.delete(key);
              end
            end
          end
        end
      end
    end
  end

  assign done = (sent == NIP * NPKT) && (delivered == sent);

endmodule
