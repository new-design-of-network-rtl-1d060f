// input_port: receive side and storage of one router input.
//
// Every packet that arrives is stored at once in a 16-flit packet buffer,
// whatever the state of the output it will take; the stored copy is kept
// until the next router acknowledges the whole packet, so a refused or
// failed transfer is simply sent again.
//
// Receive handshake (all registers advance only when en is high; en is the
// router's time slot in RVNOC and always 1 in LVNOC):
//   * empty buffer, req high   -> header stored, ack 00 (11 if P.length = 0)
//   * body flits               -> stored one per step; ack 01 after the
//                                 first one, ack 11 after the last one
//   * req while a packet is held -> ack 10 (refused; the sender resends)
// ack_v is high for exactly one step with each code.
//
// Transmit side: the routing unit raises `start` in the step in which it
// grants an output; from the next step the port sends flit rd of the buffer
// whenever it has been received (cut-through), with the NB value `start_nb`
// chosen by the routing unit.  ack 11 from downstream frees the buffer,
// ack 10 rewinds to the header and hands the packet back to the routing
// unit.  The header of an arriving packet is offered to the routing unit in
// the same step it is stored (hdr_v/hdr), so a packet can leave one step
// after it arrived.
//
// From the publication: instant storage of every packet, ack codes 00/01/11/10, resend
// on 10.  This design's choices: ack 10 means "buffer still occupied", acks are registered
// with an ack_v strobe, header bypass to the routing unit.
module input_port
  import vnoc_pkg::*;
#(
  parameter int DEPTH = BUF_DEPTH,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  // link from the upstream router
  input  link_fwd_t       rx_fwd,
  output link_bwd_t       rx_bwd,
  // to the routing unit
  output logic            hdr_v,     // a packet waits for an output
  output header_t         hdr,
  output logic [NB_W-1:0] hdr_nb,
  output logic            tx_busy,   // a transfer is in progress
  output logic            tx_end,    // transfer ends in this step (ack 11 or 10)
  input  logic            start,
  input  logic [NB_W-1:0] start_nb,
  // towards the crossbar
  output link_fwd_t       tx_fwd,
  input  link_bwd_t       tx_bwd
);

  typedef enum logic [1:0] {RX_EMPTY, RX_BODY, RX_FULL} rx_state_e;

  rx_state_e       rx_state;
  logic [AW:0]     wr_cnt;     // flits stored
  logic [AW:0]     total;      // flits in the stored packet
  logic [NB_W-1:0] nb_rx;
  logic [AW:0]     rd_cnt;     // flits sent in the current attempt
  logic [NB_W-1:0] nb_tx;
  logic            sending;
  logic            tx_done, tx_fail, flit_avail;

  logic [AW-1:0]   waddr, raddr;
  flit_t           wdata, rdata, head_flit;
  logic            we;

  header_t         in_hdr;
  assign in_hdr = header_t'(rx_fwd.data);

  // ---------------------------------------------------------------- storage
  packet_buffer #(.DEPTH(DEPTH), .FLIT_W(FLIT_W)) u_buf (
    .clk, .we, .waddr, .wdata, .raddr, .rdata
  );

  always_comb begin
    we    = en && rx_fwd.req && (rx_state != RX_FULL);
    waddr = (rx_state == RX_EMPTY) ? '0 : wr_cnt[AW-1:0];
    wdata = rx_fwd.data;
    raddr = sending ? rd_cnt[AW-1:0] : '0;
  end
  assign head_flit = rdata;

  // ------------------------------------------------------------- receiving
  logic accept_hdr;
  assign accept_hdr = (rx_state == RX_EMPTY) && rx_fwd.req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_state <= RX_EMPTY;
      wr_cnt   <= '0;
      total    <= '0;
      nb_rx    <= '0;
      rx_bwd   <= BWD_IDLE;
    end else if (en) begin
      rx_bwd.ack_v <= 1'b0;
      unique case (rx_state)
        RX_EMPTY: if (rx_fwd.req) begin
          wr_cnt <= 1;
          total  <= (AW+1)'(in_hdr.len) + 1'b1;
          nb_rx  <= rx_fwd.nb;
          rx_bwd.ack_v <= 1'b1;
          if (in_hdr.len == '0) begin
            rx_bwd.ack <= ACK_DONE;
            rx_state   <= RX_FULL;
          end else begin
            rx_bwd.ack <= ACK_HDR;
            rx_state   <= RX_BODY;
          end
        end
        RX_BODY: if (rx_fwd.req) begin
          wr_cnt <= wr_cnt + 1'b1;
          if (wr_cnt + 1'b1 == total) begin
            rx_bwd.ack_v <= 1'b1;
            rx_bwd.ack   <= ACK_DONE;
            rx_state     <= RX_FULL;
          end else if (wr_cnt == 1) begin
            rx_bwd.ack_v <= 1'b1;
            rx_bwd.ack   <= ACK_BODY;
          end
        end
        RX_FULL: begin
          if (rx_fwd.req) begin
            rx_bwd.ack_v <= 1'b1;
            rx_bwd.ack   <= ACK_ERR;
          end
          if (tx_done) begin
            rx_state <= RX_EMPTY;
            wr_cnt   <= '0;
          end
        end
        default: rx_state <= RX_EMPTY;
      endcase
    end
  end

  // -------------------------------------------------------- offer to router
  always_comb begin
    if (rx_state == RX_EMPTY) begin
      hdr_v  = accept_hdr;
      hdr    = in_hdr;
      hdr_nb = rx_fwd.nb;
    end else begin
      hdr_v  = !sending;
      hdr    = header_t'(head_flit);
      hdr_nb = nb_rx;
    end
  end

  // ------------------------------------------------------------ transmitting
  assign tx_done    = sending && tx_bwd.ack_v && (tx_bwd.ack == ACK_DONE);
  assign tx_fail    = sending && tx_bwd.ack_v && (tx_bwd.ack == ACK_ERR);
  assign tx_end     = tx_done || tx_fail;
  assign tx_busy    = sending;
  assign flit_avail = (rd_cnt < wr_cnt) && (rd_cnt < total);

  always_comb begin
    tx_fwd      = FWD_IDLE;
    tx_fwd.req  = sending && flit_avail && !tx_fail;
    tx_fwd.data = tx_fwd.req ? rdata : '0;
    tx_fwd.nb   = tx_fwd.req ? nb_tx : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending <= 1'b0;
      rd_cnt  <= '0;
      nb_tx   <= '0;
    end else if (en) begin
      if (start && !sending) begin
        sending <= 1'b1;
        rd_cnt  <= '0;
        nb_tx   <= start_nb;
      end else if (tx_end) begin
        sending <= 1'b0;
        rd_cnt  <= '0;
      end else if (tx_fwd.req) begin
        rd_cnt <= rd_cnt + 1'b1;
      end
    end
  end

  // A packet must fit the buffer (virtual cut-through keeps it whole).
  a_len_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (en && accept_hdr) |-> (int'(in_hdr.len) < DEPTH));
  // The routing unit starts a transfer only for a packet that is offered.
  a_start_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (en && start) |-> (hdr_v && !sending));

endmodule
