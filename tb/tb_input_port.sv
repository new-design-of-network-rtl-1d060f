// tb_input_port: random packets through one input port.
//
// For each packet the bench (1) sends the header and checks that it is
// offered to the routing unit in the same clock and answered with ack 00
// (ack 11 for a header-only packet), (2) sends the body and checks ack 01
// after the first flit and ack 11 after the last, (3) sends a header to the
// full port and checks the refusal ack 10, (4) grants an output with a
// random NB and reads the packet back from tx_fwd, sometimes answering
// ack 10 part-way so the port must rewind and send the whole packet again,
// and (5) ends with ack 11, after which the port must accept a new packet.
// In the second half `en` is driven low at random; nothing may move then.
//
// Reference: ack codes 00/01/11/10 and resend follow the publication.  This bench's
// choices: ack timing one step after the flit and the meaning of ack 10 as refusal, as
// in the RTL.
module tb_input_port;
  import vnoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  always #5 clk = ~clk;

  link_fwd_t       rx_fwd = FWD_IDLE, tx_fwd;
  link_bwd_t       rx_bwd, tx_bwd = BWD_IDLE;
  logic            hdr_v, tx_busy, tx_end, start = 1'b0;
  header_t         hdr;
  logic [NB_W-1:0] hdr_nb, start_nb = '0;
  int checks = 0, failures = 0;
  bit rand_en = 0;

  input_port dut (.clk, .rst_n, .en, .rx_fwd, .rx_bwd, .hdr_v, .hdr, .hdr_nb,
                  .tx_busy, .tx_end, .start, .start_nb, .tx_fwd, .tx_bwd);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one step: run clocks until one edge with en high has passed; en is
  // changed 1 ns after an edge so it is stable at the next one
  task automatic step();
    forever begin
      @(posedge clk); #1;
      if (en) begin
        en = rand_en ? 1'($urandom % 2) : 1'b1;
        break;
      end
      en = rand_en ? 1'($urandom % 2) : 1'b1;
    end
  endtask

  flit_t pkt [16];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < 60; n++) begin
      int len, fail_at, got;
      logic [NB_W-1:0] nb_in, nb_out;
      header_t h;
      rand_en = (n >= 30);
      len   = $urandom % 16;
      nb_in = NB_W'($urandom % 4);
      h = make_header(4'($urandom), 4'($urandom), 4'($urandom % 3), 4'($urandom % 3),
                      8'(len), 4'($urandom), 4'($urandom));
      pkt[0] = h;
      for (int i = 1; i <= len; i++) pkt[i] = $urandom;
      // header
      rx_fwd.req = 1'b1; rx_fwd.data = pkt[0]; rx_fwd.nb = nb_in;
      #1 check(hdr_v && hdr == h && hdr_nb == nb_in, "header bypass");
      step();
      check(rx_bwd.ack_v && rx_bwd.ack == (len == 0 ? ACK_DONE : ACK_HDR), "header ack");
      // body
      for (int i = 1; i <= len; i++) begin
        rx_fwd.data = pkt[i];
        step();
        if (i == len)      check(rx_bwd.ack_v && rx_bwd.ack == ACK_DONE, "ack 11");
        else if (i == 1)   check(rx_bwd.ack_v && rx_bwd.ack == ACK_BODY, "ack 01");
        else               check(!rx_bwd.ack_v, "no ack mid-body");
      end
      // refused while full
      rx_fwd.data = $urandom;
      step();
      check(rx_bwd.ack_v && rx_bwd.ack == ACK_ERR, "ack 10 when full");
      rx_fwd = FWD_IDLE;
      step();
      check(!rx_bwd.ack_v, "ack is one step");
      check(hdr_v && hdr == h && hdr_nb == nb_in && !tx_busy, "stored header offered");
      // transmit, possibly with a refusal part-way
      fail_at = ($urandom % 3 == 0) ? int'($urandom % (len + 1)) : -1;
      for (int attempt = 0; attempt < 2; attempt++) begin
        nb_out = NB_W'($urandom);
        start = 1'b1; start_nb = nb_out;
        step();
        start = 1'b0;
        check(tx_busy, "sending after start");
        got = 0;
        while (got <= len) begin
          #1;
          check(tx_fwd.req && tx_fwd.data == pkt[got] && tx_fwd.nb == nb_out, "tx flit");
          if (attempt == 0 && got == fail_at) begin
            tx_bwd.ack_v = 1'b1; tx_bwd.ack = ACK_ERR;
            #1 check(!tx_fwd.req && tx_end, "ack 10 stops sending");
            step();
            tx_bwd = BWD_IDLE;
            #1 check(!tx_busy && hdr_v && hdr == h, "rewound after ack 10");
            break;
          end
          step();
          got++;
        end
        if (attempt == 0 && fail_at >= 0) continue;
        #1 check(!tx_fwd.req, "no flit after the packet");
        tx_bwd.ack_v = 1'b1; tx_bwd.ack = ACK_DONE;
        #1 check(tx_end, "tx_end on ack 11");
        step();
        tx_bwd = BWD_IDLE;
        #1 check(!tx_busy && !hdr_v, "buffer freed");
        break;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
