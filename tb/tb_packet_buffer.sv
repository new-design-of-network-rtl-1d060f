// tb_packet_buffer: writes a random flit to each of the 16 words, reads all
// back through the asynchronous read port, then overwrites a few words and
// checks that only those changed.
//
// Reference: the 16 x 32 buffer size is the publication's.  This bench's choices: the
// read timing (asynchronous) checked, as in the RTL.
module tb_packet_buffer;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        we = 1'b0;
  logic [3:0]  waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  packet_buffer dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    @(negedge clk);
    for (int a = 0; a < 16; a++) begin
      we = 1'b1; waddr = 4'(a); wdata = $urandom; model[a] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int a = 0; a < 16; a++) begin
      raddr = 4'(a); #1;
      checks++; if (rdata != model[a]) begin failures++; $display("FAIL word %0d", a); end
    end
    for (int n = 0; n < 20; n++) begin
      int a;
      a = $urandom % 16;
      we = 1'b1; waddr = 4'(a); wdata = $urandom; model[a] = wdata;
      raddr = 4'($urandom % 16);
      @(negedge clk);
      we = 1'b0; #1;
      checks++; if (rdata != model[raddr]) begin failures++; $display("FAIL read %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
