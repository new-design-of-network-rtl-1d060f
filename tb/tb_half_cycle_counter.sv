// tb_half_cycle_counter: after reset the slot count must run 1,2,0,1,2,0...
// (one slot per clock), as printed for three elementary routers.
//
// Reference: the slot sequence 1,2,0 is the publication's.  This bench's choices:
// checking modulo NLEV for other sizes and behaviour across reset.
module tb_half_cycle_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [1:0] slot;
  int checks = 0, failures = 0;

  half_cycle_counter dut (.clk, .rst_n, .slot);

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (slot != 2'd1) failures++;
    rst_n = 1'b1;
    for (int n = 0; n < 30; n++) begin
      int expv;
      expv = (n + 1) % 3;
      checks++;
      if (slot != 2'(expv)) begin failures++; $display("FAIL n=%0d slot=%0d", n, slot); end
      @(negedge clk);
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
