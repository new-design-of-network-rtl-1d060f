// tb_or_combiner: one non-zero input per slot must pass unchanged; with
// arbitrary inputs the output is the bitwise OR.
//
// Reference: the OR combiner of the RVNOC global router is the publication's.  This
// bench's choices: random vectors and the one-hot slot pattern.
module tb_or_combiner;
  logic [36:0] din [3];
  logic [36:0] dout;
  int checks = 0, failures = 0;

  or_combiner dut (.din, .dout);

  initial begin
    for (int n = 0; n < 200; n++) begin
      int s;
      logic [36:0] v, e;
      s = n % 3;
      v = {$urandom, $urandom};
      for (int i = 0; i < 3; i++) din[i] = (i == s) ? v : '0;
      #1; checks++;
      if (dout != v) begin failures++; $display("FAIL slot %0d", s); end
      for (int i = 0; i < 3; i++) din[i] = {$urandom, $urandom};
      e = din[0] | din[1] | din[2];
      #1; checks++;
      if (dout != e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
