// tb_zero_set_unit: random inputs, activity, level slots and current slot;
// each output must equal its input exactly when the input is active and the
// slot is its own, and be 0 otherwise.
//
// Reference: the zero-set unit of the RVNOC is the publication's.  This bench's choices:
// random vectors over all slots.
module tb_zero_set_unit;
  logic [36:0] din [3], dout [3];
  logic [2:0]  act;
  logic [1:0]  lvl_slot [3];
  logic [1:0]  slot;
  int checks = 0, failures = 0;

  zero_set_unit dut (.din, .act, .lvl_slot, .slot, .dout);

  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 3; i++) begin
        din[i] = {$urandom, $urandom};
        lvl_slot[i] = 2'($urandom % 3);
      end
      act  = 3'($urandom);
      slot = 2'($urandom % 3);
      #1;
      for (int i = 0; i < 3; i++) begin
        logic [36:0] e;
        e = (act[i] && lvl_slot[i] == slot) ? din[i] : '0;
        checks++;
        if (dout[i] != e) begin failures++; $display("FAIL n=%0d i=%0d", n, i); end
      end
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
