// tb_crossbar: random one-to-one assignments of inputs to outputs; every
// used output must carry its input's stream, unused outputs must be idle,
// and each acknowledge must reach the input that owns the output.
//
// Reference: the publication only names combinational multiplexing units.  This bench's
// choices: the model of steering for both directions.
module tb_crossbar;
  import vnoc_pkg::*;
  logic [2:0] sel [5];
  logic [4:0] sel_v;
  link_fwd_t  in_fwd [5], out_fwd [5];
  link_bwd_t  in_bwd [5], out_bwd [5];
  int checks = 0, failures = 0;

  crossbar dut (.sel, .sel_v, .in_fwd, .in_bwd, .out_fwd, .out_bwd);

  initial begin
    for (int n = 0; n < 300; n++) begin
      int perm [5];
      for (int i = 0; i < 5; i++) perm[i] = i;
      for (int i = 4; i > 0; i--) begin
        int j, t;
        j = $urandom % (i + 1); t = perm[i]; perm[i] = perm[j]; perm[j] = t;
      end
      for (int i = 0; i < 5; i++) begin
        in_fwd[i]  = link_fwd_t'({$urandom, $urandom});
        out_bwd[i] = link_bwd_t'(3'($urandom));
        sel[i]     = 3'(perm[i]);
      end
      sel_v = 5'($urandom);
      #1;
      for (int o = 0; o < 5; o++) begin
        checks++;
        if (sel_v[o]) begin
          if (out_fwd[o] != in_fwd[perm[o]] || in_bwd[perm[o]] != out_bwd[o]) begin
            failures++; $display("FAIL output %0d", o);
          end
        end else if (out_fwd[o] != FWD_IDLE || in_bwd[perm[o]] != BWD_IDLE) begin
          failures++; $display("FAIL idle output %0d", o);
        end
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
