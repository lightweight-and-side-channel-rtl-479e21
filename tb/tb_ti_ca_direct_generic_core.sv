// tb_ti_ca_direct_generic_core: exhaustive self-checking test of the generic
// four-share direct TI, instantiated for all twelve representative rules.  For each
// rule and all 2^16 share assignments, the output shares must XOR to the rule of the
// unshared input (reference truth tables); for random assignments, output share j
// must not depend on input share j.
module tb_ti_ca_direct_generic_core;
  import ca_sbox_pkg::*;
  import tb_sbox_tables_pkg::*;
  logic [3:0][3:0] in, in2;
  logic [11:0][3:0] f, f2;
  int checks = 0, failures = 0;

  for (genvar c = 0; c < 12; c++) begin : g_cls
    ti_ca_direct_generic_core #(.ANF(class_anf(ca_class_e'(c)))) u  (.in(in),  .f(f[c]));
    ti_ca_direct_generic_core #(.ANF(class_anf(ca_class_e'(c)))) u2 (.in(in2), .f(f2[c]));
  end

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      logic [3:0] x;
      in = 16'(v);
      in2 = in;
      #1;
      x = in[0] ^ in[1] ^ in[2] ^ in[3];
      for (int c = 0; c < 12; c++) begin
        checks++;
        if ((^f[c]) !== rule(c, x)) begin
          failures++;
          if (failures < 10) $display("FAIL class %0d in=%h f=%b", c, in, f[c]);
        end
      end
    end
    for (int n = 0; n < 4000; n++) begin
      int k;
      in = 16'($urandom);
      k = n % 4;
      in2 = in;
      in2[k] = 4'($urandom);
      #1;
      for (int c = 0; c < 12; c++) begin
        checks++;
        if (f[c][k] !== f2[c][k]) begin
          failures++;
          if (failures < 10) $display("FAIL class %0d: f%0d reads input share %0d", c, k + 1, k + 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
