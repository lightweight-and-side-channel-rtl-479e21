// tb_ti_ca131_direct_core: exhaustive self-checking test of the four-share direct
// TI of the class (1,3,1) rule.  For all 2^16 share assignments it checks that
// the output shares XOR to the rule applied to the unshared input (reference truth
// table), and for random assignments that each output share is unaffected by the
// input share it must not read (f1: share 4, f2: share 1, f3: share 2, f4: share 3).
module tb_ti_ca131_direct_core;
  import tb_sbox_tables_pkg::*;
  logic [3:0][3:0] in, in2;
  logic [3:0]      f, f2;
  int checks = 0, failures = 0;
  localparam int MISSING [4] = '{3, 0, 1, 2};

  ti_ca131_direct_core dut  (.in(in),  .f(f));
  ti_ca131_direct_core dut2 (.in(in2), .f(f2));

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
      checks++;
      if ((^f) !== rule(1, x)) begin
        failures++;
        if (failures < 10) $display("FAIL correctness in=%h f=%b", in, f);
      end
    end
    for (int n = 0; n < 4000; n++) begin
      int k;
      in = 16'($urandom);
      k = n % 4;
      in2 = in;
      in2[MISSING[k]] = 4'($urandom);
      #1;
      checks++;
      if (f[k] !== f2[k]) begin
        failures++;
        if (failures < 10) $display("FAIL non-completeness: share f%0d depends on input share %0d", k + 1, MISSING[k] + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
