// tb_ti_ca122_stage2: exhaustive self-checking test of the second composite stage of
// the class (1,2,2) rule: for all 2^9 sharings of b1, b2, b3 the output shares must
// XOR to b1 ^ b2 ^ b1*b3 ^ b2*b3, and output share k must not depend on share
// k+2 (mod 3) of any input.
module tb_ti_ca122_stage2;
  logic [2:0] b1, b2, b3, f, b1b, b2b, b3b, f2;
  int checks = 0, failures = 0;
  localparam int MISSING [3] = '{2, 0, 1};

  ti_ca122_stage2 dut  (.b1(b1),  .b2(b2),  .b3(b3),  .f(f));
  ti_ca122_stage2 dut2 (.b1(b1b), .b2(b2b), .b3(b3b), .f(f2));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic s1, s2, s3;
      {b3, b2, b1} = 9'(v);
      b1b = b1; b2b = b2; b3b = b3;
      #1;
      s1 = ^b1; s2 = ^b2; s3 = ^b3;
      checks++;
      if ((^f) !== (s1 ^ s2 ^ (s1 & s3) ^ (s2 & s3))) begin
        failures++; $display("FAIL b1=%b b2=%b b3=%b f=%b", b1, b2, b3, f);
      end
      for (int k = 0; k < 3; k++) begin
        int m;
        m = MISSING[k];
        b1b = b1; b2b = b2; b3b = b3;
        b1b[m] = ~b1[m]; b2b[m] = 1'($urandom); b3b[m] = 1'($urandom);
        #1;
        checks++;
        if (f[k] !== f2[k]) begin
          failures++; $display("FAIL non-completeness: f%0d reads share %0d", k + 1, m + 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
