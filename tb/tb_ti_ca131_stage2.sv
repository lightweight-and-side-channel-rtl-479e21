// tb_ti_ca131_stage2: exhaustive self-checking test of the second composite stage of
// the class (1,3,1) rule.  For all combinations of X, Z shares and b1, b2 shares the
// output shares must XOR to b2 ^ b1*Z ^ X; for random inputs, output share k must
// not depend on share k+2 (mod 3) of any input.  Uniformity of the whole rule: with
// the first stage in front, the 256 sharings of every unshared input must spread
// evenly over the 4 sharings of the rule output.
module tb_ti_ca131_stage2;
  logic [2:0][3:0] in, in2;
  logic [2:0] b1, b2, f, b1b, b2b, f2;
  int checks = 0, failures = 0;
  localparam int MISSING [3] = '{2, 0, 1};

  ti_ca131_stage2 dut  (.in(in),  .b1(b1),  .b2(b2),  .f(f));
  ti_ca131_stage2 dut2 (.in(in2), .b1(b1b), .b2(b2b), .f(f2));

  logic [2:0][3:0] in3;
  logic [2:0] b1c, b2c, f3;
  ti_ca131_stage1 u_stage1 (.in(in3), .b1(b1c), .b2(b2c));
  ti_ca131_stage2 dut3 (.in(in3), .b1(b1c), .b2(b2c), .f(f3));

  initial begin : watchdog
    #10_000_000;
    failures++;
    for (int x = 0; x < 16; x++) begin
      int hist [8];
      int used, bad;
      hist = '{default: 0};
      for (int s = 0; s < 256; s++) begin
        in3 = {4'(x) ^ 4'(s) ^ 4'(s >> 4), 4'(s >> 4), 4'(s)};
        #1;
        hist[f3]++;
      end
      used = 0;
      bad = 0;
      foreach (hist[i]) if (hist[i] != 0) begin
        used++;
        if (hist[i] != 64) bad++;
      end
      checks++;
      if (used != 4 || bad != 0) begin
        failures++;
        $display("FAIL rule uniformity: input %h reaches %0d output sharings", x, used);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      logic x, z;
      in = '0;
      for (int j = 0; j < 3; j++) begin
        in[j][3] = v[2 * j];        // X share
        in[j][1] = v[2 * j + 1];    // Z share
        in[j][2] = 1'($urandom);    // Y, W do not matter
        in[j][0] = 1'($urandom);
      end
      b1 = 3'(v >> 6);
      b2 = 3'(v >> 9);
      b1b = b1; b2b = b2; in2 = in;
      #1;
      x = in[0][3] ^ in[1][3] ^ in[2][3];
      z = in[0][1] ^ in[1][1] ^ in[2][1];
      checks++;
      if ((^f) !== ((^b2) ^ ((^b1) & z) ^ x)) begin
        failures++;
        if (failures < 10) $display("FAIL in=%h b1=%b b2=%b f=%b", in, b1, b2, f);
      end
    end
    for (int n = 0; n < 3000; n++) begin
      int k, m;
      in = 12'($urandom); b1 = 3'($urandom); b2 = 3'($urandom);
      k = n % 3; m = MISSING[k];
      in2 = in; b1b = b1; b2b = b2;
      in2[m] = 4'($urandom); b1b[m] = 1'($urandom); b2b[m] = 1'($urandom);
      #1;
      checks++;
      if (f[k] !== f2[k]) begin
        failures++;
        $display("FAIL non-completeness: f%0d reads share %0d", k + 1, m + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
