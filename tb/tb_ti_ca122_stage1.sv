// tb_ti_ca122_stage1: exhaustive self-checking test of the first composite stage of
// the class (1,2,2) rule.  For all 2^12 three-share inputs the shares must XOR to
// b1 = X^Y^XW^YW, b2 = Z^XY^XZ and b3 = X^W^XZ^ZW, and these must combine to the
// rule: b1^b2^b1b3^b2b3 = f.  For random inputs, output share k must not depend on
// input share k+2 (mod 3).  Uniformity: for every unshared input, each of b1, b2, b3
// taken on its own must spread the 256 input sharings evenly over its 4 output sharings.
module tb_ti_ca122_stage1;
  import tb_sbox_tables_pkg::*;
  logic [2:0][3:0] in, in2;
  logic [2:0] b1, b2, b3, b1b, b2b, b3b;
  int checks = 0, failures = 0;
  localparam int MISSING [3] = '{2, 0, 1};

  ti_ca122_stage1 dut  (.in(in),  .b1(b1),  .b2(b2),  .b3(b3));
  ti_ca122_stage1 dut2 (.in(in2), .b1(b1b), .b2(b2b), .b3(b3b));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      logic x, y, z, w, s1, s2, s3;
      in = 12'(v);
      in2 = in;
      #1;
      {x, y, z, w} = in[0] ^ in[1] ^ in[2];
      s1 = ^b1; s2 = ^b2; s3 = ^b3;
      checks += 4;
      if (s1 !== (x ^ y ^ (x & w) ^ (y & w))) begin failures++; $display("FAIL b1 in=%h", in); end
      if (s2 !== (z ^ (x & y) ^ (x & z)))     begin failures++; $display("FAIL b2 in=%h", in); end
      if (s3 !== (x ^ w ^ (x & z) ^ (z & w))) begin failures++; $display("FAIL b3 in=%h", in); end
      if ((s1 ^ s2 ^ (s1 & s3) ^ (s2 & s3)) !== rule(0, {x, y, z, w})) begin
        failures++; $display("FAIL decomposition in=%h", in);
      end
    end
    for (int x = 0; x < 16; x++) begin
      int hist [3][8];
      hist = '{default: 0};
      for (int s = 0; s < 256; s++) begin
        in = {4'(x) ^ 4'(s) ^ 4'(s >> 4), 4'(s >> 4), 4'(s)};
        #1;
        hist[0][b1]++;
        hist[1][b2]++;
        hist[2][b3]++;
      end
      for (int f = 0; f < 3; f++) begin
        int used, bad;
        used = 0;
        bad = 0;
        foreach (hist[f][i]) if (hist[f][i] != 0) begin
          used++;
          if (hist[f][i] != 64) bad++;
        end
        checks++;
        if (used != 4 || bad != 0) begin
          failures++;
          $display("FAIL uniformity of b%0d: input %h reaches %0d output sharings", f + 1, x, used);
        end
      end
    end
    for (int n = 0; n < 3000; n++) begin
      int k;
      in = 12'($urandom);
      k = n % 3;
      in2 = in;
      in2[MISSING[k]] = 4'($urandom);
      #1;
      checks++;
      if (b1[k] !== b1b[k] || b2[k] !== b2b[k] || b3[k] !== b3b[k]) begin
        failures++;
        $display("FAIL non-completeness: output share %0d reads input share %0d", k + 1, MISSING[k] + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
