// tb_ti_ca131_stage1: exhaustive self-checking test of the first composite stage of
// the class (1,3,1) rule.  For all 2^12 three-share inputs the b1 shares must XOR to
// X ^ YW and the b2 shares to YZ ^ YW; for random inputs, output share k must not
// depend on input share k+2 (mod 3).  Uniformity: for every unshared input, the 256
// sharings of it must map evenly onto the 16 sharings of the (b1, b2) value.
module tb_ti_ca131_stage1;
  logic [2:0][3:0] in, in2;
  logic [2:0] b1, b2, b1b, b2b;
  int checks = 0, failures = 0;
  localparam int MISSING [3] = '{2, 0, 1};

  ti_ca131_stage1 dut  (.in(in),  .b1(b1),  .b2(b2));
  ti_ca131_stage1 dut2 (.in(in2), .b1(b1b), .b2(b2b));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      logic x, y, z, w;
      in = 12'(v);
      in2 = in;
      #1;
      {x, y, z, w} = in[0] ^ in[1] ^ in[2];
      checks += 2;
      if ((^b1) !== (x ^ (y & w))) begin failures++; $display("FAIL b1 in=%h", in); end
      if ((^b2) !== ((y & z) ^ (y & w))) begin failures++; $display("FAIL b2 in=%h", in); end
    end
    for (int x = 0; x < 16; x++) begin
      int hist [64];
      int used, bad;
      hist = '{default: 0};
      for (int s = 0; s < 256; s++) begin
        in = {4'(x) ^ 4'(s) ^ 4'(s >> 4), 4'(s >> 4), 4'(s)};
        #1;
        hist[{b1, b2}]++;
      end
      used = 0;
      bad = 0;
      foreach (hist[i]) if (hist[i] != 0) begin
        used++;
        if (hist[i] != 16) bad++;
      end
      checks++;
      if (used != 16 || bad != 0) begin
        failures++;
        $display("FAIL uniformity: input %h reaches %0d output sharings", x, used);
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
      if (b1[k] !== b1b[k] || b2[k] !== b2b[k]) begin
        failures++;
        $display("FAIL non-completeness: output share %0d reads input share %0d", k + 1, MISSING[k] + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
