// tb_ti_mixcolumns: self-checking test of the share-wise almost-MDS MixColumns.
// Each output cell is compared with the matrix product written out row by row
// (row r of the matrix has zeros only on the diagonal), per share, and the XOR of
// the output shares must equal MixColumns of the XOR of the input shares.
module tb_ti_mixcolumns;
  localparam int SH = 3;
  logic [SH-1:0][63:0] din, dout;
  int checks = 0, failures = 0;
  localparam logic [3:0] M [4] = '{4'b0111, 4'b1011, 4'b1101, 4'b1110};

  ti_mixcolumns #(.SHARES(SH)) dut (.din, .dout);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] mc_ref(logic [63:0] s);
    logic [63:0] r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++) begin
        logic [3:0] acc;
        acc = '0;
        for (int k = 0; k < 4; k++)
          if (M[row][3 - k]) acc ^= s[63 - 4 * (4 * c + k) -: 4];
        r[63 - 4 * (4 * c + row) -: 4] = acc;
      end
    return r;
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int j = 0; j < SH; j++) din[j] = {$urandom, $urandom};
      if (n == 0) begin din = '0; din[0][63:60] = 4'h1; end   // single cell
      #1;
      for (int j = 0; j < SH; j++) begin
        checks++;
        if (dout[j] !== mc_ref(din[j])) begin
          failures++;
          $display("FAIL share %0d: %h -> %h expected %h", j, din[j], dout[j], mc_ref(din[j]));
        end
      end
      checks++;
      if ((dout[0] ^ dout[1] ^ dout[2]) !== mc_ref(din[0] ^ din[1] ^ din[2])) begin
        failures++; $display("FAIL unshared value");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
