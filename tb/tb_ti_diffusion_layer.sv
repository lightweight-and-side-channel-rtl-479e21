// tb_ti_diffusion_layer: self-checking test of both diffusion layers, per share.
// GIFT-64 layer (PARADIGM_AREA): walking-one inputs against the reference position
// table, whose first sixteen entries are listed and whose other entries follow by
// adding 4 per further group of sixteen bits.  Midori layer (PARADIGM_THROUGHPUT):
// random inputs against a reference that moves cells by the ShuffleCell table and
// then replaces every cell by the XOR of the three other cells of its column.
module tb_ti_diffusion_layer;
  import ca_sbox_pkg::*;
  localparam int SH = 2;
  logic [SH-1:0][63:0] din, d_mid, d_gift;
  int checks = 0, failures = 0;
  localparam int SC [16] = '{0, 10, 5, 15, 14, 4, 11, 1, 9, 3, 12, 6, 7, 13, 2, 8};
  localparam int GIFT16 [16] = '{0, 17, 34, 51, 48, 1, 18, 35, 32, 49, 2, 19, 16, 33, 50, 3};

  ti_diffusion_layer #(.SHARES(SH))                           u_mid  (.din, .dout(d_mid));
  ti_diffusion_layer #(.SHARES(SH), .PARADIGM(PARADIGM_AREA)) u_gift (.din, .dout(d_gift));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] midori_ref(logic [63:0] s);
    logic [63:0] p, r;
    for (int i = 0; i < 16; i++) p[63 - 4 * i -: 4] = s[63 - 4 * SC[i] -: 4];
    for (int col = 0; col < 4; col++)
      for (int row = 0; row < 4; row++) begin
        logic [3:0] acc;
        acc = '0;
        for (int q = 0; q < 4; q++)
          if (q != row) acc ^= p[63 - 4 * (4 * col + q) -: 4];
        r[63 - 4 * (4 * col + row) -: 4] = acc;
      end
    return r;
  endfunction

  initial begin
    for (int b = 0; b < 64; b++) begin
      int gpos;
      din = '0;
      din[1][b] = 1'b1;
      #1;
      gpos = GIFT16[b % 16] + 4 * (b / 16);
      checks++;
      if (d_gift[1] !== (64'd1 << gpos) || d_gift[0] !== '0) begin
        failures++; $display("FAIL GIFT bit %0d -> %h expected position %0d", b, d_gift[1], gpos);
      end
      checks++;
      if (d_mid[1] !== midori_ref(din[1]) || d_mid[0] !== '0) begin
        failures++; $display("FAIL Midori layer, walking bit %0d: %h expected %h", b, d_mid[1], midori_ref(din[1]));
      end
    end
    for (int n = 0; n < 500; n++) begin
      for (int j = 0; j < SH; j++) din[j] = {$urandom, $urandom};
      #1;
      for (int j = 0; j < SH; j++) begin
        checks += 2;
        if (d_mid[j] !== midori_ref(din[j])) begin
          failures++; $display("FAIL Midori layer share %0d", j);
        end
        if ($countones(d_gift[j]) != $countones(din[j])) begin
          failures++; $display("FAIL GIFT weight share %0d", j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
