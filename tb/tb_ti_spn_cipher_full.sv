// tb_ti_spn_cipher_full: the cipher with every parameter at its default (composite
// (1,3,1) S-boxes, three shares, ShuffleCell + almost-MDS MixColumns, 16 rounds)
// encrypting random plaintexts under random shared round keys.  The XOR of the
// ciphertext shares is compared with an unshared reference model built from the
// S-box truth table, and each block must take exactly 16 x 6 = 96 cycles.
module tb_ti_spn_cipher_full;
  import tb_sbox_tables_pkg::*;
  localparam int SH = 3, R = 16, CYCLES = 96, BLOCKS = 8;
  localparam int SC [16] = '{0, 10, 5, 15, 14, 4, 11, 1, 9, 3, 12, 6, 7, 13, 2, 8};

  logic clk = 0, rst_n = 0, start = 0;
  logic [SH-1:0][63:0] pt, rk, ct;
  logic [7:0] round_idx;
  logic busy, done;
  logic [SH-1:0][63:0] rk_sh [R];
  int checks = 0, failures = 0;

  ti_spn_cipher dut (.clk, .rst_n, .start, .pt, .rk, .round_idx, .ct, .busy, .done);

  assign rk = (round_idx < 8'(R)) ? rk_sh[4'(round_idx)] : '0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] ref_round(logic [63:0] s, logic [63:0] k);
    logic [63:0] a, b, c;
    for (int i = 0; i < 16; i++) a[63 - 4 * i -: 4] = sbox(1, s[63 - 4 * i -: 4]);
    for (int i = 0; i < 16; i++) b[63 - 4 * i -: 4] = a[63 - 4 * SC[i] -: 4];
    for (int col = 0; col < 4; col++)
      for (int row = 0; row < 4; row++) begin
        logic [3:0] acc;
        acc = '0;
        for (int q = 0; q < 4; q++) if (q != row) acc ^= b[63 - 4 * (4 * col + q) -: 4];
        c[63 - 4 * (4 * col + row) -: 4] = acc;
      end
    return c ^ k;
  endfunction

  function automatic logic [SH-1:0][63:0] share(logic [63:0] v);
    logic [SH-1:0][63:0] s;
    s[0] = {$urandom, $urandom};
    s[1] = {$urandom, $urandom};
    s[2] = v ^ s[0] ^ s[1];
    return s;
  endfunction

  initial begin
    pt = '0;
    for (int r = 0; r < R; r++) rk_sh[r] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < BLOCKS; n++) begin
      logic [63:0] p, expct, key;
      int cycles;
      p = (n == 0) ? 64'h0 : {$urandom, $urandom};
      expct = p;
      for (int r = 0; r < R; r++) begin
        key = (n == 0) ? 64'h0 : {$urandom, $urandom};
        rk_sh[r] = share(key);
        expct = ref_round(expct, key);
      end
      @(negedge clk);
      pt = share(p);
      start = 1;
      @(posedge clk);
      @(negedge clk);
      start = 0;
      cycles = 0;
      while (!done && cycles < 1000) begin
        @(posedge clk); cycles++;
        @(negedge clk);
      end
      checks += 2;
      if (cycles != CYCLES) begin
        failures++; $display("FAIL block %0d: %0d cycles, expected %0d", n, cycles, CYCLES);
      end
      if ((ct[0] ^ ct[1] ^ ct[2]) !== expct) begin
        failures++; $display("FAIL block %0d: ct %h expected %h", n, ct[0] ^ ct[1] ^ ct[2], expct);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
