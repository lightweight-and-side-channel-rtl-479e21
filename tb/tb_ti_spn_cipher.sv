// tb_ti_spn_cipher: end-to-end self-checking test of the threshold-implemented SPN
// cipher.  Four cipher instances run side by side:
//   0  all parameters at their defaults (composite (1,3,1) S-box, ShuffleCell +
//      almost-MDS MixColumns, 16 rounds)
//   1  composite (1,2,2) S-box, GIFT-64 bit permutation only, 40 rounds
//   2  direct four-share (1,3,1) S-box, ShuffleCell + MixColumns, 16 rounds
//   3  direct four-share (3,5,3) S-box (generic sharing), GIFT-64 only, 40 rounds
// Each instance encrypts random plaintexts under random per-round keys, with fresh
// random sharings of plaintext and keys.  The XOR of the ciphertext shares is
// compared with an unshared reference model built from S-box truth tables and
// independently written diffusion layers; the start-to-done time must be
// ROUNDS * (S-box latency + 1) cycles.  A `start` pulse during a running block must
// be ignored.  Every mechanism (composite and direct S-box, both permutations,
// MixColumns, ignored start, back-to-back blocks) is counted and must occur.
module tb_ti_spn_cipher;
  import ca_sbox_pkg::*;
  import tb_sbox_tables_pkg::*;

  localparam int NCFG = 4;
  localparam sbox_arch_e  CFG_ARCH [NCFG] = '{ARCH_COMPOSITE, ARCH_COMPOSITE, ARCH_DIRECT, ARCH_DIRECT};
  localparam ca_class_e   CFG_CLS  [NCFG] = '{CLS_131, CLS_122, CLS_131, CLS_353};
  localparam paradigm_e   CFG_PAR  [NCFG] = '{PARADIGM_THROUGHPUT, PARADIGM_AREA, PARADIGM_THROUGHPUT, PARADIGM_AREA};
  localparam int          CFG_ROUNDS [NCFG] = '{16, 40, 16, 40};
  localparam int          BLOCKS = 24;

  localparam int SC [16] = '{0, 10, 5, 15, 14, 4, 11, 1, 9, 3, 12, 6, 7, 13, 2, 8};
  localparam int GIFT16 [16] = '{0, 17, 34, 51, 48, 1, 18, 35, 32, 49, 2, 19, 16, 33, 50, 3};

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic [NCFG-1:0] finished = '0;
  int cnt_composite = 0, cnt_direct = 0, cnt_mixcol = 0, cnt_shuffle = 0, cnt_gift = 0;
  int cnt_ignored_start = 0, cnt_back_to_back = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- unshared reference model ----------------
  function automatic logic [63:0] ref_round(int tab, bit mixcol, logic [63:0] s, logic [63:0] k);
    logic [63:0] a, b, c;
    for (int i = 0; i < 16; i++) a[63 - 4 * i -: 4] = sbox(tab, s[63 - 4 * i -: 4]);
    b = '0;
    if (mixcol) begin
      for (int i = 0; i < 16; i++) b[63 - 4 * i -: 4] = a[63 - 4 * SC[i] -: 4];
      for (int col = 0; col < 4; col++)
        for (int row = 0; row < 4; row++) begin
          logic [3:0] acc;
          acc = '0;
          for (int q = 0; q < 4; q++)
            if (q != row) acc ^= b[63 - 4 * (4 * col + q) -: 4];
          c[63 - 4 * (4 * col + row) -: 4] = acc;
        end
    end else begin
      for (int i = 0; i < 64; i++) b[GIFT16[i % 16] + 4 * (i / 16)] = a[i];
      c = b;
    end
    return c ^ k;
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int SH  = arch_shares(CFG_ARCH[g]);
    localparam int LAT = arch_latency(CFG_ARCH[g]) + 1;
    localparam int R   = CFG_ROUNDS[g];
    localparam bit MC  = (CFG_PAR[g] == PARADIGM_THROUGHPUT);

    logic start;
    logic [SH-1:0][63:0] pt, rk, ct;
    logic [7:0] round_idx;
    logic busy, done;
    logic [SH-1:0][63:0] rk_sh [R];
    logic [63:0] key [R];

    if (g == 0) begin : g_dut
      ti_spn_cipher u_dut (.clk, .rst_n, .start, .pt, .rk, .round_idx, .ct, .busy, .done);
    end else begin : g_dut
      ti_spn_cipher #(.ARCH(CFG_ARCH[g]), .CLASS(CFG_CLS[g]), .PARADIGM(CFG_PAR[g]), .ROUNDS(R))
        u_dut (.clk, .rst_n, .start, .pt, .rk, .round_idx, .ct, .busy, .done);
    end

    assign rk = (int'(round_idx) < R) ? rk_sh[$clog2(R)'(round_idx)] : '0;

    function automatic logic [SH-1:0][63:0] share(logic [63:0] v);
      logic [SH-1:0][63:0] s;
      s[SH-1] = v;
      for (int j = 0; j < SH - 1; j++) begin
        s[j] = {$urandom, $urandom};
        s[SH-1] ^= s[j];
      end
      return s;
    endfunction

    function automatic logic [63:0] unshare(logic [SH-1:0][63:0] s);
      logic [63:0] v;
      v = '0;
      for (int j = 0; j < SH; j++) v ^= s[j];
      return v;
    endfunction

    initial begin
      start = 0;
      pt = '0;
      for (int r = 0; r < R; r++) begin key[r] = '0; rk_sh[r] = '0; end
      @(posedge rst_n);
      for (int n = 0; n < BLOCKS; n++) begin
        logic [63:0] p, expct;
        int cycles;
        p = {$urandom, $urandom};
        for (int r = 0; r < R; r++) begin
          key[r] = {$urandom, $urandom};
          rk_sh[r] = share(key[r]);
        end
        expct = p;
        for (int r = 0; r < R; r++) expct = ref_round(int'(CFG_CLS[g]), MC, expct, key[r]);
        @(negedge clk);
        pt = share(p);
        start = 1;
        @(posedge clk);
        @(negedge clk);
        start = 0;
        pt = share({$urandom, $urandom});   // must not be picked up
        cycles = 0;
        while (!done && cycles < 10 * R * LAT) begin
          if (n % 3 == 1 && cycles == LAT + 2) begin
            checks++;
            if (!busy) begin failures++; $display("FAIL cfg %0d: not busy while running", g); end
            start = 1;                       // ignored while busy
            cnt_ignored_start++;
          end else begin
            start = 0;
          end
          @(posedge clk); cycles++;
          @(negedge clk);
        end
        start = 0;
        checks++;
        if (cycles != R * LAT) begin
          failures++;
          $display("FAIL cfg %0d block %0d: %0d cycles, expected %0d", g, n, cycles, R * LAT);
        end
        checks++;
        if (unshare(ct) !== expct) begin
          failures++;
          $display("FAIL cfg %0d block %0d: ct %h expected %h", g, n, unshare(ct), expct);
        end
        if (CFG_ARCH[g] == ARCH_COMPOSITE) cnt_composite += 16 * R; else cnt_direct += 16 * R;
        if (MC) begin cnt_mixcol += R; cnt_shuffle += R; end else cnt_gift += R;
        if (n % 4 == 3) cnt_back_to_back++;  // next block starts right after done
        else repeat ($urandom % 5) @(posedge clk);
      end
      finished[g] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (finished == '1);
    $display("COUNT composite_sbox_evals=%0d direct_sbox_evals=%0d mixcolumns=%0d shufflecell=%0d gift_perm=%0d ignored_start=%0d back_to_back=%0d",
             cnt_composite, cnt_direct, cnt_mixcol, cnt_shuffle, cnt_gift, cnt_ignored_start, cnt_back_to_back);
    checks += 7;
    if (cnt_composite == 0)     begin failures++; $display("FAIL never: composite S-box"); end
    if (cnt_direct == 0)        begin failures++; $display("FAIL never: direct S-box"); end
    if (cnt_mixcol == 0)        begin failures++; $display("FAIL never: MixColumns"); end
    if (cnt_shuffle == 0)       begin failures++; $display("FAIL never: ShuffleCell"); end
    if (cnt_gift == 0)          begin failures++; $display("FAIL never: GIFT permutation"); end
    if (cnt_ignored_start == 0) begin failures++; $display("FAIL never: start while busy"); end
    if (cnt_back_to_back == 0)  begin failures++; $display("FAIL never: back-to-back blocks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
