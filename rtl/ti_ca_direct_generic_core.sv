// ti_ca_direct_generic_core: direct-shared 4-share threshold implementation of any
// 4-input CA rule of algebraic degree <= 3, given as an ANF mask.
//
// Every monomial of the rule is expanded over the shares: a monomial with variables
// V becomes the XOR of all products v1[s1] & v2[s2] & ... over every choice of one
// share index per variable.  A product of at most three variables touches at most
// three of the four shares, so at least one share index is absent; the product is
// added to the output share with the lowest absent index.  Output share j therefore
// never reads input share j (first-order non-completeness) and the output shares
// XOR to f (correctness).  This is the plain direct sharing; unlike hand-optimised
// sharings it is not guaranteed to be uniform.  The published work reports direct
// sharings of all twelve representative rules but prints only two of them, so this
// construction is this design's own.
//
// Interface: `in[j]` = {X,Y,Z,W} of share j+1, `f[j]` = output share j+1.
// Purely combinational.  An ANF with a degree-4 monomial (bit 15) is rejected.
module ti_ca_direct_generic_core #(
  parameter logic [15:0] ANF = 16'h14b6  // class (1,3,3): YZW^XY^XZ^YW^Y^Z^W
) (
  input  logic [3:0][3:0] in,
  output logic [3:0]      f
);
  initial assert (!ANF[15]) else $error("degree-4 rules cannot be shared with 4 shares");

  always_comb begin
    f = '0;
    for (int m = 1; m < 15; m++) begin
      if (ANF[m]) begin
        // one share index per variable of the monomial; absent variables stay at 0
        for (int sx = 0; sx < (m[3] ? 4 : 1); sx++)
          for (int sy = 0; sy < (m[2] ? 4 : 1); sy++)
            for (int sz = 0; sz < (m[1] ? 4 : 1); sz++)
              for (int sw = 0; sw < (m[0] ? 4 : 1); sw++) begin
                logic       prod;
                logic [3:0] used;
                prod = 1'b1;
                used = '0;
                if (m[3]) begin prod &= in[sx][3]; used[sx] = 1'b1; end
                if (m[2]) begin prod &= in[sy][2]; used[sy] = 1'b1; end
                if (m[1]) begin prod &= in[sz][1]; used[sz] = 1'b1; end
                if (m[0]) begin prod &= in[sw][0]; used[sw] = 1'b1; end
                if      (!used[0]) f[0] ^= prod;
                else if (!used[1]) f[1] ^= prod;
                else if (!used[2]) f[2] ^= prod;
                else if (!used[3]) f[3] ^= prod;
              end
      end
    end
    if (ANF[0]) f[0] ^= 1'b1;
  end
endmodule
