// ti_ca122_direct_core: direct-shared threshold implementation of the class (1,2,2)
// CA rule  f = XZW ^ XY ^ YW ^ Y ^ Z  with four input and four output shares.
//
// Share j of the input is in[j] = {Xj,Yj,Zj,Wj} (j = 0..3 for shares 1..4); the
// output share j is f[j], and f[0]^f[1]^f[2]^f[3] = f(X,Y,Z,W) with X = ^Xj etc.
// The share functions are the published ones.  Each one omits one input share
// (f1 omits share 4, f2 share 1, f3 share 2, f4 share 3), which is the
// non-completeness that keeps glitches from combining all shares.
// Purely combinational.
module ti_ca122_direct_core (
  input  logic [3:0][3:0] in,  // in[j] = {X,Y,Z,W} of share j+1
  output logic [3:0]      f    // f[j] = output share j+1
);
  logic x1, x2, x3, x4, y1, y2, y3, y4, z1, z2, z3, z4, w1, w2, w3, w4;
  logic xa, ya, za, wa, xb, yb, zb, wb;

  assign {x1, y1, z1, w1} = in[0];
  assign {x2, y2, z2, w2} = in[1];
  assign {x3, y3, z3, w3} = in[2];
  assign {x4, y4, z4, w4} = in[3];

  // compressed shares 2^3^4 (used by f2) and 3^4 (used by f3)
  assign xa = x2 ^ x3 ^ x4;  assign ya = y2 ^ y3 ^ y4;
  assign za = z2 ^ z3 ^ z4;  assign wa = w2 ^ w3 ^ w4;
  assign xb = x3 ^ x4;       assign yb = y3 ^ y4;
  assign zb = z3 ^ z4;       assign wb = w3 ^ w4;

  assign f[0] = (x1 & z2 & w3) ^ (x1 & z3 & w2) ^ (x2 & z1 & w3) ^ (x2 & z3 & w1)
              ^ (x3 & z1 & w2) ^ (x3 & z2 & w1) ^ y1 ^ z1;

  assign f[1] = (xa & za & wa) ^ (xa & ya) ^ (ya & wa) ^ y2 ^ z2;

  assign f[2] = (x1 & zb & wb) ^ (z1 & xb & wb) ^ (w1 & xb & zb)
              ^ (x1 & z1 & wb) ^ (x1 & w1 & zb) ^ (z1 & w1 & xb) ^ (x1 & z1 & w1)
              ^ (x1 & yb) ^ (y1 & xb) ^ (x1 & y1)
              ^ (y1 & wb) ^ (w1 & yb) ^ (y1 & w1) ^ y3 ^ z3;

  assign f[3] = (x1 & z1 & w2) ^ (x1 & z2 & w1) ^ (x2 & z1 & w1)
              ^ (x1 & z2 & w2) ^ (x2 & z1 & w2) ^ (x2 & z2 & w1)
              ^ (x1 & z2 & w4) ^ (x2 & z1 & w4) ^ (x1 & z4 & w2)
              ^ (x2 & z4 & w1) ^ (x4 & z1 & w2) ^ (x4 & z2 & w1)
              ^ (x1 & y2) ^ (y1 & x2) ^ (y1 & w2) ^ (w1 & y2) ^ y4 ^ z4;
endmodule
