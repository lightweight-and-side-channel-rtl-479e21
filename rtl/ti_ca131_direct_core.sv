// ti_ca131_direct_core: direct-shared threshold implementation of the class (1,3,1)
// CA rule  f = YZW ^ XZ ^ YZ ^ YW ^ X  with four input and four output shares.
//
// Share j of the input is in[j] = {Xj,Yj,Zj,Wj} (j = 0..3 for shares 1..4); the
// output share j is f[j], and f[0]^f[1]^f[2]^f[3] = f(X,Y,Z,W).  The share functions
// are the published ones; f1 omits input share 4, f2 share 1, f3 share 2 and f4
// share 3 (first-order non-completeness).  Purely combinational.
module ti_ca131_direct_core (
  input  logic [3:0][3:0] in,  // in[j] = {X,Y,Z,W} of share j+1
  output logic [3:0]      f    // f[j] = output share j+1
);
  logic x1, x2, x3, x4, y1, y2, y3, y4, z1, z2, z3, z4, w1, w2, w3, w4;
  logic xa, ya, za, wa, xb, yb, zb, wb;

  assign {x1, y1, z1, w1} = in[0];
  assign {x2, y2, z2, w2} = in[1];
  assign {x3, y3, z3, w3} = in[2];
  assign {x4, y4, z4, w4} = in[3];

  assign xa = x2 ^ x3 ^ x4;  assign ya = y2 ^ y3 ^ y4;
  assign za = z2 ^ z3 ^ z4;  assign wa = w2 ^ w3 ^ w4;
  assign xb = x3 ^ x4;       assign yb = y3 ^ y4;
  assign zb = z3 ^ z4;       assign wb = w3 ^ w4;

  assign f[0] = (y1 & z2 & w3) ^ (y1 & z3 & w2) ^ (y2 & z1 & w3) ^ (y2 & z3 & w1)
              ^ (y3 & z1 & w2) ^ (y3 & z2 & w1) ^ x1;

  assign f[1] = (ya & za & wa) ^ (xa & za) ^ (ya & za) ^ (ya & wa) ^ x2;

  assign f[2] = (y1 & zb & wb) ^ (z1 & yb & wb) ^ (w1 & yb & zb)
              ^ (y1 & z1 & wb) ^ (y1 & w1 & zb) ^ (z1 & w1 & yb) ^ (y1 & z1 & w1)
              ^ (x1 & zb) ^ (z1 & xb) ^ (x1 & z1)
              ^ (y1 & zb) ^ (z1 & yb) ^ (y1 & z1)
              ^ (y1 & wb) ^ (w1 & yb) ^ (y1 & w1) ^ x3;

  assign f[3] = (y1 & z1 & w2) ^ (y1 & z2 & w1) ^ (y2 & z1 & w1)
              ^ (y1 & z2 & w2) ^ (y2 & z1 & w2) ^ (y2 & z2 & w1)
              ^ (y1 & z2 & w4) ^ (y2 & z1 & w4) ^ (y1 & z4 & w2)
              ^ (y2 & z4 & w1) ^ (y4 & z1 & w2) ^ (y4 & z2 & w1)
              ^ (x1 & z2) ^ (z1 & x2) ^ (y1 & z2) ^ (z1 & y2)
              ^ (y1 & w2) ^ (w1 & y2) ^ x4;
endmodule
