// ti_ca131_stage1: first stage of the composite threshold implementation of the
// class (1,3,1) CA rule  f = YZW ^ XZ ^ YZ ^ YW ^ X.
//
// The rule is decomposed into degree-2 pieces  b1 = X ^ YW,  b2 = YZ ^ YW  and
// f = b2 ^ b1*Z ^ X.  This stage computes three-share sharings of b1 and b2 from the
// three-share input; output share k reads only input shares k and k+1 (mod 3), so
// each share function misses one input share.  The b2 sharing and b11 are the
// published ones; b12 and b13 are reconstructed as the standard completion that
// places the cross products Y2W3, Y3W2 in b12 and Y3W1, Y1W3 in b13 with the
// diagonal terms Y2W2 in b12 and Y3W3, Y1W1 in b13.  The b2 shares carry the
// correction terms ZjWj, which cancel in the sum.
//
// Interface: in[j] = {Xj,Yj,Zj,Wj}; b1[k], b2[k] = share k+1.  Combinational; the
// S-box registers these outputs before the second stage.
module ti_ca131_stage1 (
  input  logic [2:0][3:0] in,
  output logic [2:0]      b1,
  output logic [2:0]      b2
);
  logic x1, x2, x3, y1, y2, y3, z1, z2, z3, w1, w2, w3;
  assign {x1, y1, z1, w1} = in[0];
  assign {x2, y2, z2, w2} = in[1];
  assign {x3, y3, z3, w3} = in[2];

  assign b1[0] = x1 ^ (y1 & w2) ^ (w1 & y2);
  assign b1[1] = x2 ^ (y2 & w2) ^ (y2 & w3) ^ (y3 & w2);
  assign b1[2] = x3 ^ (y3 & w3) ^ (y3 & w1) ^ (y1 & w3) ^ (y1 & w1);

  assign b2[0] = (z1 & y2) ^ (z2 & y1) ^ (w1 & y2) ^ (w2 & y1)
               ^ (z1 & y1) ^ (w1 & y1) ^ (z1 & w1) ^ (z2 & w2);
  assign b2[1] = (z2 & y3) ^ (z3 & y2) ^ (w2 & y3) ^ (w3 & y2)
               ^ (z2 & y2) ^ (w2 & y2) ^ (z2 & w2) ^ (z3 & w3);
  assign b2[2] = (z1 & y3) ^ (z3 & y1) ^ (w1 & y3) ^ (w3 & y1)
               ^ (w3 & y3) ^ (z3 & y3) ^ (z3 & w3) ^ (z1 & w1);
endmodule
