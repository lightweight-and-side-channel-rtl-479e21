// ti_ca122_stage1: first stage of the composite threshold implementation of the
// class (1,2,2) CA rule  f = XZW ^ XY ^ YW ^ Y ^ Z.
//
// The rule is decomposed into three degree-2 functions
//   b1 = X ^ Y ^ XW ^ YW,   b2 = Z ^ XY ^ XZ,   b3 = X ^ W ^ XZ ^ ZW,
// with f = b1 ^ b2 ^ b1*b3 ^ b2*b3.  This stage computes three-share sharings of
// b1, b2 and b3 (the published share functions); output share k reads only input
// shares k and k+1 (mod 3).
//
// Interface: in[j] = {Xj,Yj,Zj,Wj}; b1[k], b2[k], b3[k] = share k+1.  Combinational.
module ti_ca122_stage1 (
  input  logic [2:0][3:0] in,
  output logic [2:0]      b1,
  output logic [2:0]      b2,
  output logic [2:0]      b3
);
  logic x1, x2, x3, y1, y2, y3, z1, z2, z3, w1, w2, w3;
  assign {x1, y1, z1, w1} = in[0];
  assign {x2, y2, z2, w2} = in[1];
  assign {x3, y3, z3, w3} = in[2];

  assign b1[0] = x1 ^ y2 ^ (y1 & w1) ^ (y1 & w2) ^ (y2 & w1) ^ (x1 & w1) ^ (x1 & w2) ^ (x2 & w1);
  assign b1[1] = x2 ^ y3 ^ (y2 & w2) ^ (y2 & w3) ^ (y3 & w2) ^ (x2 & w2) ^ (x2 & w3) ^ (x3 & w2);
  assign b1[2] = x3 ^ y1 ^ (y3 & w3) ^ (y3 & w1) ^ (y1 & w3) ^ (x3 & w3) ^ (x3 & w1) ^ (x1 & w3);

  assign b2[0] = z1 ^ (z1 & x2) ^ (z2 & x1) ^ (y1 & x2) ^ (y2 & x1) ^ (z1 & x1) ^ (y1 & x1);
  assign b2[1] = z2 ^ (z2 & x3) ^ (z3 & x2) ^ (y2 & x3) ^ (y3 & x2) ^ (z2 & x2) ^ (y2 & x2);
  assign b2[2] = z3 ^ (z1 & x3) ^ (z3 & x1) ^ (y1 & x3) ^ (y3 & x1) ^ (y3 & x3) ^ (z3 & x3);

  assign b3[0] = x1 ^ w2 ^ (z1 & w1) ^ (z1 & w2) ^ (z2 & w1) ^ (x1 & z1) ^ (x1 & z2) ^ (x2 & z1);
  assign b3[1] = x2 ^ w3 ^ (z2 & w2) ^ (z2 & w3) ^ (z3 & w2) ^ (x2 & z2) ^ (x2 & z3) ^ (x3 & z2);
  assign b3[2] = x3 ^ w1 ^ (z3 & w3) ^ (z3 & w1) ^ (z1 & w3) ^ (x3 & z3) ^ (x3 & z1) ^ (x1 & z3);
endmodule
