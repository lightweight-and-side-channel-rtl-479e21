// ti_ca131_stage2: second stage of the composite threshold implementation of the
// class (1,3,1) CA rule, computing  f = b3 = b2 ^ b1*Z ^ X  from registered shares.
//
// Inputs are the registered three-share b1, b2 from ti_ca131_stage1 and the
// registered input shares (for X and Z).  Output share 1 reads shares 1 and 2,
// share 2 reads shares 2 and 3, share 3 reads shares 1 and 3.  b31 and b32 are the
// published share functions; in b33 the product of Z1 and b11 completes the nine
// cross products Zi*b1j (the printed equations multiply b1 by Z, which is what makes
// the decomposition equal to f).
//
// Interface: in[j] = {Xj,Yj,Zj,Wj}; f[k] = output share k+1.  Combinational.
module ti_ca131_stage2 (
  input  logic [2:0][3:0] in,
  input  logic [2:0]      b1,
  input  logic [2:0]      b2,
  output logic [2:0]      f
);
  logic x1, x2, x3, z1, z2, z3;
  assign x1 = in[0][3];  assign z1 = in[0][1];
  assign x2 = in[1][3];  assign z2 = in[1][1];
  assign x3 = in[2][3];  assign z3 = in[2][1];

  assign f[0] = (z1 & b1[1]) ^ (b1[0] & z2) ^ b2[0] ^ x1;
  assign f[1] = ((z2 ^ z3) & (b1[1] ^ b1[2])) ^ b2[1] ^ x2;
  assign f[2] = (z1 & b1[2]) ^ (b1[0] & z3) ^ (z1 & b1[0]) ^ b2[2] ^ x3;
endmodule
