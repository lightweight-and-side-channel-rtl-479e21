// ti_ca122_stage2: second stage of the composite threshold implementation of the
// class (1,2,2) CA rule, computing  f = b1 ^ b2 ^ b1*b3 ^ b2*b3 = c*(1 ^ b3)
// with c = b1 ^ b2, from the registered three-share b1, b2, b3.
//
// The combining function is published, its sharing is not; this design shares the
// single product c*b3 the same way as the published degree-2 sharings:
//   f1 = c1 ^ c1*e1 ^ c1*e2 ^ c2*e1      (reads shares 1, 2)
//   f2 = c2 ^ c2*e2 ^ c2*e3 ^ c3*e2      (reads shares 2, 3)
//   f3 = c3 ^ c3*e3 ^ c3*e1 ^ c1*e3      (reads shares 3, 1)
// where cj = b1j ^ b2j and ej = b3j.  All nine products cj*ek appear once, so the
// shares XOR to c*b3 ^ c.
// Like any three-share sharing of a single AND without extra shares or fresh masks,
// this sharing is correct and non-complete but not uniform.
//
// Interface: b1[k], b2[k], b3[k], f[k] = share k+1.  Combinational.
module ti_ca122_stage2 (
  input  logic [2:0] b1,
  input  logic [2:0] b2,
  input  logic [2:0] b3,
  output logic [2:0] f
);
  logic [2:0] c, e;
  assign c = b1 ^ b2;
  assign e = b3;

  assign f[0] = c[0] ^ (c[0] & e[0]) ^ (c[0] & e[1]) ^ (c[1] & e[0]);
  assign f[1] = c[1] ^ (c[1] & e[1]) ^ (c[1] & e[2]) ^ (c[2] & e[1]);
  assign f[2] = c[2] ^ (c[2] & e[2]) ^ (c[2] & e[0]) ^ (c[0] & e[2]);
endmodule
