// tb_sbox_tables_pkg: truth tables of the twelve representative CA-based S-boxes,
// used by the testbenches as a reference independent of the RTL.  Entry x of a
// table is the hex digit x counted from the left (x = 0 first); bit 3 of an entry
// is output A = f(X,Y,Z,W), so bit 3 of entry x is the local rule itself.
// The tables were obtained by evaluating S(X,Y,Z,W) = (f(X,Y,Z,W), f(Y,Z,W,X),
// f(Z,W,X,Y), f(W,X,Y,Z)) for each rule, with X the most significant input bit.
package tb_sbox_tables_pkg;
  // order: (1,2,2) (1,3,1) (1,3,3) (1,4,2) (1,5,1) (1,5,3)
  //        (3,2,2) (3,3,1) (3,3,3) (3,4,2) (3,5,1) (3,5,3)
  localparam logic [63:0] SBOX_TABLE [12] = '{
    64'h06c8951e34a72bdf, 64'h01274aec8b56d39f, 64'h0ed1ba29785c463f,
    64'h09316a2dc85e47bf, 64'h04871aec2b56d39f, 64'h0ed4ba8c7256139f,
    64'h0361ca2d985e47bf, 64'h048d1abc2e56739f, 64'h0db47583e2a91c6f,
    64'h0c923a4d615e87bf, 64'h024b85791dace63f, 64'h0b72ea49d15c863f
  };

  function automatic logic [3:0] sbox(int cls, logic [3:0] x);
    return SBOX_TABLE[cls][63 - 4 * x -: 4];
  endfunction

  function automatic logic rule(int cls, logic [3:0] x);
    return SBOX_TABLE[cls][63 - 4 * x];
  endfunction
endpackage
