// ti_mixcolumns: threshold implementation of MixColumns with the almost-MDS matrix
//     [0 1 1 1; 1 0 1 1; 1 1 0 1; 1 1 1 0]
// (the matrix of the Midori block cipher) on a 64-bit state of sixteen 4-bit cells.
//
// The layer is linear, so its threshold implementation applies it to every share on
// its own; no share ever meets another.  Each column of four cells (c0..c3) is mixed
// with seven XORs per bit instead of eight: the sum t = c0^c1^c2^c3 is formed once
// (three XORs) and row i outputs t ^ ci (one XOR each), which equals the XOR of the
// three other cells.  This reuse of the column sum is the published optimisation.
// The cell layout is this design's choice, taken from Midori: cell i occupies bits
// [63-4i -: 4] and column c consists of cells 4c..4c+3.
//
// Interface: din[j], dout[j] = share j+1 of the state.  Purely combinational.
module ti_mixcolumns #(
  parameter int unsigned SHARES = 3
) (
  input  logic [SHARES-1:0][63:0] din,
  output logic [SHARES-1:0][63:0] dout
);
  always_comb begin
    for (int j = 0; j < int'(SHARES); j++) begin
      for (int c = 0; c < 4; c++) begin
        logic [3:0] t;
        t = '0;
        for (int r = 0; r < 4; r++) t ^= din[j][63 - 4 * (4 * c + r) -: 4];
        for (int r = 0; r < 4; r++)
          dout[j][63 - 4 * (4 * c + r) -: 4] = t ^ din[j][63 - 4 * (4 * c + r) -: 4];
      end
    end
  end
endmodule
