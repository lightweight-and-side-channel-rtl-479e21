// ti_diffusion_layer: linear diffusion layer of the masked SPN cipher, applied to
// each share separately (a linear map needs no further protection).
//
// PARADIGM_THROUGHPUT: Midori's ShuffleCell cell permutation followed by almost-MDS
//   MixColumns (ti_mixcolumns).  ShuffleCell: new cell i = old cell SC[i] with
//   SC = (0,10,5,15,14,4,11,1,9,3,12,6,7,13,2,8), cell i at bits [63-4i -: 4].
// PARADIGM_AREA: the GIFT-64 bit permutation alone, bit i (bit 0 = LSB) moving to
//   P(i) = 4*(i/16) + 16*((3*((i%16)/4) + (i%4)) % 4) + (i%4).
// The two paradigms (bit permutation alone, or bit permutation followed by almost-MDS
// MixColumns) follow the published design, which names the Midori and GIFT layers
// but does not print them; the tables are taken from those ciphers.
//
// Interface: din[j], dout[j] = share j+1 of the 64-bit state.  Purely combinational.
module ti_diffusion_layer
  import ca_sbox_pkg::*;
#(
  parameter int unsigned SHARES   = 3,
  parameter paradigm_e   PARADIGM = PARADIGM_THROUGHPUT
) (
  input  logic [SHARES-1:0][63:0] din,
  output logic [SHARES-1:0][63:0] dout
);
  localparam int SC [16] = '{0, 10, 5, 15, 14, 4, 11, 1, 9, 3, 12, 6, 7, 13, 2, 8};

  logic [SHARES-1:0][63:0] perm;

  always_comb begin
    perm = '0;
    for (int j = 0; j < int'(SHARES); j++) begin
      if (PARADIGM == PARADIGM_THROUGHPUT) begin
        for (int i = 0; i < 16; i++)
          perm[j][63 - 4 * i -: 4] = din[j][63 - 4 * SC[i] -: 4];
      end else begin
        for (int i = 0; i < 64; i++)
          perm[j][4 * (i / 16) + 16 * ((3 * ((i % 16) / 4) + (i % 4)) % 4) + (i % 4)] = din[j][i];
      end
    end
  end

  if (PARADIGM == PARADIGM_THROUGHPUT) begin : g_mc
    ti_mixcolumns #(.SHARES(SHARES)) u_mc (.din(perm), .dout(dout));
  end else begin : g_mc
    assign dout = perm;
  end
endmodule
