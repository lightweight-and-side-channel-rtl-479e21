// ti_csr: cyclic shift register (CSR) holding one share of an S-box input.
//
// The register holds one share {X,Y,Z,W} of the 4-bit S-box input.  On `load` it
// takes `din`; on every other clock it rotates left by one position, so that the
// CA-rule core sees (X,Y,Z,W), (Y,Z,W,X), (Z,W,X,Y), (W,X,Y,Z) on four successive
// cycles and produces the output bits A, B, C, D in that order.  One CSR per share,
// clocked continuously, follows the published architecture; the synchronous load
// port and the active-low asynchronous reset are this design's choice.
//
// Timing: `q` changes one clock after `load`/each rotation; no combinational path
// from `din` to `q`.
module ti_csr (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [3:0] din,   // {X,Y,Z,W} of this share
  output logic [3:0] q      // current rotation, q[3] is the rule's first argument
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= din;
    else            q <= {q[2:0], q[3]};
  end
endmodule
