// ti_sbox_direct: iterative, direct-shared (four-share) threshold implementation of
// a CA-based 4x4 S-box.
//
// The S-box S(X,Y,Z,W) = (f(X,Y,Z,W), f(Y,Z,W,X), f(Z,W,X,Y), f(W,X,Y,Z)) is
// computed with a single shared instance of the 4-input CA rule f.  Each input share
// sits in its own cyclic shift register (CSR); the CSRs rotate once per clock, so
// the rule core sees the four rotations on four successive cycles.  A 2-bit state
// counter selects, through one De-MUX per share, which output bit (A, B, C, D) the
// core output is written to.  The counter is independent of the data and therefore
// not shared.  This is the published architecture.  The rule core is the published
// sharing for classes (1,2,2) and (1,3,1) and a generic direct sharing for the other
// ten classes.
//
// Interface: pulse `load` with the four input shares on `din` (din[j] = {X,Y,Z,W}
// of share j+1).  Timing: the output bits are written on the 1st..4th clock edge
// after the load edge; `done` is high for one cycle right after the 4th, when all of
// `dout` (dout[j] = {A,B,C,D} of share j+1) is valid.  `dout` holds until the next
// evaluation overwrites it bit by bit.  A new `load` may be given in the cycle
// `done` is high; the load strobe, `done` and the reset are this design's choices.
module ti_sbox_direct
  import ca_sbox_pkg::*;
#(
  parameter ca_class_e CLASS = CLS_131
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [3:0][3:0] din,
  output logic [3:0][3:0] dout,
  output logic            done
);
  logic [3:0][3:0] csr_q;
  logic [1:0]      state;
  logic [3:0]      f;
  logic            active;

  for (genvar j = 0; j < 4; j++) begin : g_csr
    ti_csr u_csr (.clk, .rst_n, .load, .din(din[j]), .q(csr_q[j]));
  end

  ti_state_counter u_state (.clk, .rst_n, .clear(load), .state);

  if (CLASS == CLS_122) begin : g_core
    ti_ca122_direct_core u_core (.in(csr_q), .f);
  end else if (CLASS == CLS_131) begin : g_core
    ti_ca131_direct_core u_core (.in(csr_q), .f);
  end else begin : g_core
    ti_ca_direct_generic_core #(.ANF(class_anf(CLASS))) u_core (.in(csr_q), .f);
  end

  for (genvar j = 0; j < 4; j++) begin : g_demux
    ti_demux u_demux (.clk, .rst_n, .en(active), .sel(state), .din(f[j]), .q(dout[j]));
  end

  // `active` marks the four cycles in which the core output is a valid S-box bit.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= active && (state == 2'd3) && !load;
      if (load)                 active <= 1'b1;
      else if (state == 2'd3)   active <= 1'b0;
    end
  end
endmodule
