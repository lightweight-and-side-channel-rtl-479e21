// ti_sbox_composite: iterative, composite (three-share, two-stage) threshold
// implementation of a CA-based 4x4 S-box, for the CA rules of class (1,3,1)
// (default) and (1,2,2).
//
// The degree-3 CA rule f is split into degree-2 functions.  Stage 1 computes
// three-share sharings of the intermediate functions b1, b2 (and b3 for (1,2,2));
// a register then holds them together with the input shares and the 2-bit state, so
// that glitches cannot carry information from all shares of a value into stage 2.
// Stage 2 combines the registered values into the three output shares of f.  As in
// the direct-shared S-box, the three input shares sit in cyclic shift registers that
// rotate every clock, a data-independent 2-bit counter tracks which rotation is
// being processed, and one De-MUX per share writes the stage-2 output into output
// bit A, B, C or D.  This follows the published architecture; the load strobe, the
// `done` flag and the reset are this design's choices.
// The four output bits are computed from rotations of the same three input shares,
// so the sharing of the 4-bit output is not uniform, even where a single rule output
// bit is (class (1,3,1)).
//
// Interface: pulse `load` with the input shares on `din` (din[j] = {X,Y,Z,W} of share
// j+1).  Timing: the extra register adds one cycle, so output bits are written on
// the 2nd..5th clock edge after the load edge; `done` is high for one cycle right
// after the 5th, when `dout` (dout[j] = {A,B,C,D} of share j+1) is complete.  A new
// `load` may be given in the cycle `done` is high, which gives one S-box layer per
// six cycles in the cipher.
module ti_sbox_composite
  import ca_sbox_pkg::*;
#(
  parameter ca_class_e CLASS = CLS_131
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [2:0][3:0] din,
  output logic [2:0][3:0] dout,
  output logic            done
);
  logic [2:0][3:0] csr_q;
  logic [1:0]      state;
  logic            active;

  // stage-1 results and the pipeline register between the stages
  logic [2:0]      s1_b1, s1_b2;
  logic [2:0]      r_b1, r_b2;
  logic [2:0][3:0] r_in;
  logic [1:0]      r_state;
  logic            r_valid;
  logic [2:0]      f;

  initial assert (CLASS == CLS_122 || CLASS == CLS_131)
    else $error("composite sharing exists only for classes (1,2,2) and (1,3,1)");

  for (genvar j = 0; j < 3; j++) begin : g_csr
    ti_csr u_csr (.clk, .rst_n, .load, .din(din[j]), .q(csr_q[j]));
  end

  ti_state_counter u_state (.clk, .rst_n, .clear(load), .state);

  if (CLASS == CLS_122) begin : g_rule
    logic [2:0] s1_b3, r_b3;  // (1,2,2) has a third intermediate function
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) r_b3 <= '0;
      else        r_b3 <= s1_b3;
    end
    ti_ca122_stage1 u_s1 (.in(csr_q), .b1(s1_b1), .b2(s1_b2), .b3(s1_b3));
    ti_ca122_stage2 u_s2 (.b1(r_b1), .b2(r_b2), .b3(r_b3), .f);
  end else begin : g_rule
    ti_ca131_stage1 u_s1 (.in(csr_q), .b1(s1_b1), .b2(s1_b2));
    ti_ca131_stage2 u_s2 (.in(r_in), .b1(r_b1), .b2(r_b2), .f);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      r_b1    <= '0;
      r_b2    <= '0;
      r_in    <= '0;
      r_state <= '0;
      r_valid <= 1'b0;
      done    <= 1'b0;
    end else begin
      if (load)                 active <= 1'b1;
      else if (state == 2'd3)   active <= 1'b0;
      r_b1    <= s1_b1;
      r_b2    <= s1_b2;
      r_in    <= csr_q;
      r_state <= state;
      r_valid <= active && !load;
      done    <= r_valid && (r_state == 2'd3) && !load;
    end
  end

  for (genvar j = 0; j < 3; j++) begin : g_demux
    ti_demux u_demux (.clk, .rst_n, .en(r_valid), .sel(r_state), .din(f[j]), .q(dout[j]));
  end
endmodule
