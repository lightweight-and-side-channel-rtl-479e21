// ti_spn_cipher: side-channel protected (threshold-implemented) 64-bit SPN block
// cipher datapath built from iterative CA-based S-boxes.
//
// Every value on the datapath is kept as SHARES Boolean shares whose XOR is the real
// value.  One round is: sixteen 4x4 CA-based TI S-boxes in parallel, then the
// diffusion layer, then XOR with the round key.  Two design paradigms are supported:
//   PARADIGM_THROUGHPUT (default)  Midori ShuffleCell followed by almost-MDS
//                                  MixColumns, 16 rounds;
//   PARADIGM_AREA                  GIFT-64 bit permutation only; this needs at least
//                                  40 rounds for the same resistance, so ROUNDS must
//                                  be raised accordingly.
// The default S-box is the composite (three-share) TI of the class (1,3,1) rule,
// the smallest one; the direct four-share TI of any of the twelve classes can be
// selected with ARCH.  The linear layers and the key XOR act on each share alone.
// The paradigms, the S-box choices and the round counts follow the published design.
// Not published and therefore this design's own: the key schedule is left outside
// (round keys enter already shared on `rk`), there is no key whitening before the
// first round, every round including the last has the full diffusion layer, and the
// cell/bit order (cell i at bits [63-4i -: 4], bit 3 of a cell is the S-box input X).
//
// Interface and timing: pulse `start` for one cycle with the plaintext shares on `pt`
// (sampled at that edge).  `round_idx` gives the round being computed; `rk` must
// hold that round's key shares while `round_idx` shows it.  A round takes
// S-box latency + 1 cycles (6 for the composite S-box, 5 for the direct one): the
// S-boxes are reloaded from the round output in the cycle their `done` is seen.
// `done` pulses one cycle after the ciphertext shares are written to `ct`, i.e.
// ROUNDS * (latency + 1) clock edges after the `start` edge.  `start` is ignored
// while `busy`.  There is no randomness input: as in the published design, no fresh
// masks are added between rounds.  The shared S-box output is not uniform, so a
// product needing a strict first-order guarantee should re-mask the state (for
// example with fresh shares of zero added to `rk`).
module ti_spn_cipher
  import ca_sbox_pkg::*;
#(
  parameter sbox_arch_e  ARCH     = ARCH_COMPOSITE,
  parameter ca_class_e   CLASS    = CLS_131,
  parameter paradigm_e   PARADIGM = PARADIGM_THROUGHPUT,
  parameter int unsigned ROUNDS   = 16,
  localparam int unsigned SHARES  = arch_shares(ARCH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [SHARES-1:0][63:0] pt,
  input  logic [SHARES-1:0][63:0] rk,
  output logic [7:0]              round_idx,
  output logic [SHARES-1:0][63:0] ct,
  output logic                    busy,
  output logic                    done
);
  initial assert (ROUNDS >= 1 && ROUNDS <= 255) else $error("ROUNDS out of range");

  typedef enum logic { ST_IDLE, ST_RUN } fsm_e;
  fsm_e fsm;

  logic                    sb_load;
  logic [SHARES-1:0][63:0] sb_in, sb_out, diff_out, round_out;
  logic [15:0]             sb_done;
  logic                    layer_done, last_round;

  // ---------------- S-box layer: sixteen iterative TI S-boxes ----------------
  for (genvar i = 0; i < 16; i++) begin : g_sbox
    logic [SHARES-1:0][3:0] cell_in, cell_out;
    for (genvar j = 0; j < int'(SHARES); j++) begin : g_sh
      assign cell_in[j] = sb_in[j][63 - 4 * i -: 4];
      assign sb_out[j][63 - 4 * i -: 4] = cell_out[j];
    end
    if (ARCH == ARCH_COMPOSITE) begin : g_arch
      ti_sbox_composite #(.CLASS(CLASS)) u_sbox (
        .clk, .rst_n, .load(sb_load), .din(cell_in), .dout(cell_out), .done(sb_done[i]));
    end else begin : g_arch
      ti_sbox_direct #(.CLASS(CLASS)) u_sbox (
        .clk, .rst_n, .load(sb_load), .din(cell_in), .dout(cell_out), .done(sb_done[i]));
    end
  end

  // ---------------- diffusion layer and round-key XOR ----------------
  ti_diffusion_layer #(.SHARES(SHARES), .PARADIGM(PARADIGM)) u_diff (.din(sb_out), .dout(diff_out));

  assign round_out = diff_out ^ rk;

  // ---------------- round controller ----------------
  // All sixteen S-boxes run in lock step; the layer is done when all report done.
  assign layer_done = &sb_done;
  assign last_round = (round_idx == 8'(ROUNDS - 1));
  assign busy       = (fsm == ST_RUN);
  assign sb_load    = (fsm == ST_IDLE) ? start : (layer_done && !last_round);
  assign sb_in      = (fsm == ST_IDLE) ? pt : round_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm       <= ST_IDLE;
      round_idx <= '0;
      ct        <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (fsm)
        ST_IDLE: if (start) begin
          fsm       <= ST_RUN;
          round_idx <= '0;
        end
        ST_RUN: if (layer_done) begin
          if (last_round) begin
            ct   <= round_out;
            done <= 1'b1;
            fsm  <= ST_IDLE;
          end else begin
            round_idx <= round_idx + 8'd1;
          end
        end
        default: fsm <= ST_IDLE;
      endcase
    end
  end

  // The S-boxes are loaded together, so they must finish together.
  assert property (@(posedge clk) disable iff (!rst_n) (sb_done == '0) || (sb_done == '1))
    else $error("S-box instances out of step");
endmodule
