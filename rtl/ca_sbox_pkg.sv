// ca_sbox_pkg: shared types, constants and reference functions for the
// cellular-automata (CA) based 4x4 S-boxes and their threshold implementations.
//
// A CA-based S-box applies one 4-input Boolean "local rule" f to the four cyclic
// rotations of its input:  S(X,Y,Z,W) = (f(X,Y,Z,W), f(Y,Z,W,X), f(Z,W,X,Y), f(W,X,Y,Z)).
// The twelve representative rules (one per ANF class (a,b,c) = a cubic, b quadratic,
// c linear terms) are stored here as 16-bit algebraic-normal-form masks: bit m of the
// mask is the coefficient of the monomial whose variables are the set bits of m,
// with X = 8, Y = 4, Z = 2, W = 1 (so bit 13 = 4'b1101 = XYW).  The rule list is the
// published one; the mask encoding, the nibble bit order and all type names are this
// design's own.
//
// Nibble convention used throughout: bit 3 = X (input) / A (output), bit 0 = W / D.
package ca_sbox_pkg;

  typedef logic [3:0] nibble_t;

  // The twelve S-box classes, named after (cubic, quadratic, linear) term counts.
  typedef enum logic [3:0] {
    CLS_122, CLS_131, CLS_133, CLS_142, CLS_151, CLS_153,
    CLS_322, CLS_331, CLS_333, CLS_342, CLS_351, CLS_353
  } ca_class_e;

  // How the S-box is protected.
  typedef enum logic {
    ARCH_COMPOSITE,   // 3 shares, two degree-2 stages separated by a register
    ARCH_DIRECT       // 4 shares, one degree-3 stage
  } sbox_arch_e;

  // Which diffusion layer follows the S-box layer in the cipher.
  typedef enum logic {
    PARADIGM_AREA,        // GIFT-style: bit permutation only (>= 40 rounds)
    PARADIGM_THROUGHPUT   // Midori-style: ShuffleCell then almost-MDS MixColumns (16 rounds)
  } paradigm_e;

  // Number of shares each architecture uses.
  function automatic int unsigned arch_shares(sbox_arch_e arch);
    return (arch == ARCH_DIRECT) ? 4 : 3;
  endfunction

  // Clock cycles from the load edge to the edge that captures the last output bit.
  function automatic int unsigned arch_latency(sbox_arch_e arch);
    return (arch == ARCH_DIRECT) ? 4 : 5;
  endfunction

  // ANF mask of the representative rule of each class (Table of representative rules).
  function automatic logic [15:0] class_anf(ca_class_e cls);
    unique case (cls)
      CLS_122: return 16'h1834;  // XZW ^ XY ^ YW ^ Y ^ Z
      CLS_131: return 16'h05e0;  // YZW ^ XZ ^ YZ ^ YW ^ X
      CLS_133: return 16'h14b6;  // YZW ^ XY ^ XZ ^ YW ^ Y ^ Z ^ W
      CLS_142: return 16'h178a;  // YZW ^ XY ^ XZ ^ XW ^ ZW ^ X ^ W
      CLS_151: return 16'h362c;  // XYW ^ XY ^ XZ ^ XW ^ YW ^ ZW ^ Z
      CLS_153: return 16'h3676;  // XYW ^ XY ^ XZ ^ XW ^ YZ ^ YW ^ Y ^ Z ^ W
      CLS_322: return 16'h4dd0;  // XYZ ^ XZW ^ YZW ^ XZ ^ YZ ^ X ^ Y
      CLS_331: return 16'h4ea4;  // XYZ ^ XZW ^ YZW ^ XZ ^ XW ^ YW ^ Z
      CLS_333: return 16'h3da6;  // XYW ^ XZW ^ YZW ^ XY ^ XZ ^ YW ^ X ^ Z ^ W
      CLS_342: return 16'h7e46;  // XYZ ^ XYW ^ XZW ^ XY ^ XZ ^ XW ^ YZ ^ Z ^ W
      CLS_351: return 16'h66f8;  // XYZ ^ XYW ^ YZW ^ XZ ^ XW ^ YZ ^ YW ^ ZW ^ Y
      CLS_353: return 16'h7d7a;  // XYZ ^ XYW ^ XZW ^ XY ^ XZ ^ YZ ^ YW ^ ZW ^ X ^ Y ^ W
      default: return 16'h0000;
    endcase
  endfunction

  // Evaluate an ANF mask on the nibble v = {X,Y,Z,W}: a monomial m is 1 when all
  // variables it contains are 1, i.e. when (v & m) == m.
  function automatic logic anf_eval(logic [15:0] anf, nibble_t v);
    logic r;
    r = 1'b0;
    for (int m = 0; m < 16; m++)
      if (anf[m] && ((v & 4'(m)) == 4'(m))) r ^= 1'b1;
    return r;
  endfunction

  // Unprotected reference S-box of a class: the four rotations of the input through
  // the local rule.
  function automatic nibble_t ca_sbox_ref(ca_class_e cls, nibble_t v);
    logic [15:0] anf;
    anf = class_anf(cls);
    return {anf_eval(anf, v),
            anf_eval(anf, {v[2:0], v[3]}),
            anf_eval(anf, {v[1:0], v[3:2]}),
            anf_eval(anf, {v[0], v[3:1]})};
  endfunction

endpackage
