// midori_pkg: types, constants and pure functions shared by the fault-diagnosed
// Midori datapath.
//
// Contents
//   * Scheme selectors for the S-box, MixColumn and key-schedule checks, and the
//     fault-injection bundle that the core exposes for coverage experiments.
//   * The two 4-bit Midori S-boxes Sb0 (Midori64) and Sb1 (building block of the
//     Midori128 8-bit S-boxes SSb0..SSb3), both as tables ("LUT-based") and as
//     two-level AND/OR equations ("logic-based").
//   * Predicted signatures of the S-box outputs: the parity bit and the 2-bit
//     interleaved parity {y3^y1, y2^y0}, again as table and as equations.
//   * The bit permutations that wrap two Sb1 into SSb_i, the ShuffleCell cell
//     order, and the 19 round-constant matrices beta_0..beta_18 (alpha_i =
//     beta_i for Midori64).
//
// Conventions: a state of 16 cells is a packed vector with cell 0 in the most
// significant CW bits (the order in which Midori test vectors are written).
// Inside a byte, bit x_0 of the SSb description is the most significant bit.
// Inside a nibble, inputs a,b,c,d of the S-box equations are bits 3,2,1,0.
//
// The parity tables and the cell permutation follow the document; the S-box
// tables, the SSb bit permutations and the full constant table are those of
// the Midori cipher itself (the document quotes only beta_0, beta_14, beta_18,
// which agree). The logic-based equations were minimised for this design and
// reproduce the tables exactly.
package midori_pkg;

  // S-box error-detection scheme: single parity, interleaved parity, both, or
  // recomputing with swapped inputs (Midori128 only).
  typedef enum logic [1:0] {SS_PAR, SS_IPAR, SS_BOTH, SS_RESI} s_scheme_e;
  // S-box realisation: lookup tables or AND/OR equations.
  typedef enum logic {IMPL_LUT, IMPL_LOGIC} s_impl_e;
  // MixColumn check: per-column, one union signature, or interleaved pairs of rows.
  typedef enum logic [1:0] {MC_COLUMN, MC_UNION, MC_INTERLEAVED} mc_scheme_e;
  // Round-key check: 16 per-element parities, or one union signature.
  typedef enum logic {KEY_ELEMENT, KEY_UNION} key_scheme_e;

  // Where an injected fault is forced (stuck-at masks act on that unit's output).
  typedef enum logic [2:0] {
    FLT_NONE, FLT_SLAYER, FLT_SHUF, FLT_MIX, FLT_INVSHUF, FLT_KEYADD, FLT_KEYGEN
  } fault_loc_e;

  typedef struct packed {
    fault_loc_e   loc;
    logic [127:0] sa0;   // bits forced to 0
    logic [127:0] sa1;   // bits forced to 1 (wins over sa0)
  } fault_t;

  // Order of the per-transformation error flags reported by the core.
  localparam int E_SLAYER  = 0;
  localparam int E_SHUF    = 1;
  localparam int E_MIX     = 2;
  localparam int E_INVSHUF = 3;
  localparam int E_KEYADD  = 4;
  localparam int E_KEYGEN  = 5;
  localparam int N_ERR     = 6;

  // ---------------------------------------------------------------- S-boxes
  localparam logic [63:0] SB0_TAB = 64'hcad3ebf789150246; // Sb0[0] first
  localparam logic [63:0] SB1_TAB = 64'h1053e2f7da9bc846; // Sb1[0] first

  function automatic logic [3:0] sb_lut(input int sbox, input logic [3:0] x);
    logic [63:0] t;
    t = (sbox == 0) ? SB0_TAB : SB1_TAB;
    return t[60 - 4*int'(x) +: 4];
  endfunction

  function automatic logic [3:0] sb_logic(input int sbox, input logic [3:0] x);
    logic a, b, c, d;
    {a, b, c, d} = x;
    if (sbox == 0)
      return {(~b & ~c) | (~a & ~d) | (~a & ~c),
              (b & c) | (~a & ~d) | (a & c & d),
              (~a & d) | (b & d) | (~a & b),
              (~b & c) | (~a & c) | (a & ~b & d) | (~a & b & d)};
    else
      return {(a & ~b) | (a & ~c) | (~a & b & ~d),
              (b & ~d) | (b & c) | (~a & c & ~d) | (a & ~c & ~d),
              (c & d) | (~a & b) | (a & ~b & d),
              (~b & c) | (~a & c) | (~b & ~d)};
  endfunction

  // Actual signature of a nibble: {interleaved parity (2 bits), parity}.
  function automatic logic [2:0] sig4(input logic [3:0] y);
    return {y[3] ^ y[1], y[2] ^ y[0], ^y};
  endfunction

  // Predicted signature read from the extended table (Table I of the scheme).
  function automatic logic [2:0] sig_lut(input int sbox, input logic [3:0] x);
    return sig4(sb_lut(sbox, x));
  endfunction

  // Predicted signature from AND/OR equations of the input.
  function automatic logic [2:0] sig_logic(input int sbox, input logic [3:0] x);
    logic a, b, c, d;
    {a, b, c, d} = x;
    if (sbox == 0)
      return {(~a & c & d) | (a & ~b & ~c) | (~a & ~b & ~d) | (a & b & d),
              (~a & ~c & ~d) | (a & b & c) | (a & c & ~d) | (~a & b & ~c) |
                (a & ~b & ~c & d) | (~a & ~b & c & d),
              (~b & c & ~d) | (b & ~c & d) | (a & c & ~d) | (a & ~b & ~d) |
                (~a & b & ~c) | (~a & b & d)};
    else
      return {(b & d) | (a & ~c & ~d) | (~a & c & d) | (a & ~b & ~d),
              (a & c) | (~a & ~c & ~d) | (~b & c & d) | (a & b & ~d),
              (~a & b & d) | (~a & ~c & ~d) | (b & ~c & d) | (~b & ~c & ~d) |
                (a & ~b & c & d) | (a & b & c & ~d)};
  endfunction

  // Error flag for one nibble given predicted and actual signature.
  function automatic logic sig_err(input s_scheme_e sch, input logic [2:0] pred,
                                   input logic [2:0] act);
    logic e_par, e_ipar;
    e_par  = pred[0] ^ act[0];
    e_ipar = |(pred[2:1] ^ act[2:1]);
    case (sch)
      SS_PAR:  return e_par;
      SS_IPAR: return e_ipar;
      default: return e_par | e_ipar;
    endcase
  endfunction

  // ------------------------------------------------- SSb_i bit permutations
  // SSB_PERM[i][j] = which input bit x_k feeds position j of the Sb1 pair
  // (positions 0..3: upper Sb1, MSB first; 4..7: lower Sb1). The output uses
  // the inverse permutation, which keeps SSb_i an involution.
  typedef int unsigned perm8_t [8];
  localparam perm8_t SSB_PERM [4] = '{
    '{4, 1, 6, 3, 0, 5, 2, 7},
    '{1, 6, 7, 0, 5, 2, 3, 4},
    '{2, 3, 4, 1, 6, 7, 0, 5},
    '{7, 4, 1, 2, 3, 0, 5, 6}
  };

  // Input byte -> {upper nibble, lower nibble} fed to the Sb1 pair.
  function automatic logic [7:0] ssb_in_perm(input int unsigned idx, input logic [7:0] x);
    logic [7:0] p;
    for (int j = 0; j < 8; j++) p[7-j] = x[7 - SSB_PERM[idx][j]];
    return p;
  endfunction

  // {upper, lower} Sb1 outputs -> output byte.
  function automatic logic [7:0] ssb_out_perm(input int unsigned idx, input logic [7:0] y);
    logic [7:0] z;
    for (int j = 0; j < 8; j++) z[7 - SSB_PERM[idx][j]] = y[7-j];
    return z;
  endfunction

  function automatic logic [7:0] ssb(input int idx, input logic [7:0] x);
    logic [7:0] p;
    p = ssb_in_perm(idx, x);
    return ssb_out_perm(idx, {sb_lut(1, p[7:4]), sb_lut(1, p[3:0])});
  endfunction

  // ------------------------------------------------------- ShuffleCell order
  // Output cell i takes input cell SH_ORDER[i].
  typedef int unsigned perm16_t [16];
  localparam perm16_t SH_ORDER = '{0, 10, 5, 15, 14, 4, 11, 1, 9, 3, 12, 6, 7, 13, 2, 8};

  function automatic int unsigned sh_inv_order(input int unsigned i);
    for (int k = 0; k < 16; k++) if (SH_ORDER[k] == i) return k;
    return 0;
  endfunction

  // ------------------------------------------------------- round constants
  // BETA[i], cell 0 in the MSB: each bit is added to the LSB of that cell.
  localparam logic [15:0] BETA [19] = '{
    16'b0001010110110011, 16'b0111100011000000, 16'b1010010000110101,
    16'b0110001000010011, 16'b0001000001001111, 16'b1101000101110000,
    16'b0000001001100110, 16'b0000101111001100, 16'b1001010010000001,
    16'b0100000010111000, 16'b0111000110010111, 16'b0010001010001110,
    16'b0101000100110000, 16'b1111100011001010, 16'b1101111110010000,
    16'b0111110010000001, 16'b0001110000100100, 16'b0010001110110100,
    16'b0110001010001010
  };

  // L^-1 = InvShuffleCell o MixColumn applied to a vector of one bit per cell.
  function automatic logic [15:0] linv_bits(input logic [15:0] v);
    logic [15:0] m, r;
    for (int c = 0; c < 4; c++)
      for (int j = 0; j < 4; j++)
        m[15 - (4*c + j)] = v[15 - 4*c] ^ v[14 - 4*c] ^ v[13 - 4*c] ^ v[12 - 4*c]
                            ^ v[15 - (4*c + j)];
    for (int i = 0; i < 16; i++) r[15 - int'(SH_ORDER[i])] = m[15 - i];
    return r;
  endfunction

endpackage
