// keygen_prot: round-key generation with signature-based error detection.
//
// Encryption round i uses RK_i = K xor beta_i for Midori128 and
// RK_i = K_(i mod 2) xor alpha_i for Midori64 (K = K_0 || K_1, alpha_i =
// beta_i). Each constant bit is added to the least significant bit of its
// cell. Decryption runs the rounds backwards through the same round structure,
// so round i (counted from the start of decryption) needs
// L^-1(RK_(R-2-i)) = L^-1(K_x) xor L^-1(beta_(R-2-i)) with
// L^-1 = InvShuffleCell o MixColumn; L^-1 of a constant is again one bit per
// cell.
//
// The predicted signature is Sig(K-part) xor Sig(constant), compared with the
// signature of the produced (fault-injectable) round key:
//   KEY_ELEMENT  16 per-cell parities: each cell's parity is the key cell's
//                parity, inverted where the constant bit is 1;
//   KEY_UNION    one CW-bit union signature (XOR of all cells), whose LSB is
//                inverted when the constant has an odd number of ones.
//
// Purely combinational; `rnd` runs from 0 to R-2.
module keygen_prot
  import midori_pkg::*;
#(
  parameter int          CW     = 8,
  parameter key_scheme_e SCHEME = KEY_ELEMENT
) (
  input  logic [127:0]     key,
  input  logic             decrypt,
  input  logic [4:0]       rnd,
  input  logic [16*CW-1:0] sa0,
  input  logic [16*CW-1:0] sa1,
  output logic [16*CW-1:0] rk,
  output logic             err
);
  localparam int R = (CW == 8) ? 20 : 16;
  localparam int N = 16 * CW;

  // L^-1 on a full state.
  function automatic logic [N-1:0] linv(input logic [N-1:0] s);
    logic [N-1:0] m, r;
    for (int c = 0; c < 4; c++) begin
      logic [CW-1:0] t;
      t = s[CW*(15-4*c) +: CW] ^ s[CW*(14-4*c) +: CW] ^
          s[CW*(13-4*c) +: CW] ^ s[CW*(12-4*c) +: CW];
      for (int j = 0; j < 4; j++)
        m[CW*(15-(4*c+j)) +: CW] = t ^ s[CW*(15-(4*c+j)) +: CW];
    end
    for (int i = 0; i < 16; i++)
      r[CW*(15-int'(SH_ORDER[i])) +: CW] = m[CW*(15-i) +: CW];
    return r;
  endfunction

  logic [4:0]   j;
  logic [N-1:0] kpart, base, cexp;
  logic [15:0]  cbits;

  always_comb begin
    j = decrypt ? 5'(R - 2) - rnd : rnd;
    if (CW == 8) kpart = N'(key);
    else         kpart = j[0] ? N'(key[63:0]) : N'(key[127:64]);
    cbits = BETA[j];
    if (decrypt) begin
      base  = linv(kpart);
      cbits = linv_bits(cbits);
    end else begin
      base  = kpart;
    end
    cexp = '0;
    for (int i = 0; i < 16; i++) cexp[CW*(15-i)] = cbits[15-i];
    rk = ((base ^ cexp) & ~sa0) | sa1;
  end

  always_comb begin
    logic [CW-1:0] u_pred, u_act;
    logic          e;
    e = 1'b0;
    u_pred = '0;
    u_act  = '0;
    for (int i = 0; i < 16; i++) begin
      e |= (^base[CW*(15-i) +: CW] ^ cbits[15-i]) != ^rk[CW*(15-i) +: CW];
      u_pred ^= base[CW*(15-i) +: CW];
      u_act  ^= rk[CW*(15-i) +: CW];
    end
    u_pred[0] ^= ^cbits;
    err = (SCHEME == KEY_ELEMENT) ? e : (u_pred != u_act);
  end
endmodule
