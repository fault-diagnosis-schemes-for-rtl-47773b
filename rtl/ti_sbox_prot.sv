// ti_sbox_prot: first-order threshold implementation (three shares) of the
// Midori 4-bit S-box Sb0, with two error-detection schemes.
//
// Sb0 is affine equivalent to the cubic class C266 and splits into two
// quadratic halves around the quadratic permutation
// Q12 = {0,1,2,3,4,5,6,7,8,9,C,D,E,F,A,B}:
//     stage 1: A1 then Q12 then A2      (one register stage)
//     stage 2: Q12 then A3
// with the affine tables A1 = {0A1B82934E5FC6D7}, A2 = {84B70C3F95A61D2E},
// A3 = {8A02DF57CE469B13} (first entry for input 0). Affine layers act share
// by share, the constant only on share 0. Q12 is y3 = x3, y0 = x0,
// y2 = x2 ^ x3x1, y1 = x1 ^ x3x1 ^ x3x2; its shares use direct sharing, so
// output share i depends only on input shares i+1 and i+2 (non-completeness).
// The register between the halves stops glitches from crossing stages.
//
// Error detection, on the recombined value (the shares XORed):
//   e1  scheme 1: an unshared S-box on the input, delayed one cycle, compared
//       with the recombined output;
//   e2  scheme 2: predicted parity of S(x) (a 16-entry table), compared with
//       the parity of the recombined output;
//   e3  scheme 2: predicted 2-bit interleaved parity, compared likewise.
//
// Timing: outputs and flags are valid one cycle after the input shares.
// sa0/sa1 force bits of output share 0 for fault injection.
//
// The decomposition tables come from the described approach; the ordering of
// the three affine tables, the direct sharing of Q12 and checking on
// recombined values are this design's choices. The direct sharing is not
// proven uniform, so a production masked design would add fresh randomness.
module ti_sbox_prot
  import midori_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] x0,
  input  logic [3:0] x1,
  input  logic [3:0] x2,
  input  logic [3:0] sa0,
  input  logic [3:0] sa1,
  output logic [3:0] y0,
  output logic [3:0] y1,
  output logic [3:0] y2,
  output logic       e1,
  output logic       e2,
  output logic       e3
);
  localparam logic [63:0] A1 = 64'h0A1B82934E5FC6D7;
  localparam logic [63:0] A2 = 64'h84B70C3F95A61D2E;
  localparam logic [63:0] A3 = 64'h8A02DF57CE469B13;

  function automatic logic [3:0] tab(input logic [63:0] t, input logic [3:0] v);
    return t[60 - 4*int'(v) +: 4];
  endfunction

  // Affine map on one share: share 0 carries the constant.
  function automatic logic [3:0] aff(input logic [63:0] t, input logic [3:0] v,
                                     input bit first);
    return first ? tab(t, v) : (tab(t, v) ^ tab(t, 4'h0));
  endfunction

  // Quadratic part of Q12 for the cross term of shares u and v.
  function automatic logic [3:0] q12_quad(input logic [3:0] u, input logic [3:0] v);
    return {1'b0, u[3] & v[1], (u[3] & v[1]) ^ (u[3] & v[2]), 1'b0};
  endfunction

  // Output share of Q12 computed from the two other input shares j and k.
  function automatic logic [3:0] q12_share(input logic [3:0] j, input logic [3:0] k);
    return j ^ q12_quad(j, j) ^ q12_quad(j, k) ^ q12_quad(k, j);
  endfunction

  logic [3:0] a0, a1, a2, b0, b1, b2, r0, r1, r2, c0, c1, c2, y_rec, x_rec;
  logic [3:0] s_pred_q;
  logic [2:0] sig_pred_q, sig_act;

  always_comb begin
    a0 = aff(A1, x0, 1'b1);
    a1 = aff(A1, x1, 1'b0);
    a2 = aff(A1, x2, 1'b0);
    b0 = aff(A2, q12_share(a1, a2), 1'b1);
    b1 = aff(A2, q12_share(a2, a0), 1'b0);
    b2 = aff(A2, q12_share(a0, a1), 1'b0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {r0, r1, r2} <= '0;
      s_pred_q     <= sb_lut(0, 4'h0);
      sig_pred_q   <= sig_lut(0, 4'h0);
    end else begin
      {r0, r1, r2} <= {b0, b1, b2};
      s_pred_q     <= sb_lut(0, x_rec);
      sig_pred_q   <= sig_lut(0, x_rec);
    end
  end

  always_comb begin
    x_rec = x0 ^ x1 ^ x2;
    c0 = aff(A3, q12_share(r1, r2), 1'b1);
    c1 = aff(A3, q12_share(r2, r0), 1'b0);
    c2 = aff(A3, q12_share(r0, r1), 1'b0);
    y0 = (c0 & ~sa0) | sa1;
    y1 = c1;
    y2 = c2;
    y_rec = y0 ^ y1 ^ y2;
    e1 = (y_rec != s_pred_q);
    sig_act = sig4(y_rec);
    e2 = (sig_act[0] != sig_pred_q[0]);
    e3 = (sig_act[2:1] != sig_pred_q[2:1]);
  end
endmodule
