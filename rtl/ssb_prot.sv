// ssb_prot: Midori128 8-bit S-box SSb_IDX with one error flag per internal Sb1.
//
// SSb_i permutes its 8 input bits, passes the two nibbles through two copies
// of the 4-bit S-box Sb1 and applies the inverse permutation to the result.
// The predicted signature (parity and/or interleaved parity) of each Sb1 is
// computed from that Sb1's permuted input nibble; the actual signature is
// taken from the output bits that the same Sb1 produces, located through the
// inverse permutation. err[0] belongs to the upper Sb1, err[1] to the lower
// one (e_2i and e_2i+1 of the S-box layer).
//
// With IMPL_LUT the data path is the 8-input table of ssb_lut8 and the
// prediction reads the extended 4-bit signature table; with IMPL_LOGIC both
// come from AND/OR equations of Sb1.
//
// Purely combinational. sa0/sa1 force bits of the 8-bit output.
module ssb_prot
  import midori_pkg::*;
#(
  parameter int        IDX    = 0,
  parameter s_impl_e   IMPL   = IMPL_LUT,
  parameter s_scheme_e SCHEME = SS_IPAR
) (
  input  logic [7:0] x,
  input  logic [7:0] sa0,
  input  logic [7:0] sa1,
  output logic [7:0] y,
  output logic [1:0] err
);
  logic [7:0] p, y_raw, y_lut, q;
  logic [2:0] pred_u, pred_l;

  ssb_lut8 #(.IDX(IDX)) u_lut (.i_x(x), .o_y(y_lut));

  always_comb begin
    p = ssb_in_perm(IDX, x);
    if (IMPL == IMPL_LUT) begin
      y_raw  = y_lut;
      pred_u = sig_lut(1, p[7:4]);
      pred_l = sig_lut(1, p[3:0]);
    end else begin
      y_raw  = ssb_out_perm(IDX, {sb_logic(1, p[7:4]), sb_logic(1, p[3:0])});
      pred_u = sig_logic(1, p[7:4]);
      pred_l = sig_logic(1, p[3:0]);
    end
    y = (y_raw & ~sa0) | sa1;
    // Back to Sb1 coordinates: the inverse of the output permutation is the
    // input permutation.
    q = ssb_in_perm(IDX, y);
    err[0] = sig_err(SCHEME, pred_u, sig4(q[7:4]));
    err[1] = sig_err(SCHEME, pred_l, sig4(q[3:0]));
  end
endmodule
