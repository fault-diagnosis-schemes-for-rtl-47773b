// ssb_resi: Midori128 8-bit S-box SSb_IDX checked by recomputing with swapped
// inputs (RESI).
//
// The S-box holds two physical Sb1 units. In the first pass (pass = 0) the
// upper permuted nibble goes to unit A and the lower one to unit B, as in the
// plain S-box; the result is driven on y and stored. In the second pass
// (pass = 1), with the same input still applied, the nibbles are swapped
// (upper to B, lower to A) and the unit outputs are swapped back. A mismatch
// with the stored first result raises err. Because each nibble is now computed
// by the other unit, a permanent fault in one unit shows up as well as a
// transient one. During the second pass y shows the stored first-pass result,
// so the datapath always uses the unmodified S-box output.
//
// Timing: one S-box evaluation per pass; the stored result is captured at the
// clock edge that ends pass 0, and err is valid (combinationally) during pass 1.
// sa0/sa1 force bits at the outputs of the physical units: bits 7..4 unit A,
// bits 3..0 unit B.
module ssb_resi
  import midori_pkg::*;
#(
  parameter int IDX = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pass,
  input  logic [7:0] x,
  input  logic [7:0] sa0,
  input  logic [7:0] sa1,
  output logic [7:0] y,
  output logic       err
);
  logic [7:0] p, unit_in, unit_out, sb1_out, first_q, y_now;

  always_comb begin
    p        = ssb_in_perm(IDX, x);
    unit_in  = pass ? {p[3:0], p[7:4]} : p;                 // swap for recompute
    unit_out = {sb_lut(1, unit_in[7:4]), sb_lut(1, unit_in[3:0])};
    unit_out = (unit_out & ~sa0) | sa1;
    sb1_out  = pass ? {unit_out[3:0], unit_out[7:4]} : unit_out; // swap back
    y_now    = ssb_out_perm(IDX, sb1_out);
    y        = pass ? first_q : y_now;
    err      = pass && (y_now != first_q);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     first_q <= '0;
    else if (!pass) first_q <= y_now;
  end
endmodule
