// ssb_lut8: Midori128 8-bit S-box SSb_IDX as an 8-input lookup table, arranged
// the way a six-input-LUT FPGA builds it.
//
// Each of the 8 output bits is one 4:1 multiplexer selected by the two most
// significant input bits, choosing among four 64-entry tables addressed by the
// six low input bits (32 six-input tables for the whole S-box). The table
// contents are computed at elaboration from the SSb definition in midori_pkg
// (two Sb1 between an input bit permutation and its inverse). Which two input
// bits drive the multiplexer is this design's choice.
//
// Purely combinational.
module ssb_lut8
  import midori_pkg::*;
#(
  parameter int IDX = 0    // which of SSb0..SSb3
) (
  input  logic [7:0] i_x,
  output logic [7:0] o_y
);
  // Table contents, flattened: bit ((b*4 + k)*64 + a) is entry a of the
  // 64-entry table k of output bit b.
  typedef logic [2047:0] lut6_t;

  function automatic lut6_t make_luts();
    lut6_t t;
    logic [7:0] v;
    for (int k = 0; k < 4; k++)
      for (int a = 0; a < 64; a++) begin
        v = ssb(IDX, 8'(k * 64 + a));
        for (int b = 0; b < 8; b++) t[(b*4 + k)*64 + a] = v[b];
      end
    return t;
  endfunction

  localparam lut6_t LUTS = make_luts();

  always_comb begin
    for (int b = 0; b < 8; b++) begin
      logic [3:0] lut_out;
      for (int k = 0; k < 4; k++) lut_out[k] = LUTS[(b*4 + k)*64 + int'(i_x[5:0])];
      o_y[b] = lut_out[i_x[7:6]];
    end
  end
endmodule
