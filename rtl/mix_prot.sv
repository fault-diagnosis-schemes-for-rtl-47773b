// mix_prot: MixColumn with Midori's involutive almost-MDS matrix
// M = [0 1 1 1; 1 0 1 1; 1 1 0 1; 1 1 1 0] on each 4-cell column, with one of
// three signature checks.
//
//   MC_COLUMN      every column of M sums to 1, so the XOR of the four output
//                  cells of a column equals that of the input column: four
//                  CW-bit signatures compared.
//   MC_UNION       the same argument over the whole state: one CW-bit
//                  signature (XOR of all 16 cells) compared.
//   MC_INTERLEAVED rows 0+2 and rows 1+3 of M each sum to a unit vector pattern
//                  (1010 and 0101), so s'0^s'2 = s0^s2 and s'1^s'3 = s1^s3 in
//                  every column: eight CW-bit signatures compared.
//
// Purely combinational; sa0/sa1 force bits of the output.
module mix_prot
  import midori_pkg::*;
#(
  parameter int         CW     = 8,
  parameter mc_scheme_e SCHEME = MC_COLUMN
) (
  input  logic [16*CW-1:0] x,
  input  logic [16*CW-1:0] sa0,
  input  logic [16*CW-1:0] sa1,
  output logic [16*CW-1:0] y,
  output logic             err
);
  logic [16*CW-1:0] y_raw;

  function automatic logic [CW-1:0] cl(input logic [16*CW-1:0] s, input int i);
    return s[CW*(15-i) +: CW];
  endfunction

  always_comb begin
    logic [CW-1:0] tot_in, tot_out;
    logic          e;
    for (int c = 0; c < 4; c++) begin
      logic [CW-1:0] t;
      t = cl(x, 4*c) ^ cl(x, 4*c+1) ^ cl(x, 4*c+2) ^ cl(x, 4*c+3);
      for (int j = 0; j < 4; j++) y_raw[CW*(15-(4*c+j)) +: CW] = t ^ cl(x, 4*c+j);
    end
    y = (y_raw & ~sa0) | sa1;

    e = 1'b0;
    tot_in  = '0;
    tot_out = '0;
    for (int c = 0; c < 4; c++) begin
      logic [CW-1:0] ci02, ci13, co02, co13;
      ci02 = cl(x, 4*c) ^ cl(x, 4*c+2);
      ci13 = cl(x, 4*c+1) ^ cl(x, 4*c+3);
      co02 = cl(y, 4*c) ^ cl(y, 4*c+2);
      co13 = cl(y, 4*c+1) ^ cl(y, 4*c+3);
      tot_in  ^= ci02 ^ ci13;
      tot_out ^= co02 ^ co13;
      case (SCHEME)
        MC_COLUMN:      e |= ((ci02 ^ ci13) != (co02 ^ co13));
        MC_INTERLEAVED: e |= (ci02 != co02) || (ci13 != co13);
        default:        ;
      endcase
    end
    err = (SCHEME == MC_UNION) ? (tot_in != tot_out) : e;
  end
endmodule
