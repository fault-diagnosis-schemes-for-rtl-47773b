// shuffle_prot: ShuffleCell (INV = 0) or InvShuffleCell (INV = 1) with its
// signature check.
//
// The transformation only rewires the 16 cells, so any signature that does not
// depend on cell order is unchanged by it. The check uses the union signature
// (the XOR of all 16 cells, CW bits): the prediction is the signature of the
// input, the actual value is the signature of the (fault-injectable) output.
// Purely combinational.
module shuffle_prot
  import midori_pkg::*;
#(
  parameter int CW  = 8,
  parameter bit INV = 1'b0
) (
  input  logic [16*CW-1:0] x,
  input  logic [16*CW-1:0] sa0,
  input  logic [16*CW-1:0] sa1,
  output logic [16*CW-1:0] y,
  output logic             err
);
  logic [16*CW-1:0] y_raw;
  logic [CW-1:0]    sig_in, sig_out;

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      if (!INV) y_raw[CW*(15-i) +: CW] = x[CW*(15-int'(SH_ORDER[i])) +: CW];
      else      y_raw[CW*(15-int'(SH_ORDER[i])) +: CW] = x[CW*(15-i) +: CW];
    end
    y = (y_raw & ~sa0) | sa1;
    sig_in  = '0;
    sig_out = '0;
    for (int i = 0; i < 16; i++) begin
      sig_in  ^= x[CW*i +: CW];
      sig_out ^= y[CW*i +: CW];
    end
    err = (sig_in != sig_out);
  end
endmodule
