// keyadd_prot: KeyAdd (state XOR round key) with its signature check.
//
// Signatures are linear, so the predicted signature of the output is the XOR
// of the signatures of the state and of the round key. The union signature
// (XOR of all 16 cells, CW bits) is used. Purely combinational; sa0/sa1 force
// bits of the output.
module keyadd_prot #(
  parameter int CW = 8
) (
  input  logic [16*CW-1:0] s,
  input  logic [16*CW-1:0] rk,
  input  logic [16*CW-1:0] sa0,
  input  logic [16*CW-1:0] sa1,
  output logic [16*CW-1:0] o,
  output logic             err
);
  always_comb begin
    logic [CW-1:0] sig_s, sig_k, sig_o;
    o = ((s ^ rk) & ~sa0) | sa1;
    sig_s = '0;
    sig_k = '0;
    sig_o = '0;
    for (int i = 0; i < 16; i++) begin
      sig_s ^= s[CW*i +: CW];
      sig_k ^= rk[CW*i +: CW];
      sig_o ^= o[CW*i +: CW];
    end
    err = ((sig_s ^ sig_k) != sig_o);
  end
endmodule
