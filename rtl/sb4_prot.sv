// sb4_prot: one 4-bit Midori S-box (Sb0 or Sb1) with signature-based error
// detection.
//
// The output signature is predicted from the S-box input, either by reading an
// extended table that stores the parity and the 2-bit interleaved parity next
// to each 4-bit entry (IMPL_LUT) or by AND/OR equations of the input bits
// (IMPL_LOGIC). The actual signature is taken from the output after the
// fault-injection masks and compared: a single-parity mismatch reveals every
// odd number of flipped bits, an interleaved-parity mismatch also reveals
// adjacent double flips. SCHEME selects which of the two raises `err`.
//
// Purely combinational. sa0/sa1 force output bits to 0/1 so that faults can be
// injected; tie them to zero in normal use.
module sb4_prot
  import midori_pkg::*;
#(
  parameter int        SBOX   = 1,        // 0: Sb0, 1: Sb1
  parameter s_impl_e   IMPL   = IMPL_LUT,
  parameter s_scheme_e SCHEME = SS_IPAR   // SS_PAR, SS_IPAR or SS_BOTH
) (
  input  logic [3:0] x,
  input  logic [3:0] sa0,
  input  logic [3:0] sa1,
  output logic [3:0] y,
  output logic       err
);
  logic [3:0] y_raw;
  logic [2:0] pred;

  always_comb begin
    if (IMPL == IMPL_LUT) begin
      y_raw = sb_lut(SBOX, x);
      pred  = sig_lut(SBOX, x);
    end else begin
      y_raw = sb_logic(SBOX, x);
      pred  = sig_logic(SBOX, x);
    end
    y   = (y_raw & ~sa0) | sa1;
    err = sig_err(SCHEME, pred, sig4(y));
  end
endmodule
