// midori_top: the fault-diagnosed Midori cipher and, beside it, the
// error-detected threshold-implementation S-box.
//
// The two parts are independent and have their own ports:
//   * core_*  the round-based Midori encryption/decryption unit (midori_core,
//             Midori128 by default) with per-transformation error flags;
//   * ti_*    the three-share threshold implementation of the Midori S-box
//             Sb0 with its comparison flag (e1) and signature flags (e2, e3).
// The fault-injection inputs of both are brought out so that coverage
// experiments can drive them; tie them inactive in normal use.
// Timing is that of the two submodules: core done R (= 20) cycles after
// start, TI outputs one cycle after their inputs.
module midori_top
  import midori_pkg::*;
#(
  parameter int          CW         = 8,
  parameter s_scheme_e   S_SCHEME   = SS_IPAR,
  parameter s_impl_e     S_IMPL     = IMPL_LUT,
  parameter mc_scheme_e  MC_SCHEME  = MC_COLUMN,
  parameter key_scheme_e KEY_SCHEME = KEY_ELEMENT
) (
  input  logic             clk,
  input  logic             rst_n,
  // cipher core
  input  logic             core_start,
  input  logic             core_decrypt,
  input  logic [16*CW-1:0] core_din,
  input  logic [127:0]     core_key,
  input  fault_t           core_fault,
  output logic             core_busy,
  output logic             core_done,
  output logic [16*CW-1:0] core_dout,
  output logic             core_err,
  output logic [N_ERR-1:0] core_err_vec,
  // threshold S-box
  input  logic [3:0]       ti_x0,
  input  logic [3:0]       ti_x1,
  input  logic [3:0]       ti_x2,
  input  logic [3:0]       ti_sa0,
  input  logic [3:0]       ti_sa1,
  output logic [3:0]       ti_y0,
  output logic [3:0]       ti_y1,
  output logic [3:0]       ti_y2,
  output logic             ti_e1,
  output logic             ti_e2,
  output logic             ti_e3
);
  midori_core #(
    .CW(CW), .S_SCHEME(S_SCHEME), .S_IMPL(S_IMPL),
    .MC_SCHEME(MC_SCHEME), .KEY_SCHEME(KEY_SCHEME)
  ) u_core (
    .clk, .rst_n, .start(core_start), .decrypt(core_decrypt), .din(core_din),
    .key(core_key), .fault(core_fault), .busy(core_busy), .done(core_done),
    .dout(core_dout), .err(core_err), .err_vec(core_err_vec));

  ti_sbox_prot u_ti (
    .clk, .rst_n, .x0(ti_x0), .x1(ti_x1), .x2(ti_x2), .sa0(ti_sa0), .sa1(ti_sa1),
    .y0(ti_y0), .y1(ti_y1), .y2(ti_y2), .e1(ti_e1), .e2(ti_e2), .e3(ti_e3));
endmodule
