// midori_core: round-based Midori encryption/decryption with signature-based
// concurrent error detection in every transformation.
//
// Data path (one round per clock, or two with RESI): a loop register holds the
// state. A round is SubCell -> ShuffleCell -> MixColumn -> KeyAdd when
// encrypting and SubCell -> MixColumn -> InvShuffleCell -> KeyAdd when
// decrypting; one MixColumn is shared, a multiplexer in front of it picks the
// ShuffleCell output (encrypt) or the S-layer output (decrypt), and one after
// it picks MixColumn (encrypt) or InvShuffleCell (decrypt). Because the S-boxes
// and MixColumn are involutions, decryption only needs InvShuffleCell and the
// transformed round keys L^-1(RK) produced by keygen_prot. The whitening key is
// added when the block is loaded and after the final round, which is SubCell
// only.
//
// Error detection: every transformation carries its own checker (S-box
// signatures or RESI, ShuffleCell/InvShuffleCell union signature, MixColumn
// column/union/interleaved signatures, KeyAdd and round-key signatures). Each
// checker's flag is sampled whenever that transformation's result is used and
// collected into a sticky per-transformation vector err_vec, cleared by start;
// err is the OR of err_vec. The output is always the unmodified cipher result.
//
// Interface and timing: start (with decrypt, din and key) is accepted while
// busy is low; din and key are captured then. done pulses for one cycle with
// dout valid exactly LAT = R cycles after the start edge (2*R with RESI),
// R = 20 rounds for Midori128 (CW = 8) and 16 for Midori64 (CW = 4); dout and
// err_vec hold until the next start. Synchronous active-low reset.
//
// fault injects stuck-at values (sa1 wins over sa0) at the output of the
// transformation named by fault.loc, in every cycle of the operation; the
// masks use the low 16*CW bits. Tie fault.loc to FLT_NONE in normal use.
//
// Follows the described architecture: the loop structure with shared
// MixColumn, the schemes and the signature equations. This design's own
// choices: the start/busy/done handshake, the reset, the one-round-per-cycle
// schedule, RESI as a second pass over the same S-box hardware, the union
// signature for ShuffleCell and KeyAdd, and the fault-injection port.
module midori_core
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
  input  logic             start,
  input  logic             decrypt,
  input  logic [16*CW-1:0] din,
  input  logic [127:0]     key,
  input  fault_t           fault,
  output logic             busy,
  output logic             done,
  output logic [16*CW-1:0] dout,
  output logic             err,
  output logic [N_ERR-1:0] err_vec
);
  localparam int  N    = 16 * CW;
  localparam int  R    = (CW == 8) ? 20 : 16;
  localparam bit  RESI = (S_SCHEME == SS_RESI);

  typedef enum logic [1:0] {IDLE, ROUND, FINAL} state_e;

  state_e       state;
  logic [N-1:0] st;
  logic [127:0] key_r;
  logic         dec_r;
  logic [4:0]   rnd;
  logic         pass;

  // Whitening key: K for Midori128, K_0 xor K_1 for Midori64.
  function automatic logic [N-1:0] wk_of(input logic [127:0] k);
    return (CW == 8) ? N'(k) : N'(k[127:64] ^ k[63:0]);
  endfunction

  // Stuck-at masks routed to the selected transformation only.
  function automatic logic [N-1:0] m0(input fault_loc_e loc);
    return (busy && fault.loc == loc) ? fault.sa0[N-1:0] : '0;
  endfunction
  function automatic logic [N-1:0] m1(input fault_loc_e loc);
    return (busy && fault.loc == loc) ? fault.sa1[N-1:0] : '0;
  endfunction

  logic [N-1:0] sub_y, sh_y, mix_x, mix_y, ish_y, ka_x, ka_y, rk;
  logic         e_sub, e_sh, e_mix, e_ish, e_ka, e_kg;

  sub_layer #(.CW(CW), .SCHEME(S_SCHEME), .IMPL(S_IMPL)) u_sub (
    .clk, .rst_n, .pass, .x(st), .sa0(m0(FLT_SLAYER)), .sa1(m1(FLT_SLAYER)),
    .y(sub_y), .err(e_sub));

  shuffle_prot #(.CW(CW), .INV(1'b0)) u_sh (
    .x(sub_y), .sa0(m0(FLT_SHUF)), .sa1(m1(FLT_SHUF)), .y(sh_y), .err(e_sh));

  assign mix_x = dec_r ? sub_y : sh_y;

  mix_prot #(.CW(CW), .SCHEME(MC_SCHEME)) u_mix (
    .x(mix_x), .sa0(m0(FLT_MIX)), .sa1(m1(FLT_MIX)), .y(mix_y), .err(e_mix));

  shuffle_prot #(.CW(CW), .INV(1'b1)) u_ish (
    .x(mix_y), .sa0(m0(FLT_INVSHUF)), .sa1(m1(FLT_INVSHUF)), .y(ish_y), .err(e_ish));

  assign ka_x = dec_r ? ish_y : mix_y;

  keygen_prot #(.CW(CW), .SCHEME(KEY_SCHEME)) u_kg (
    .key(key_r), .decrypt(dec_r), .rnd, .sa0(m0(FLT_KEYGEN)), .sa1(m1(FLT_KEYGEN)),
    .rk, .err(e_kg));

  keyadd_prot #(.CW(CW)) u_ka (
    .s(ka_x), .rk, .sa0(m0(FLT_KEYADD)), .sa1(m1(FLT_KEYADD)), .o(ka_y), .err(e_ka));

  // A round (or the final step) completes in this cycle.
  logic step_done;
  assign step_done = !RESI || pass;

  logic [N_ERR-1:0] round_err;
  always_comb begin
    round_err = '0;
    round_err[E_SLAYER]  = e_sub;
    if (state == ROUND) begin
      round_err[E_SHUF]    = !dec_r && e_sh;
      round_err[E_MIX]     = e_mix;
      round_err[E_INVSHUF] = dec_r && e_ish;
      round_err[E_KEYADD]  = e_ka;
      round_err[E_KEYGEN]  = e_kg;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= IDLE;
      st      <= '0;
      key_r   <= '0;
      dec_r   <= 1'b0;
      rnd     <= '0;
      pass    <= 1'b0;
      done    <= 1'b0;
      dout    <= '0;
      err_vec <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          st      <= din ^ wk_of(key);
          key_r   <= key;
          dec_r   <= decrypt;
          rnd     <= '0;
          pass    <= 1'b0;
          err_vec <= '0;
          state   <= ROUND;
        end
        ROUND: begin
          if (RESI) pass <= !pass;
          if (step_done) begin
            err_vec <= err_vec | round_err;
            st      <= ka_y;
            rnd     <= rnd + 5'd1;
            if (rnd == 5'(R - 2)) state <= FINAL;
          end
        end
        FINAL: begin
          if (RESI) pass <= !pass;
          if (step_done) begin
            err_vec <= err_vec | round_err;
            dout    <= sub_y ^ wk_of(key_r);
            done    <= 1'b1;
            state   <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);
  assign err  = |err_vec;

  // The round counter never passes the last key-schedule index.
  a_rnd_range: assert property (@(posedge clk) disable iff (!rst_n)
                                (state == ROUND) |-> (rnd <= 5'(R - 2)));
  // done only ever ends an operation.
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                done |-> (state == IDLE));
endmodule
