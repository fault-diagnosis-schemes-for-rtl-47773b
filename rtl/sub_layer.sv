// sub_layer: the SubCell transformation over all 16 cells, with error
// detection per 4-bit S-box.
//
// Midori128 (CW = 8) applies SSb_(i mod 4) to cell i; Midori64 (CW = 4)
// applies Sb0 to every cell. With a signature scheme (SS_PAR, SS_IPAR,
// SS_BOTH) each 4-bit S-box gets its own flag (32 flags for Midori128, 16 for
// Midori64) and the flags are ORed into err; the layer then takes one cycle
// and `pass` is ignored. With SS_RESI (Midori128 only) every SSb is an
// ssb_resi: the layer needs two passes over a held input, pass = 0 then
// pass = 1, and err is valid in the second.
//
// sa0/sa1 are stuck-at masks over the 16*CW output bits (for RESI they act on
// the physical Sb1 outputs of each cell's S-box).
module sub_layer
  import midori_pkg::*;
#(
  parameter int        CW     = 8,
  parameter s_scheme_e SCHEME = SS_IPAR,
  parameter s_impl_e   IMPL   = IMPL_LUT
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            pass,
  input  logic [16*CW-1:0] x,
  input  logic [16*CW-1:0] sa0,
  input  logic [16*CW-1:0] sa1,
  output logic [16*CW-1:0] y,
  output logic            err
);
  localparam int FLAGS = (CW == 8) ? 32 : 16;
  logic [FLAGS-1:0] flags;

  for (genvar i = 0; i < 16; i++) begin : g_cell
    localparam int LSB = CW * (15 - i);
    if (CW == 4) begin : g_m64
      if (SCHEME == SS_RESI) begin : g_bad
        $error("sub_layer: RESI needs the 8-bit S-boxes of Midori128");
      end
      sb4_prot #(.SBOX(0), .IMPL(IMPL), .SCHEME(SCHEME)) u_sb (
        .x(x[LSB +: 4]), .sa0(sa0[LSB +: 4]), .sa1(sa1[LSB +: 4]),
        .y(y[LSB +: 4]), .err(flags[i]));
    end else if (SCHEME == SS_RESI) begin : g_resi
      ssb_resi #(.IDX(i % 4)) u_sb (
        .clk, .rst_n, .pass,
        .x(x[LSB +: 8]), .sa0(sa0[LSB +: 8]), .sa1(sa1[LSB +: 8]),
        .y(y[LSB +: 8]), .err(flags[2*i]));
      assign flags[2*i+1] = 1'b0;
    end else begin : g_sig
      ssb_prot #(.IDX(i % 4), .IMPL(IMPL), .SCHEME(SCHEME)) u_sb (
        .x(x[LSB +: 8]), .sa0(sa0[LSB +: 8]), .sa1(sa1[LSB +: 8]),
        .y(y[LSB +: 8]), .err(flags[2*i +: 2]));
    end
  end

  assign err = |flags;
endmodule
