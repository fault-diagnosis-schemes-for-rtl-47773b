// tb_sub_layer: SubCell layer in four configurations (Midori128 interleaved
// parity from tables, Midori128 both parities from equations, Midori64 single
// parity, Midori128 RESI). Random states are compared with the model; then a
// random single-bit output fault is forced and must be flagged.
module tb_sub_layer;
  import midori_pkg::*;
  import midori_model::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, pass = 0;
  logic [127:0] x, sa0, sa1;
  logic [127:0] y [4];
  logic         err [4];

  always #5 clk = ~clk;

  sub_layer #(.CW(8), .SCHEME(SS_IPAR), .IMPL(IMPL_LUT))   u0 (.clk, .rst_n, .pass, .x, .sa0, .sa1, .y(y[0]), .err(err[0]));
  sub_layer #(.CW(8), .SCHEME(SS_BOTH), .IMPL(IMPL_LOGIC)) u1 (.clk, .rst_n, .pass, .x, .sa0, .sa1, .y(y[1]), .err(err[1]));
  sub_layer #(.CW(4), .SCHEME(SS_PAR),  .IMPL(IMPL_LUT))   u2 (.clk, .rst_n, .pass, .x(x[63:0]), .sa0(sa0[63:0]), .sa1(sa1[63:0]), .y(y[2][63:0]), .err(err[2]));
  sub_layer #(.CW(8), .SCHEME(SS_RESI), .IMPL(IMPL_LUT))   u3 (.clk, .rst_n, .pass, .x, .sa0, .sa1, .y(y[3]), .err(err[3]));
  assign y[2][127:64] = '0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [127:0] expect_y(int u, logic [127:0] v);
    int cw = (u == 2) ? 4 : 8;
    return from_cells(sub_cell(to_cells(v, cw), cw), cw);
  endfunction

  // Physical Sb1 outputs of the cell holding bit b, in both passes.
  function automatic bit resi_visible(logic [127:0] v, int b);
    int c = 15 - b / 8, k = b % 8;
    byte unsigned p, hi, lo;
    logic [7:0] ph0, ph1;
    p = 0;
    for (int j = 0; j < 8; j++) p |= byte'(bitx(v[8*(15-c) +: 8], PERM[c % 4][j]) << (7 - j));
    hi = p >> 4; lo = p & 15;
    ph0 = {SB1[hi][3:0], SB1[lo][3:0]};
    ph1 = {SB1[lo][3:0], SB1[hi][3:0]};
    return !ph0[k] || !ph1[k];
  endfunction

  initial begin
    sa0 = '0; sa1 = '0; x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int b;
      logic [127:0] g128, g64;
      x = {$urandom, $urandom, $urandom, $urandom};
      sa0 = '0; sa1 = '0;
      pass = 0;
      #1;
      for (int u = 0; u < 4; u++) begin
        check(y[u] == expect_y(u, x), $sformatf("config %0d value", u));
        if (u != 3) check(!err[u], $sformatf("config %0d false alarm", u));
      end
      @(posedge clk); #1 pass = 1; #1;
      check(!err[3] && y[3] == expect_y(3, x), "RESI second pass");
      @(posedge clk); #1 pass = 0;
      // one flipped output bit (within the low half for Midori64)
      b = $urandom_range(63, 0);
      g128 = expect_y(0, x);
      g64  = expect_y(2, x);
      sa1 = '0; sa0 = '0;
      sa1[b] = ~g128[b];
      sa0[b] =  g128[b];
      #1;
      check(err[0] && err[1], "Midori128 signature configs miss a single-bit fault");
      sa1[b] = ~g64[b];
      sa0[b] =  g64[b];
      #1;
      check(err[2], "Midori64 config misses a single-bit fault");
      // RESI: stuck-at-1 on physical unit output bit b; visible when that unit
      // drives a 0 there in either pass.
      sa0 = '0; sa1 = '0; sa1[b] = 1'b1;
      @(posedge clk); #1 pass = 1; #1;
      check(err[3] == resi_visible(x, b), "RESI flag differs from expectation");
      @(posedge clk); #1 pass = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
