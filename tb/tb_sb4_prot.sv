// tb_sb4_prot: exhaustive check of the protected 4-bit S-boxes.
// For Sb0 and Sb1, table- and equation-based, every input is applied: the
// output must match the reference table and no error may be flagged. Then
// every single-bit output fault and every adjacent double-bit fault is forced
// and must be flagged by the interleaved-parity check; the single-parity
// instance must flag all single-bit faults.
module tb_sb4_prot;
  import midori_pkg::*;
  import midori_model::*;

  int checks = 0, failures = 0;
  logic [3:0] x;
  logic [3:0] sa0 [5], sa1 [5], y [5];
  logic       err [5];

  sb4_prot #(.SBOX(0), .IMPL(IMPL_LUT),   .SCHEME(SS_IPAR)) u0 (.x, .sa0(sa0[0]), .sa1(sa1[0]), .y(y[0]), .err(err[0]));
  sb4_prot #(.SBOX(0), .IMPL(IMPL_LOGIC), .SCHEME(SS_IPAR)) u1 (.x, .sa0(sa0[1]), .sa1(sa1[1]), .y(y[1]), .err(err[1]));
  sb4_prot #(.SBOX(1), .IMPL(IMPL_LUT),   .SCHEME(SS_IPAR)) u2 (.x, .sa0(sa0[2]), .sa1(sa1[2]), .y(y[2]), .err(err[2]));
  sb4_prot #(.SBOX(1), .IMPL(IMPL_LOGIC), .SCHEME(SS_IPAR)) u3 (.x, .sa0(sa0[3]), .sa1(sa1[3]), .y(y[3]), .err(err[3]));
  sb4_prot #(.SBOX(1), .IMPL(IMPL_LOGIC), .SCHEME(SS_PAR))  u4 (.x, .sa0(sa0[4]), .sa1(sa1[4]), .y(y[4]), .err(err[4]));

  function automatic logic [3:0] ref_y(int u, logic [3:0] v);
    return (u < 2) ? SB0[v][3:0] : SB1[v][3:0];
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      for (int u = 0; u < 5; u++) begin sa0[u] = '0; sa1[u] = '0; end
      #1;
      for (int u = 0; u < 5; u++) begin
        check(y[u] == ref_y(u, x), $sformatf("unit %0d x=%h y=%h", u, x, y[u]));
        check(!err[u], $sformatf("unit %0d x=%h false alarm", u, x));
      end
      // single-bit and adjacent double-bit faults, forced against the good value
      for (int f = 0; f < 7; f++) begin
        logic [3:0] m;
        m = (f < 4) ? 4'(1 << f) : 4'(3 << (f - 4));
        for (int u = 0; u < 5; u++) begin
          sa1[u] = m & ~ref_y(u, x);
          sa0[u] = m & ref_y(u, x);
        end
        #1;
        for (int u = 0; u < 4; u++)
          check(err[u], $sformatf("unit %0d x=%h mask=%b not detected", u, x, m));
        if (f < 4) check(err[4], $sformatf("parity unit x=%h mask=%b not detected", x, m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
