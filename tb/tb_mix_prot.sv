// tb_mix_prot: MixColumn with the three signature schemes on random states.
// Values must match the model and the matrix must be an involution. Every
// scheme must flag a single-bit fault. A double fault on the same bit of rows
// 0 and 1 of one column cancels in the column and union signatures but must
// be flagged by the interleaved one; the testbench checks both behaviours.
module tb_mix_prot;
  import midori_pkg::*;
  import midori_model::*;

  int checks = 0, failures = 0;
  logic [127:0] x, sa0, sa1;
  logic [127:0] y [3];
  logic         err [3];
  logic [127:0] yy;
  logic         e_yy;

  mix_prot #(.CW(8), .SCHEME(MC_COLUMN))      u0 (.x, .sa0, .sa1, .y(y[0]), .err(err[0]));
  mix_prot #(.CW(8), .SCHEME(MC_UNION))       u1 (.x, .sa0, .sa1, .y(y[1]), .err(err[1]));
  mix_prot #(.CW(8), .SCHEME(MC_INTERLEAVED)) u2 (.x, .sa0, .sa1, .y(y[2]), .err(err[2]));
  mix_prot #(.CW(8), .SCHEME(MC_COLUMN))      u3 (.x(y[0]), .sa0('0), .sa1('0), .y(yy), .err(e_yy));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic force_bits(logic [127:0] good, logic [127:0] m);
    sa1 = m & ~good;
    sa0 = m & good;
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [127:0] g, m;
      int b, c;
      x = {$urandom, $urandom, $urandom, $urandom};
      sa0 = '0; sa1 = '0;
      #1;
      g = from_cells(mix(to_cells(x, 8)), 8);
      for (int s = 0; s < 3; s++) begin
        check(y[s] == g, $sformatf("scheme %0d value", s));
        check(!err[s], $sformatf("scheme %0d false alarm", s));
      end
      check(yy == x, "MixColumn is not an involution");
      b = $urandom_range(127, 0);
      m = '0; m[b] = 1'b1;
      force_bits(g, m);
      #1;
      for (int s = 0; s < 3; s++) check(err[s], $sformatf("scheme %0d misses single-bit fault", s));
      c = $urandom_range(3, 0);
      b = $urandom_range(7, 0);
      m = '0;
      m[8*(15-4*c) + b] = 1'b1;        // row 0 of column c
      m[8*(14-4*c) + b] = 1'b1;        // row 1 of column c
      force_bits(g, m);
      #1;
      check(!err[0] && !err[1], "column/union should not see an aligned double fault");
      check(err[2], "interleaved scheme misses aligned double fault in rows 0,1");
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
