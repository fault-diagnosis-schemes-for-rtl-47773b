// tb_keyadd_prot: KeyAdd on random states and keys; the value must be the XOR
// and a forced single-bit output fault must be flagged, for Midori128 and
// Midori64 widths.
module tb_keyadd_prot;
  int checks = 0, failures = 0;
  logic [127:0] s, rk, sa0, sa1, o;
  logic [63:0]  o64;
  logic         err, e64;

  keyadd_prot #(.CW(8)) u   (.s, .rk, .sa0, .sa1, .o, .err);
  keyadd_prot #(.CW(4)) u64 (.s(s[63:0]), .rk(rk[63:0]), .sa0(sa0[63:0]), .sa1(sa1[63:0]), .o(o64), .err(e64));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 1000; n++) begin
      int b;
      logic [127:0] g;
      s  = {$urandom, $urandom, $urandom, $urandom};
      rk = {$urandom, $urandom, $urandom, $urandom};
      sa0 = '0; sa1 = '0;
      #1;
      g = s ^ rk;
      check(o == g && o64 == g[63:0], "KeyAdd value");
      check(!err && !e64, "false alarm");
      b = $urandom_range(63, 0);
      sa1[b] = ~g[b]; sa0[b] = g[b];
      #1;
      check(err && e64, "single-bit fault missed");
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
