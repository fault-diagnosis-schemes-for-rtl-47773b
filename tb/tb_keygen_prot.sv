// tb_keygen_prot: round keys for every round, encryption and decryption, for
// Midori128 (per-element and union signatures) and Midori64, against the
// model. The constant-signature facts stated for beta_0, beta_14 and beta_18
// (sums 0, 1, 0) are checked on the union signature. Single-bit faults on the
// produced key must be flagged.
module tb_keygen_prot;
  import midori_pkg::*;
  import midori_model::*;

  int checks = 0, failures = 0;
  logic [127:0] key, sa0, sa1;
  logic         dec;
  logic [4:0]   rnd;
  logic [127:0] rk_e, rk_u;
  logic [63:0]  rk64;
  logic         err_e, err_u, e64;

  keygen_prot #(.CW(8), .SCHEME(KEY_ELEMENT)) u_e  (.key, .decrypt(dec), .rnd, .sa0, .sa1, .rk(rk_e), .err(err_e));
  keygen_prot #(.CW(8), .SCHEME(KEY_UNION))   u_u  (.key, .decrypt(dec), .rnd, .sa0, .sa1, .rk(rk_u), .err(err_u));
  keygen_prot #(.CW(4), .SCHEME(KEY_ELEMENT)) u_64 (.key, .decrypt(dec), .rnd, .sa0(sa0[63:0]), .sa1(sa1[63:0]), .rk(rk64), .err(e64));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [7:0] usig(logic [127:0] v);
    logic [7:0] s = '0;
    for (int i = 0; i < 16; i++) s ^= v[8*i +: 8];
    return s;
  endfunction

  initial begin
    for (int n = 0; n < 20; n++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      for (int d = 0; d < 2; d++)
        for (int r = 0; r < 19; r++) begin
          logic [127:0] g;
          int b;
          dec = d[0]; rnd = 5'(r);
          sa0 = '0; sa1 = '0;
          #1;
          g = from_cells(d ? dec_round_key(key, r, 8) : round_key(key, r, 8), 8);
          check(rk_e == g && rk_u == g, $sformatf("Midori128 rk dec=%0d r=%0d", d, r));
          check(!err_e && !err_u, "false alarm");
          if (!d && (r == 0 || r == 14 || r == 18))
            check(usig(g) == (usig(key) ^ ((r == 14) ? 8'h01 : 8'h00)),
                  $sformatf("union signature of beta_%0d", r));
          if (r < 15) begin
            logic [127:0] g64;
            g64 = from_cells(d ? dec_round_key(key, r, 4) : round_key(key, r, 4), 4);
            check(rk64 == g64[63:0], $sformatf("Midori64 rk dec=%0d r=%0d", d, r));
            check(!e64, "Midori64 false alarm");
          end
          b = $urandom_range(63, 0);
          sa1[b] = ~g[b]; sa0[b] = g[b];
          #1;
          check(err_e && err_u, "Midori128 key fault missed");
          if (r < 15) begin
            logic [63:0] k64;
            k64 = rk64;
            sa0 = '0; sa1 = '0;
            #1 k64 = rk64;
            sa1[b] = ~k64[b]; sa0[b] = k64[b];
            #1 check(e64, "Midori64 key fault missed");
          end
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
