// tb_midori_top: end-to-end test of midori_top at its default parameters
// (Midori128, interleaved S-box parity from tables, column MixColumn
// signatures, per-element key signatures) together with the threshold S-box.
//
// It runs encryptions and decryptions (published vector and random, against
// the model), checks the 20-cycle latency, and injects permanent and one-cycle
// transient stuck-at faults into each transformation of the core and into the
// threshold S-box. Every mechanism is counted and must have happened at least
// once: encryption, decryption, a flag from each of the six core checkers
// (S-layer, ShuffleCell, MixColumn, InvShuffleCell, KeyAdd, key generation),
// and e1, e2, e3 of the threshold S-box.
module tb_midori_top;
  import midori_pkg::*;
  import midori_model::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic core_start = 0, core_decrypt = 0;
  logic [127:0] core_din = '0, core_key = '0, core_dout;
  fault_t core_fault;
  logic core_busy, core_done, core_err;
  logic [N_ERR-1:0] core_err_vec;
  logic [3:0] ti_x0 = 0, ti_x1 = 0, ti_x2 = 0, ti_sa0 = 0, ti_sa1 = 0, ti_y0, ti_y1, ti_y2;
  logic ti_e1, ti_e2, ti_e3;

  always #5 clk = ~clk;

  midori_top dut (.*);

  int n_enc = 0, n_dec = 0, n_ti = 0, n_ti_e [3] = '{0, 0, 0};
  int n_flag [N_ERR] = '{0, 0, 0, 0, 0, 0};
  const string FLAG_NAME [N_ERR] = '{"S-layer", "ShuffleCell", "MixColumn",
                                    "InvShuffleCell", "KeyAdd", "key generation"};

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // One operation; the fault (if any) is active for `fcycles` cycles starting
  // `fstart` cycles after start (fcycles < 0: the whole operation).
  task automatic run(bit d, logic [127:0] data, logic [127:0] k, fault_t f,
                     int fstart, int fcycles, output logic [127:0] res,
                     output logic [N_ERR-1:0] ev);
    int c;
    @(negedge clk);
    core_decrypt = d; core_din = data; core_key = k; core_start = 1;
    core_fault = (fcycles < 0) ? f : '0;
    @(negedge clk);
    core_start = 0;
    c = 0;
    while (!core_done && c < 100) begin
      if (fcycles >= 0) core_fault = (c >= fstart && c < fstart + fcycles) ? f : '0;
      @(negedge clk);
      c++;
    end
    core_fault = '0;
    check(core_done, "operation never finished");
    check(c == 20, $sformatf("latency %0d cycles, expected 20", c));
    res = core_dout;
    ev  = core_err_vec;
    if (d) n_dec++; else n_enc++;
  endtask

  initial begin
    logic [127:0] res, expv;
    logic [N_ERR-1:0] ev;
    core_fault = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    run(0, 128'h51084ce6e73a5ca2ec87d7babc297543, 128'h687ded3b3c85b3f35b1009863e2a8cbf, '0, 0, -1, res, ev);
    check(res == 128'h1e0ac4fddff71b4c1801b73ee4afc83d && ev == '0, "published Midori128 vector");
    run(1, res, 128'h687ded3b3c85b3f35b1009863e2a8cbf, '0, 0, -1, res, ev);
    check(res == 128'h51084ce6e73a5ca2ec87d7babc297543 && ev == '0, "decryption of the vector");

    for (int n = 0; n < 20; n++) begin
      logic [127:0] p, k;
      p = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      run(n[0], p, k, '0, 0, -1, res, ev);
      expv = n[0] ? decrypt(p, k, 8) : encrypt(p, k, 8);
      check(res == expv && ev == '0, "random operation");
    end

    // Faults in every transformation, permanent and transient.
    for (int loc = 1; loc <= 6; loc++)
      for (int n = 0; n < 12; n++) begin
        logic [127:0] p, k;
        fault_t f;
        bit d;
        int b;
        p = {$urandom, $urandom, $urandom, $urandom};
        k = {$urandom, $urandom, $urandom, $urandom};
        d = (loc == int'(FLT_INVSHUF)) ? 1'b1 : (loc == int'(FLT_SHUF)) ? 1'b0 : n[0];
        b = $urandom_range(127, 0);
        f = '0;
        f.loc = fault_loc_e'(loc);
        if (n[1]) f.sa1[b] = 1'b1; else f.sa0[b] = 1'b1;
        run(d, p, k, f, $urandom_range(17, 0), n[2] ? 1 : -1, res, ev);
        expv = d ? decrypt(p, k, 8) : encrypt(p, k, 8);
        if (res != expv) check(ev[loc-1], $sformatf("loc %0d: corrupted result not flagged", loc));
        for (int e = 0; e < N_ERR; e++) if (ev[e]) n_flag[e]++;
      end

    // Threshold S-box: random sharings, with and without faults.
    for (int n = 0; n < 600; n++) begin
      logic [3:0] v, m;
      v = 4'($urandom);
      @(negedge clk);
      ti_x1 = 4'($urandom); ti_x2 = 4'($urandom); ti_x0 = v ^ ti_x1 ^ ti_x2;
      ti_sa0 = '0; ti_sa1 = '0;
      @(negedge clk);
      check((ti_y0 ^ ti_y1 ^ ti_y2) == SB0[v][3:0] && !ti_e1 && !ti_e2 && !ti_e3, "TI S-box value");
      n_ti++;
      m = (n % 3 == 1) ? 4'(1 << $urandom_range(3, 0)) : (n % 3 == 2) ? 4'(3 << $urandom_range(2, 0)) : 4'h0;
      ti_sa1 = m & ~ti_y0; ti_sa0 = m & ti_y0;
      #1;
      if (m != 0) check(ti_e1 && ti_e3, "TI fault missed");
      if (ti_e1) n_ti_e[0]++;
      if (ti_e2) n_ti_e[1]++;
      if (ti_e3) n_ti_e[2]++;
    end
    ti_sa0 = '0; ti_sa1 = '0;

    $display("mechanisms: %0d encryptions, %0d decryptions, %0d TI evaluations", n_enc, n_dec, n_ti);
    check(n_enc > 0 && n_dec > 0 && n_ti > 0, "an operation kind never ran");
    for (int e = 0; e < N_ERR; e++) begin
      $display("  %s flag raised %0d times", FLAG_NAME[e], n_flag[e]);
      check(n_flag[e] > 0, $sformatf("%s flag never raised", FLAG_NAME[e]));
    end
    for (int e = 0; e < 3; e++) begin
      $display("  TI e%0d raised %0d times", e + 1, n_ti_e[e]);
      check(n_ti_e[e] > 0, $sformatf("TI e%0d never raised", e + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
