// tb_midori_core: the round-based core in four configurations run side by
// side on the same stimulus:
//   0  Midori128, interleaved S-box parity from tables, column MixColumn
//      signatures, per-element key signatures (the defaults)
//   1  Midori128, both parities from equations, union signatures
//   2  Midori128, RESI S-boxes, interleaved MixColumn signatures
//   3  Midori64, single parity
// Checks: the published test vectors, random encryptions and decryptions
// against the model, the latency (R cycles, 2R with RESI) and, for each
// transformation, that a permanent single-bit stuck-at fault raises that
// transformation's flag and leaves the others silent when nothing else is hit.
module tb_midori_core;
  import midori_pkg::*;
  import midori_model::*;

  localparam int NI = 4;
  localparam int CWS [NI] = '{8, 8, 8, 4};
  localparam int LAT [NI] = '{20, 20, 40, 16};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, dec = 0;
  logic [127:0] din, key;
  fault_t fault;
  logic [127:0] dout [NI];
  logic         busy [NI], done [NI], err [NI];
  logic [N_ERR-1:0] err_vec [NI];

  always #5 clk = ~clk;

  midori_core #(.CW(8)) u0 (.clk, .rst_n, .start, .decrypt(dec), .din, .key, .fault,
    .busy(busy[0]), .done(done[0]), .dout(dout[0]), .err(err[0]), .err_vec(err_vec[0]));
  midori_core #(.CW(8), .S_SCHEME(SS_BOTH), .S_IMPL(IMPL_LOGIC), .MC_SCHEME(MC_UNION),
                .KEY_SCHEME(KEY_UNION)) u1 (.clk, .rst_n, .start, .decrypt(dec), .din, .key, .fault,
    .busy(busy[1]), .done(done[1]), .dout(dout[1]), .err(err[1]), .err_vec(err_vec[1]));
  midori_core #(.CW(8), .S_SCHEME(SS_RESI), .MC_SCHEME(MC_INTERLEAVED)) u2 (.clk, .rst_n, .start,
    .decrypt(dec), .din, .key, .fault,
    .busy(busy[2]), .done(done[2]), .dout(dout[2]), .err(err[2]), .err_vec(err_vec[2]));
  midori_core #(.CW(4), .S_SCHEME(SS_PAR)) u3 (.clk, .rst_n, .start, .decrypt(dec),
    .din(din[63:0]), .key, .fault,
    .busy(busy[3]), .done(done[3]), .dout(dout[3][63:0]), .err(err[3]), .err_vec(err_vec[3]));
  assign dout[3][127:64] = '0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [127:0] res [NI];
  int           lat [NI];
  logic [N_ERR-1:0] ev [NI];
  bit           got [NI];
  int           cyc;

  // Per-instance capture of result, latency (clock edges after the one that
  // took start) and flags.
  always @(posedge clk) cyc <= start ? 0 : cyc + 1;
  for (genvar i = 0; i < NI; i++) begin : g_cap
    always @(posedge clk)
      if (start) got[i] <= 1'b0;
      else if (done[i] && !got[i]) begin
        got[i] <= 1'b1;
        lat[i] <= cyc;
        res[i] <= dout[i];
        ev[i]  <= err_vec[i];
      end
  end

  // Start all instances and wait for all of them.
  task automatic run(bit d, logic [127:0] data, logic [127:0] k);
    @(negedge clk);
    dec = d; din = data; key = k; start = 1;
    @(negedge clk);
    start = 0;
    repeat (60) @(negedge clk);
    for (int i = 0; i < NI; i++) check(got[i], $sformatf("instance %0d never finished", i));
  endtask

  function automatic logic [127:0] mask_to(int cw, logic [127:0] v);
    return (cw == 8) ? v : {64'h0, v[63:0]};
  endfunction

  initial begin
    fault = '0;
    din = '0; key = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // published test vectors
    run(0, 128'h51084ce6e73a5ca2ec87d7babc297543, 128'h687ded3b3c85b3f35b1009863e2a8cbf);
    for (int i = 0; i < 3; i++) check(res[i] == 128'h1e0ac4fddff71b4c1801b73ee4afc83d, $sformatf("Midori128 vector, inst %0d got %h lat %0d", i, res[i], lat[i]));
    run(0, 128'h0, 128'h0);
    for (int i = 0; i < 3; i++) check(res[i] == 128'hc055cbb95996d14902b60574d5e728d6, $sformatf("Midori128 zero vector, inst %0d", i));
    check(res[3][63:0] == 64'h3c9cceda2bbd449a, "Midori64 zero vector");
    run(0, 128'h42c20fd3b586879e, 128'h687ded3b3c85b3f35b1009863e2a8cbf);
    check(res[3][63:0] == 64'h66bcdc6270d901cd, "Midori64 vector");
    run(1, 128'h1e0ac4fddff71b4c1801b73ee4afc83d, 128'h687ded3b3c85b3f35b1009863e2a8cbf);
    for (int i = 0; i < 3; i++) check(res[i] == 128'h51084ce6e73a5ca2ec87d7babc297543, $sformatf("Midori128 decryption vector, inst %0d", i));

    // random operations against the model, with latency
    for (int n = 0; n < 40; n++) begin
      logic [127:0] p, k;
      bit d;
      p = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      d = n[0];
      run(d, p, k);
      for (int i = 0; i < NI; i++) begin
        logic [127:0] exp_v, pin;
        pin = mask_to(CWS[i], p);
        exp_v = d ? decrypt(pin, k, CWS[i]) : encrypt(pin, k, CWS[i]);
        check(res[i] == exp_v, $sformatf("inst %0d %s mismatch", i, d ? "decrypt" : "encrypt"));
        check(lat[i] == LAT[i], $sformatf("inst %0d latency %0d expected %0d", i, lat[i], LAT[i]));
        check(ev[i] == '0, $sformatf("inst %0d false alarm %b", i, ev[i]));
      end
    end

    // one permanent single-bit stuck-at per transformation
    for (int loc = 1; loc <= 6; loc++) begin
      for (int n = 0; n < 8; n++) begin
        logic [127:0] p, k;
        bit d;
        int b, flag;
        p = {$urandom, $urandom, $urandom, $urandom};
        k = {$urandom, $urandom, $urandom, $urandom};
        d = (loc == int'(FLT_INVSHUF)) ? 1'b1 : (loc == int'(FLT_SHUF)) ? 1'b0 : n[0];
        b = $urandom_range(63, 0);
        fault = '0;
        fault.loc = fault_loc_e'(loc);
        if (n[1]) fault.sa1[b] = 1'b1; else fault.sa0[b] = 1'b1;
        run(d, p, k);
        fault = '0;
        flag = loc - 1;
        for (int i = 0; i < NI; i++) begin
          logic [127:0] exp_v, pin;
          pin = mask_to(CWS[i], p);
          exp_v = d ? decrypt(pin, k, CWS[i]) : encrypt(pin, k, CWS[i]);
          if (res[i] != exp_v) begin
            check(ev[i][flag], $sformatf("inst %0d loc %0d: wrong result not flagged (%b)", i, loc, ev[i]));
          end
          if (ev[i] != '0)
            check(ev[i] == N_ERR'(1 << flag), $sformatf("inst %0d loc %0d: flags %b", i, loc, ev[i]));
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
