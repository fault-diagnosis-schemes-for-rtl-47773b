// tb_fault_coverage: error-coverage campaign on Midori128 encryption with the
// default detection configuration, in two runs of 10,000 and 100,000 injected
// faults.
//
// A 32-bit maximum-length LFSR (x^32 + x^22 + x^2 + x + 1) chooses for every
// injection the plaintext and key, the transformation hit (S-layer,
// ShuffleCell, MixColumn, KeyAdd or key generation), the type (stuck-at-0 or
// stuck-at-1), the number of faulty bits (1 to 4) and their positions, and
// whether the fault is permanent (whole encryption) or transient (one clock
// cycle at a chosen round). An injection counts as detected when any error
// flag is raised during the encryption; its effect is judged against the
// reference model. The testbench reports coverage over all injections and over
// the injections that corrupted the ciphertext, in total and separately for
// stuck-at-0 and stuck-at-1 faults, and fails if a single-bit
// fault corrupts the ciphertext unflagged or if the coverage of corrupting
// faults falls below 98.5 %.
module tb_fault_coverage;
  import midori_pkg::*;
  import midori_model::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [127:0] din = '0, key = '0, dout;
  fault_t fault;
  logic busy, done, err;
  logic [N_ERR-1:0] err_vec;

  always #5 clk = ~clk;

  midori_core dut (.clk, .rst_n, .start, .decrypt(1'b0), .din, .key, .fault,
                   .busy, .done, .dout, .err, .err_vec);

  logic [31:0] lfsr = 32'hACE1_2468;
  function automatic logic [31:0] step(logic [31:0] s);
    return s[0] ? ((s >> 1) ^ 32'h80200003) : (s >> 1);
  endfunction
  task automatic next(output logic [31:0] r);
    repeat (3) lfsr = step(lfsr);
    r = lfsr;
  endtask

  const fault_loc_e LOCS [5] = '{FLT_SLAYER, FLT_SHUF, FLT_MIX, FLT_KEYADD, FLT_KEYGEN};

  task automatic campaign(int n_inj);
    int injected = 0, detected = 0, effective = 0, eff_detected = 0, single_escape = 0;
    int t_inj [2] = '{0, 0}, t_eff [2] = '{0, 0}, t_det [2] = '{0, 0};
    for (int n = 0; n < n_inj; n++) begin
      logic [31:0] r;
      logic [127:0] p, k, expv;
      fault_t f;
      int nbits, fstart, c;
      bit transient, flagged;
      for (int w = 0; w < 4; w++) begin next(r); p[32*w +: 32] = r; end
      for (int w = 0; w < 4; w++) begin next(r); k[32*w +: 32] = r; end
      next(r);
      f = '0;
      f.loc     = LOCS[r % 5];
      nbits     = 1 + int'((r >> 4) & 3);
      transient = r[8];
      fstart    = int'((r >> 9) % 20);
      for (int b = 0; b < nbits; b++) begin
        logic [31:0] q;
        next(q);
        if (r[12]) f.sa1[q[6:0]] = 1'b1; else f.sa0[q[6:0]] = 1'b1;
      end
      @(negedge clk);
      din = p; key = k; start = 1;
      fault = transient ? '0 : f;
      @(negedge clk);
      start = 0;
      c = 0;
      flagged = 0;
      while (!done && c < 40) begin
        if (transient) fault = (c == fstart) ? f : '0;
        @(negedge clk);
        c++;
      end
      fault = '0;
      flagged = err;
      expv = encrypt(p, k, 8);
      injected++;
      t_inj[r[12]]++;
      if (flagged) detected++;
      if (dout != expv) begin
        effective++;
        t_eff[r[12]]++;
        if (flagged) begin eff_detected++; t_det[r[12]]++; end
        else if (nbits == 1) single_escape++;
      end
    end
    $display("%0d faults injected: %0d detected (%0.2f%%); %0d corrupted the ciphertext, %0d of them detected (%0.2f%%)",
             injected, detected, 100.0 * detected / injected, effective, eff_detected,
             effective ? 100.0 * eff_detected / effective : 100.0);
    for (int t = 0; t < 2; t++) begin
      $display("  stuck-at-%0d: %0d injected, %0d corrupted the ciphertext, %0d of them detected (%0.2f%%)",
               t, t_inj[t], t_eff[t], t_det[t], t_eff[t] ? 100.0 * t_det[t] / t_eff[t] : 100.0);
      checks++;
      if (t_eff[t] == 0) begin
        failures++;
        $display("FAIL no corrupting stuck-at-%0d fault was injected", t);
      end
    end
    checks++;
    if (single_escape != 0) begin
      failures++;
      $display("FAIL %0d single-bit faults corrupted the ciphertext unflagged", single_escape);
    end
    checks++;
    if (effective != 0 && 100.0 * eff_detected / effective < 98.5) begin
      failures++;
      $display("FAIL coverage of corrupting faults below 98.5%%");
    end
  endtask

  initial begin
    fault = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    campaign(10000);
    campaign(100000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
