// tb_ssb_resi: recomputing with swapped inputs on SSb0..SSb3.
// Each input is evaluated in two passes. Without faults both passes must give
// the model's output and no flag. With a stuck-at bit on one physical Sb1
// output, the expected pass results are computed from the model (the nibble
// processed by the faulty unit changes between passes) and the flag must be
// raised exactly when they differ; y must always show the first-pass result.
module tb_ssb_resi;
  import midori_model::*;

  int checks = 0, failures = 0, detected = 0, effective = 0;
  logic clk = 0, rst_n = 0, pass = 0;
  logic [7:0] x, sa0, sa1;
  logic [7:0] y [4];
  logic       err [4];

  always #5 clk = ~clk;

  for (genvar i = 0; i < 4; i++) begin : g
    ssb_resi #(.IDX(i)) u (.clk, .rst_n, .pass, .x, .sa0, .sa1, .y(y[i]), .err(err[i]));
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Model of one pass: permuted nibbles through the units, with the fault
  // applied to the physical unit outputs.
  function automatic byte unsigned pass_out(int idx, byte unsigned v, bit swapped,
                                            byte unsigned m0, byte unsigned m1);
    byte unsigned p, hi, lo, ua, ub, q, z;
    p = 0;
    for (int j = 0; j < 8; j++) p |= byte'(bitx(v, PERM[idx][j]) << (7 - j));
    hi = p >> 4; lo = p & 15;
    ua = swapped ? SB1[lo] : SB1[hi];
    ub = swapped ? SB1[hi] : SB1[lo];
    q = byte'(((ua << 4) | ub) & ~m0 | m1);
    if (swapped) q = byte'((q << 4) | (q >> 4));
    z = 0;
    for (int j = 0; j < 8; j++) z |= byte'(((q >> (7 - j)) & 1) << (7 - PERM[idx][j]));
    return z;
  endfunction

  initial begin
    sa0 = 0; sa1 = 0; x = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = -1; f < 16; f++) begin       // f < 0: no fault; else stuck-at bit f%8, type f/8
      sa0 = (f >= 0 && f < 8)  ? 8'(1 << f) : 8'h00;
      sa1 = (f >= 8)           ? 8'(1 << (f - 8)) : 8'h00;
      for (int v = 0; v < 256; v++) begin
        byte unsigned r0 [4], r1 [4];
        x = 8'(v);
        pass = 0;
        #1;
        for (int i = 0; i < 4; i++) begin
          r0[i] = pass_out(i, x, 0, sa0, sa1);
          r1[i] = pass_out(i, x, 1, sa0, sa1);
          check(y[i] == r0[i], $sformatf("SSb%0d pass0 x=%h", i, x));
          check(!err[i], $sformatf("SSb%0d flag in pass0", i));
        end
        @(posedge clk); #1;
        pass = 1;
        #1;
        for (int i = 0; i < 4; i++) begin
          check(y[i] == r0[i], $sformatf("SSb%0d pass1 keeps first result x=%h", i, x));
          check(err[i] == (r0[i] != r1[i]), $sformatf("SSb%0d x=%h f=%0d err=%b", i, x, f, err[i]));
          if (f < 0) check(r0[i] == ssb(i, x), "model sanity");
          if (r0[i] != ssb(i, x) || r1[i] != ssb(i, x)) effective++;
          if (err[i]) detected++;
        end
        @(posedge clk); #1;
      end
    end
    $display("RESI: %0d faulty evaluations, %0d flagged", effective, detected);
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
