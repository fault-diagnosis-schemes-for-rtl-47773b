// tb_ti_sbox_prot: threshold S-box with random three-way sharings of every
// input value. One cycle later the recombined output must equal Sb0 of the
// recombined input, with no flag. A single-bit fault on output share 0 must
// raise e1 (comparison) and e2 (parity) and e3 (interleaved parity); an
// adjacent double fault must raise e1 and e3 but not e2.
module tb_ti_sbox_prot;
  import midori_model::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [3:0] x0, x1, x2, sa0, sa1, y0, y1, y2;
  logic       e1, e2, e3;

  always #5 clk = ~clk;

  ti_sbox_prot dut (.clk, .rst_n, .x0, .x1, .x2, .sa0, .sa1, .y0, .y1, .y2, .e1, .e2, .e3);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    {x0, x1, x2, sa0, sa1} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      logic [3:0] v, exp_y, m, yc;
      int kind;
      v = 4'($urandom);
      x1 = 4'($urandom); x2 = 4'($urandom); x0 = v ^ x1 ^ x2;
      kind = n % 3;                     // 0: no fault, 1: single bit, 2: adjacent pair
      m = (kind == 1) ? 4'(1 << $urandom_range(3, 0)) :
          (kind == 2) ? 4'(3 << $urandom_range(2, 0)) : 4'h0;
      sa0 = '0; sa1 = '0;
      @(posedge clk); #1;
      exp_y = SB0[v][3:0];
      check((y0 ^ y1 ^ y2) == exp_y, $sformatf("TI output for %h", v));
      check(!e1 && !e2 && !e3, "false alarm");
      // force the fault against the correct share-0 value
      sa1 = m & ~y0; sa0 = m & y0;
      #1;
      yc = y0 ^ y1 ^ y2;
      if (kind == 1) check(e1 && e2 && e3, "single-bit fault missed");
      if (kind == 2) check(e1 && !e2 && e3, "adjacent double fault flags");
      if (kind == 0) check(yc == exp_y, "no-fault value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
