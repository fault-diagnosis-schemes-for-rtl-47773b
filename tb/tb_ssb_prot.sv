// tb_ssb_prot: exhaustive check of the signature-protected 8-bit S-boxes
// SSb0..SSb3, table-based and equation-based. Outputs must match the model
// with no flag raised; a single-bit fault on each output bit must raise the
// flag of exactly the Sb1 that produces that bit (derived from the model's
// bit permutation).
module tb_ssb_prot;
  import midori_pkg::*;
  import midori_model::*;

  int checks = 0, failures = 0;
  logic [7:0] x;
  logic [7:0] sa0 [8], sa1 [8], y [8];
  logic [1:0] err [8];

  for (genvar i = 0; i < 8; i++) begin : g
    ssb_prot #(.IDX(i % 4), .IMPL(i < 4 ? IMPL_LUT : IMPL_LOGIC), .SCHEME(SS_BOTH)) u (
      .x, .sa0(sa0[i]), .sa1(sa1[i]), .y(y[i]), .err(err[i]));
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      for (int i = 0; i < 8; i++) begin sa0[i] = '0; sa1[i] = '0; end
      #1;
      for (int i = 0; i < 8; i++) begin
        check(y[i] == ssb(i % 4, x), $sformatf("inst %0d x=%h y=%h", i, x, y[i]));
        check(err[i] == 2'b00, $sformatf("inst %0d x=%h false alarm", i, x));
      end
      for (int k = 0; k < 8; k++) begin      // flip output bit x_k
        for (int i = 0; i < 8; i++) begin
          logic [7:0] good, m;
          good = ssb(i % 4, x);
          m = 8'h80 >> k;
          sa1[i] = m & ~good;
          sa0[i] = m & good;
        end
        #1;
        for (int i = 0; i < 8; i++) begin
          logic [1:0] exp_err;
          exp_err = (pair_pos(i % 4, k) < 4) ? 2'b01 : 2'b10;
          check(err[i] == exp_err, $sformatf("inst %0d x=%h bit %0d err=%b exp %b", i, x, k, err[i], exp_err));
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
