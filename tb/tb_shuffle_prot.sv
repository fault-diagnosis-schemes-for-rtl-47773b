// tb_shuffle_prot: ShuffleCell and InvShuffleCell on random Midori128 and
// Midori64 states against the model; the two chained must give the identity.
// A forced single-bit output fault must be flagged.
module tb_shuffle_prot;
  import midori_model::*;

  int checks = 0, failures = 0;
  logic [127:0] x, z, sa0, sa1, y_sh, y_ish, y_rt;
  logic [63:0]  y64;
  logic         e_sh, e_ish, e_rt, e64;

  shuffle_prot #(.CW(8), .INV(1'b0)) u_sh  (.x,          .sa0,     .sa1,     .y(y_sh),  .err(e_sh));
  shuffle_prot #(.CW(8), .INV(1'b1)) u_ish (.x,          .sa0,     .sa1,     .y(y_ish), .err(e_ish));
  shuffle_prot #(.CW(8), .INV(1'b1)) u_rt  (.x(z),       .sa0('0), .sa1('0), .y(y_rt),  .err(e_rt));
  shuffle_prot #(.CW(4), .INV(1'b0)) u_64  (.x(x[63:0]), .sa0(sa0[63:0]), .sa1(sa1[63:0]), .y(y64), .err(e64));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      int b;
      logic [127:0] g;
      x = {$urandom, $urandom, $urandom, $urandom};
      sa0 = '0; sa1 = '0;
      #1 z = y_sh;
      #1;
      check(y_sh  == from_cells(shuffle(to_cells(x, 8)), 8), "ShuffleCell value");
      check(y_ish == from_cells(inv_shuffle(to_cells(x, 8)), 8), "InvShuffleCell value");
      check(y_rt == x, "InvShuffleCell(ShuffleCell(x)) != x");
      g = from_cells(shuffle(to_cells({64'h0, x[63:0]}, 4)), 4);
      check(y64 == g[63:0], "Midori64 ShuffleCell value");
      check(!e_sh && !e_ish && !e_rt && !e64, "false alarm");
      b = $urandom_range(63, 0);
      g = y_sh;  sa1[b] = ~g[b]; sa0[b] = g[b];
      #1 check(e_sh, "ShuffleCell fault missed");
      sa0 = '0; sa1 = '0;
      #1 g = y_ish; sa1[b] = ~g[b]; sa0[b] = g[b];
      #1 check(e_ish, "InvShuffleCell fault missed");
      sa0 = '0; sa1 = '0;
      #1 g = {64'h0, y64}; sa1[b] = ~g[b]; sa0[b] = g[b];
      #1 check(e64, "Midori64 fault missed");
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
