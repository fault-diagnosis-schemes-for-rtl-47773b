// tb_ssb_lut8: exhaustive check of the four Midori128 8-bit S-boxes built as
// 8-input lookup tables, against the reference model, plus the involution
// property SSb(SSb(x)) = x.
module tb_ssb_lut8;
  import midori_model::*;

  int checks = 0, failures = 0;
  logic [7:0] x;
  logic [7:0] y [4];
  logic [7:0] yy [4];

  for (genvar i = 0; i < 4; i++) begin : g
    ssb_lut8 #(.IDX(i)) u   (.i_x(x),    .o_y(y[i]));
    ssb_lut8 #(.IDX(i)) u2  (.i_x(y[i]), .o_y(yy[i]));
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (y[i] != ssb(i, x)) begin
          failures++;
          $display("FAIL SSb%0d(%h)=%h expected %h", i, x, y[i], ssb(i, x));
        end
        if (yy[i] != x) begin
          failures++;
          $display("FAIL SSb%0d not an involution at %h", i, x);
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
