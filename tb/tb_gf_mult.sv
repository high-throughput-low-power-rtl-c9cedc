// tb_gf_mult: exhaustive check of the Mastrovito multiplier over GF(2^6)
// with x^6 + x + 1 against log/antilog-table multiplication, plus a
// GF(2^5) instance with x^5 + x^2 + 1 to exercise a different tap position.
module tb_gf_mult;
  import tb_gf_pkg::*;
  int checks = 0, failures = 0;

  logic [5:0] a6, b6, c6;
  logic [4:0] a5, b5, c5;
  gf_mult #(.M(6), .POLY(7'h43)) dut6 (.a(a6), .b(b6), .c(c6));
  gf_mult #(.M(5), .POLY(6'h25)) dut5 (.a(a5), .b(b5), .c(c5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gf_init(5, 'h25);
    for (int a = 0; a < 32; a++) for (int b = 0; b < 32; b++) begin
      a5 = 5'(a); b5 = 5'(b); #1;
      checks++;
      if (int'(c5) != mul(a, b)) begin
        failures++;
        if (failures < 5) $display("m=5 %0d*%0d: got %0d exp %0d", a, b, c5, mul(a, b));
      end
    end
    gf_init(6, 'h43);
    for (int a = 0; a < 64; a++) for (int b = 0; b < 64; b++) begin
      a6 = 6'(a); b6 = 6'(b); #1;
      checks++;
      if (int'(c6) != mul(a, b)) begin
        failures++;
        if (failures < 5) $display("m=6 %0d*%0d: got %0d exp %0d", a, b, c6, mul(a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
