// tb_gf_const_mult: exhaustive check of constant multipliers by several
// field elements of GF(2^6) against table multiplication.
module tb_gf_const_mult;
  import tb_gf_pkg::*;
  int checks = 0, failures = 0;
  localparam int NC = 5;
  localparam logic [5:0] CS [NC] = '{6'd1, 6'd2, 6'd33, 6'd47, 6'd63};

  logic [5:0] a;
  logic [5:0] c [NC];
  for (genvar i = 0; i < NC; i++) begin : g_dut
    gf_const_mult #(.M(6), .POLY(7'h43), .CONST(CS[i])) dut (.a(a), .c(c[i]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gf_init(6, 'h43);
    for (int v = 0; v < 64; v++) begin
      a = 6'(v); #1;
      for (int i = 0; i < NC; i++) begin
        checks++;
        if (int'(c[i]) != mul(v, int'(CS[i]))) begin
          failures++;
          if (failures < 5) $display("%0d*%0d: got %0d", v, CS[i], c[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
