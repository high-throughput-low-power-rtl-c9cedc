// tb_ribm_pe0: random operands into PE0; Lambda_i(r+2) and B_i(r+2)
// compared with gamma*Lambda + Delta1*B(i-2) and the branch MUX.
module tb_ribm_pe0;
  import tb_gf_pkg::*;
  int checks = 0, failures = 0;
  logic [5:0] lam, bm2, gamma, delta1, lam_nxt, b_nxt;
  logic upd;
  ribm_pe0 #(.M(6), .POLY(7'h43)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gf_init(6, 'h43);
    repeat (2000) begin
      lam = 6'(rnd_elem()); bm2 = 6'(rnd_elem());
      gamma = 6'(rnd_elem()); delta1 = 6'(rnd_elem()); upd = 1'($urandom());
      #1;
      checks += 2;
      if (int'(lam_nxt) != (mul(gamma, lam) ^ mul(delta1, bm2))) failures++;
      if (b_nxt != (upd ? lam : bm2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
