// tb_ribm_pe1: random operands into PE1; Delta_i(r+2) and Theta_i(r+2)
// compared with gamma*Delta(i+2) + Delta1*Theta_i and the branch MUX.
module tb_ribm_pe1;
  import tb_gf_pkg::*;
  int checks = 0, failures = 0;
  logic [5:0] dip2, theta, gamma, delta1, delta_nxt, theta_nxt;
  logic upd;
  ribm_pe1 #(.M(6), .POLY(7'h43)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gf_init(6, 'h43);
    repeat (2000) begin
      dip2 = 6'(rnd_elem()); theta = 6'(rnd_elem());
      gamma = 6'(rnd_elem()); delta1 = 6'(rnd_elem()); upd = 1'($urandom());
      #1;
      checks += 2;
      if (int'(delta_nxt) != (mul(gamma, dip2) ^ mul(delta1, theta))) failures++;
      if (theta_nxt != (upd ? dip2 : theta)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
