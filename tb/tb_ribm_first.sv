// tb_ribm_first: the simplified first riBM core against one step of the
// general riBM reference started from the initial state, for random
// syndromes (including S1 = 0 to take the other branch), t = 3.
module tb_ribm_first;
  import tb_gf_pkg::*;
  import bch_pkg::kval_t;
  localparam int T = 3;
  int checks = 0, failures = 0, n_upd = 0, n_noupd = 0;

  logic [5:0] syn [2*T];
  logic [5:0] lam [T+1], xb [T+1], delta [2*T], theta [2*T], gamma;
  kval_t k;
  ribm_first #(.M(6), .T(T), .POLY(7'h43)) dut (.*);

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 8) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned s [];
    ribm_st_t st;
    gf_init(6, 'h43);
    s = new[2*T];
    repeat (1000) begin
      foreach (s[i]) s[i] = rnd_elem();
      if ($urandom_range(3, 0) == 0) s[0] = 0;
      foreach (syn[i]) syn[i] = 6'(s[i]);
      #1;
      st = ribm_step(ribm_init(s, T), T);
      if (s[0] != 0) n_upd++; else n_noupd++;
      for (int i = 0; i <= T; i++) begin
        chk(int'(lam[i]), int'(st.lam[i]), "lam");
        chk(int'(xb[i]), int'(st.xb[i]), "xb");
      end
      for (int i = 0; i < 2*T; i++) begin
        chk(int'(delta[i]), int'(st.dl[i]), "delta");
        chk(int'(theta[i]), int'(st.th[i]), "theta");
      end
      chk(int'(gamma), int'(st.gamma), "gamma");
      chk(int'(k), st.k, "k");
    end
    if (n_upd == 0 || n_noupd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
