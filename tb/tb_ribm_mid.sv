// tb_ribm_mid: one full riBM core against the reference step, for states
// reached from random syndromes after one and two iterations and for
// fully random states; t = 4 so that every coefficient position is used.
module tb_ribm_mid;
  import tb_gf_pkg::*;
  import bch_pkg::kval_t;
  localparam int T = 4;
  int checks = 0, failures = 0, n_upd = 0, n_noupd = 0;

  logic [5:0] lam [T+1], xb [T+1], delta [2*T], theta [2*T], gamma;
  logic [5:0] lam_nxt [T+1], xb_nxt [T+1], delta_nxt [2*T], theta_nxt [2*T], gamma_nxt;
  kval_t k, k_nxt;
  ribm_mid #(.M(6), .T(T), .POLY(7'h43)) dut (.*);

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
    ribm_st_t st, nx;
    gf_init(6, 'h43);
    s = new[2*T];
    for (int n = 0; n < 1500; n++) begin
      foreach (s[i]) s[i] = rnd_elem();
      st = ribm_step(ribm_init(s, T), T);
      if (n % 3 == 1) st = ribm_step(st, T);
      if (n % 3 == 2) begin
        foreach (st.lam[i]) st.lam[i] = (i <= T) ? rnd_elem() : 0;
        foreach (st.xb[i])  st.xb[i]  = (i >= 2 && i <= T) ? rnd_elem() : 0;
        foreach (st.dl[i])  st.dl[i]  = (i < 2*T) ? rnd_elem() : 0;
        foreach (st.th[i])  st.th[i]  = (i < 2*T) ? rnd_elem() : 0;
        st.gamma = rnd_elem();
        st.k = $urandom_range(8, 0) - 4;
        if (n % 7 == 0) st.dl[1] = 0;
      end
      for (int i = 0; i <= T; i++) begin lam[i] = 6'(st.lam[i]); xb[i] = 6'(st.xb[i]); end
      for (int i = 0; i < 2*T; i++) begin delta[i] = 6'(st.dl[i]); theta[i] = 6'(st.th[i]); end
      gamma = 6'(st.gamma); k = kval_t'(st.k);
      #1;
      nx = ribm_step(st, T);
      if (st.dl[1] != 0 && st.k >= -1) n_upd++; else n_noupd++;
      for (int i = 0; i <= T; i++) begin
        chk(int'(lam_nxt[i]), int'(nx.lam[i]), "lam");
        chk(int'(xb_nxt[i]), int'(nx.xb[i]), "xb");
      end
      for (int i = 0; i < 2*T; i++) begin
        chk(int'(delta_nxt[i]), int'(nx.dl[i]), "delta");
        chk(int'(theta_nxt[i]), int'(nx.th[i]), "theta");
      end
      chk(int'(gamma_nxt), int'(nx.gamma), "gamma");
      chk(int'(k_nxt), nx.k, "k");
    end
    if (n_upd == 0 || n_noupd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
