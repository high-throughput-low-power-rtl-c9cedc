// tb_ribm_last: the Lambda-only last riBM core against the reference
// step, starting from states after t-1 iterations of random syndromes.
module tb_ribm_last;
  import tb_gf_pkg::*;
  localparam int T = 3;
  int checks = 0, failures = 0;

  logic [5:0] lam [T+1], xb_hi [T-1], gamma, delta1, lam_out [T+1];
  ribm_last #(.M(6), .T(T), .POLY(7'h43)) dut (.*);

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
    repeat (1500) begin
      foreach (s[i]) s[i] = rnd_elem();
      st = ribm_init(s, T);
      for (int it = 0; it < T - 1; it++) st = ribm_step(st, T);
      for (int i = 0; i <= T; i++) lam[i] = 6'(st.lam[i]);
      for (int j = 0; j < T - 1; j++) xb_hi[j] = 6'(st.xb[j+2]);
      gamma = 6'(st.gamma); delta1 = 6'(st.dl[1]);
      #1;
      nx = ribm_step(st, T);
      for (int i = 0; i <= T; i++) begin
        checks++;
        if (int'(lam_out[i]) != int'(nx.lam[i])) begin
          failures++;
          if (failures < 5) $display("lam[%0d] got %0d exp %0d", i, lam_out[i], nx.lam[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
