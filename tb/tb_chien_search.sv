// tb_chien_search: error locators built directly from random error
// positions, Lambda(x) = c * prod (1 + alpha^p x) with a random nonzero
// scale c, must flag exactly those positions and flip exactly those bits
// of a random received word. t = 3 over GF(2^6).
module tb_chien_search;
  import tb_gf_pkg::*;
  localparam int T = 3;
  int checks = 0, failures = 0;

  logic [5:0]  lam [T+1];
  logic [62:0] cw, dc, corr;
  chien_search #(.M(6), .T(T), .POLY(7'h43)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned c [T+1];
    logic [62:0] pat;
    gf_init(6, 'h43);
    repeat (1000) begin
      int ne;
      ne = $urandom_range(T, 0);
      pat = '0;
      while ($countones(pat) < ne) pat[$urandom_range(62, 0)] = 1'b1;
      foreach (c[i]) c[i] = 0;
      c[0] = $urandom_range(63, 1);
      for (int p = 0; p < 63; p++) if (pat[p]) begin
        // c(x) <- c(x) * (1 + alpha^p x)
        for (int d = T; d >= 1; d--) c[d] = c[d] ^ mul(c[d-1], apow(p));
      end
      foreach (lam[i]) lam[i] = 6'(c[i]);
      cw = {$urandom(), $urandom()};
      #1;
      checks += 2;
      if (corr != pat) begin
        failures++;
        if (failures < 5) $display("corr %h exp %h", corr, pat);
      end
      if (dc != (cw ^ pat)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
