// tb_bch_m_sweep: end-to-end run of the FEC pair over a range of code
// sizes, m = 5..8 (n = 31..255) for t = 3 and t = 4: eight tb_sweep_lane
// instances, each a complete bch_fec_top with its own field polynomial,
// run side by side from one clock. The polynomials are x^5+x^2+1,
// x^6+x+1, x^7+x+1 and x^8+x^4+x^3+x^2+1 (no trinomial exists for m = 8),
// all primitive. The same lanes also pass for m = 9 (x^9+x^4+1) and
// m = 10 (x^10+x^3+1) by extending the table; those builds take several
// minutes to compile and are left out here. Each lane checks
// correction of up to t errors, the T+3 cycle latency and the handling of
// t+1 errors. The sweep also requires that every lane rejects some
// uncorrectable words. A watchdog ends the run if a lane never finishes.
module tb_bch_m_sweep;
  localparam int NL = 8;
  localparam int WORDS = 600;
  localparam logic [8:0] PT [4] = '{9'h025, 9'h043, 9'h083, 9'h11D};

  logic clk = 1'b0, rst_n = 1'b0;
  logic done [NL];
  int   lc [NL], lf [NL], ln [NL];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NL; i++) begin : g_lane
    localparam int unsigned LM = 5 + i / 2;
    localparam int unsigned LT = 3 + i % 2;
    tb_sweep_lane #(.M(LM), .T(LT), .POLY((LM + 1)'(PT[i / 2])), .WORDS(WORDS)) u_lane (
      .clk(clk), .rst_n(rst_n), .done(done[i]),
      .checks(lc[i]), .failures(lf[i]), .n_fail(ln[i])
    );
  end

  initial begin
    #(WORDS * 10 * 4 + 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all = 1'b1;
      foreach (done[i]) all &= done[i];
    end while (!all);
    repeat (2) @(posedge clk);
    foreach (lc[i]) begin
      $display("m=%0d t=%0d: checks=%0d failures=%0d rejected=%0d",
               5 + i / 2, 3 + i % 2, lc[i], lf[i], ln[i]);
      checks += lc[i] + 1;
      failures += lf[i];
      if (ln[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
