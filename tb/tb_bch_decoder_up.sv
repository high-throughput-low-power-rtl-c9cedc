// tb_bch_decoder_up: streams BCH(63,45,3) codewords (made by a
// long-division reference encoder) with 0..t+1 random bit errors into the
// unrolled-pipeline decoder, with random idle gaps and full-rate bursts.
// Checks: words with at most t errors come out equal to the sent codeword
// and are not marked as failed; out_err is set exactly when errors were
// present; a word with t+1 errors is either marked failed and output as
// received, or miscorrected to a different valid codeword (all 2t
// syndromes of the output zero); each word leaves the decoder exactly T+3
// cycles after the cycle in which it was presented; reset clears
// out_valid. Both outcomes for t+1 errors must occur.
module tb_bch_decoder_up;
  import tb_gf_pkg::*;
  localparam int T = 3;
  localparam int N = 63;
  localparam int LAT = T + 3;
  int checks = 0, failures = 0;
  int n_err [T+2];
  int cyc = 0;
  int n_fail = 0, n_miscorr = 0;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, out_err, out_fail;
  logic [N-1:0] in_data = '0, out_data;

  bch_decoder_up dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic [N-1:0] cw, rx; int ne; int at; } item_t;
  item_t q [$];

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      item_t it;
      if (q.size() == 0) begin
        failures++;
      end else begin
        it = q.pop_front();
        checks++;
        if (cyc - it.at != LAT) begin
          failures++;
          $display("latency %0d", cyc - it.at);
        end
        checks++;
        if (out_err != (it.ne != 0)) failures++;
        checks++;
        checks++;
        if (it.ne <= T) begin
          if (out_fail) failures++;
          if (out_data != it.cw) begin
            failures++;
            if (failures < 5) $display("ne=%0d out %h exp %h", it.ne, out_data, it.cw);
          end
        end else if (out_fail) begin
          n_fail++;
          if (out_data != it.rx) begin
            failures++;
            if (failures < 5) $display("failed word altered");
          end
        end else begin
          bit ob [];
          n_miscorr++;
          if (out_data == it.cw) failures++;
          ob = new[N];
          foreach (ob[j]) ob[j] = out_data[j];
          for (int i = 1; i <= 2 * T; i++)
            if (eval_bits(ob, i) != 0) begin
              failures++;
              if (failures < 5) $display("miscorrected output is no codeword: S%0d", i);
            end
        end
      end
    end
  end

  initial begin
    bit g [], mb [], cwb [];
    int unsigned deg;
    logic [N-1:0] cw, pat;
    gf_init(6, 'h43);
    gen_poly(T, g, deg);
    mb = new[N - deg];
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid) failures++;
    rst_n = 1;
    for (int w = 0; w < 6000; w++) begin
      int ne;
      @(negedge clk);
      if ((w / 200) % 2 == 1 && $urandom_range(2, 0) == 0) begin
        in_valid = 0;
        continue;
      end
      foreach (mb[i]) mb[i] = 1'($urandom());
      encode(mb, g, deg, cwb);
      foreach (cwb[j]) cw[j] = cwb[j];
      ne = $urandom_range(T + 1, 0);
      if ($urandom_range(3, 0) == 0) ne = 0;
      pat = '0;
      while ($countones(pat) < ne) pat[$urandom_range(N - 1, 0)] = 1'b1;
      n_err[ne]++;
      in_valid = 1;
      in_data = cw ^ pat;
      q.push_back('{cw: cw, rx: cw ^ pat, ne: ne, at: cyc});
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    #2;
    checks++;
    if (q.size() != 0) failures++;
    for (int i = 0; i <= T + 1; i++) begin
      $display("words with %0d errors: %0d", i, n_err[i]);
      if (n_err[i] == 0) failures++;
    end
    $display("t+1 errors: found uncorrectable %0d, miscorrected %0d", n_fail, n_miscorr);
    checks++;
    if (n_fail == 0 || n_miscorr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
