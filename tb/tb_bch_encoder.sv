// tb_bch_encoder: random messages through the parallel encoder. Every
// codeword must carry the message in its top k bits, vanish at alpha^i for
// i = 1..2t, and equal the long-division reference; latency one cycle.
// Runs t = 3 (BCH(63,45)) and t = 4 (BCH(63,39)) side by side.
module tb_bch_encoder;
  import tb_gf_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, v_in = 0, v3, v4;
  logic [44:0] msg3;
  logic [38:0] msg4;
  logic [62:0] cw3, cw4;

  bch_encoder #(.M(6), .T(3), .POLY(7'h43)) dut3 (
    .clk(clk), .rst_n(rst_n), .in_valid(v_in), .msg(msg3), .out_valid(v3), .codeword(cw3));
  bch_encoder #(.M(6), .T(4), .POLY(7'h43)) dut4 (
    .clk(clk), .rst_n(rst_n), .in_valid(v_in), .msg(msg4), .out_valid(v4), .codeword(cw4));
  always #5 clk = ~clk;

  task automatic chk_cw(logic [62:0] cw, logic [62:0] mfield, int t, bit g [], int unsigned deg);
    bit rb [], mb [], ref_cw [];
    rb = new[63];
    foreach (rb[j]) rb[j] = cw[j];
    mb = new[63 - deg];
    foreach (mb[j]) mb[j] = mfield[j];
    checks++;
    if ((cw >> deg) != mfield) failures++;
    for (int i = 1; i <= 2 * t; i++) begin
      checks++;
      if (eval_bits(rb, i) != 0) failures++;
    end
    encode(mb, g, deg, ref_cw);
    checks++;
    foreach (ref_cw[j]) if (ref_cw[j] != rb[j]) begin failures++; break; end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit g3 [], g4 [];
    int unsigned d3, d4;
    gf_init(6, 'h43);
    gen_poly(3, g3, d3);
    gen_poly(4, g4, d4);
    checks += 2;
    if (d3 != 18) failures++;
    if (d4 != 24) failures++;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (300) begin
      @(negedge clk);
      v_in = 1; msg3 = {$urandom(), $urandom()}; msg4 = {$urandom(), $urandom()};
      @(posedge clk); #1;
      checks += 2;
      if (!v3 || !v4) failures++;
      chk_cw(cw3, 63'(msg3), 3, g3, d3);
      chk_cw(cw4, 63'(msg4), 4, g4, d4);
      @(negedge clk); v_in = 0;
      @(posedge clk); #1;
      if (v3) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
