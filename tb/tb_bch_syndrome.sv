// tb_bch_syndrome: syndromes of random received words (dense random words
// and sparse error patterns) compared with Horner evaluation r(alpha^i),
// i = 1..2t, for t = 3 and t = 4 over GF(2^6).
module tb_bch_syndrome;
  import tb_gf_pkg::*;
  int checks = 0, failures = 0;

  logic [62:0] r;
  logic [5:0]  s3 [6];
  logic [5:0]  s4 [8];
  bch_syndrome #(.M(6), .T(3), .POLY(7'h43)) dut3 (.r(r), .syn(s3));
  bch_syndrome #(.M(6), .T(4), .POLY(7'h43)) dut4 (.r(r), .syn(s4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit rb [];
    gf_init(6, 'h43);
    rb = new[63];
    for (int n = 0; n < 400; n++) begin
      if (n < 200) r = {$urandom(), $urandom()};
      else begin
        r = '0;
        repeat ($urandom_range(4, 1)) r[$urandom_range(62, 0)] = 1'b1;
      end
      #1;
      foreach (rb[j]) rb[j] = r[j];
      for (int i = 1; i <= 8; i++) begin
        int unsigned e;
        e = eval_bits(rb, i);
        checks++;
        if (int'(s4[i-1]) != int'(e)) failures++;
        if (i <= 6) begin
          checks++;
          if (int'(s3[i-1]) != int'(e)) begin
            failures++;
            if (failures < 5) $display("S%0d got %0d exp %0d r=%h rb0=%0d sz=%0d", i, s3[i-1], e, r, rb[0], rb.size());
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
