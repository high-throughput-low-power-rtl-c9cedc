// tb_bch_bsc_ber: bit-error-rate sweep through a binary symmetric channel
// at the default size, BCH(63,45,3). For each input BER (10^-1, 10^-1.5,
// 10^-2, 10^-2.5, 10^-3) it encodes random messages at full rate, flips
// every codeword bit independently with that probability, decodes, and
// counts message bit errors before and after decoding. Every word with at
// most t flips must decode to its message and not be marked as failed;
// words marked as failed are counted; below an input BER of 10^-1
// the output BER must be lower than the input BER, and at 10^-3 (where
// almost no word exceeds t flips) no residual error is expected in this
// sample size beyond the words that really had more than t flips.
module tb_bch_bsc_ber;
  import tb_gf_pkg::*;
  localparam int M = bch_pkg::DEF_M;
  localparam int T = bch_pkg::DEF_T;
  localparam int N = (1 << M) - 1;
  localparam int K = N - bch_pkg::gen_degree(M, T);
  localparam int WORDS = 20000;
  localparam int NP = 5;
  // flip probabilities scaled by 2^32
  localparam longint unsigned PTH [NP] = '{429496730, 135818791, 42949673, 13581879, 4294967};
  localparam string PNAME [NP] = '{"1e-1", "10^-1.5", "1e-2", "10^-2.5", "1e-3"};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic enc_in_valid = 0, enc_out_valid;
  logic [K-1:0] enc_msg = '0;
  logic [N-1:0] enc_codeword;
  logic dec_in_valid = 0, dec_out_valid, dec_out_err, dec_out_fail;
  logic [N-1:0] dec_in_data = '0, dec_out_data;

  bch_fec_top dut (.*);
  always #5 clk = ~clk;

  typedef struct { logic [K-1:0] msg; int ne; } item_t;
  item_t sent [$], q [$];
  int pi = 0;
  longint in_err = 0, out_err = 0, bits = 0, heavy = 0, n_fail = 0;

  initial begin
    #(NP * WORDS * 10 * 2 + 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      dec_in_valid <= 1'b0;
      if (enc_out_valid) begin
        item_t it;
        logic [N-1:0] pat;
        it = sent.pop_front();
        for (int j = 0; j < N; j++) pat[j] = ($urandom() < PTH[pi]);
        it.ne = $countones(pat);
        in_err += $countones(pat[N-1 -: K]);
        bits += K;
        if (it.ne > T) heavy++;
        dec_in_valid <= 1'b1;
        dec_in_data  <= enc_codeword ^ pat;
        q.push_back(it);
      end
    end
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && dec_out_valid) begin
      item_t it;
      it = q.pop_front();
      out_err += $countones(dec_out_data[N-1 -: K] ^ it.msg);
      if (dec_out_fail) n_fail++;
      if (it.ne <= T) begin
        checks++;
        if (dec_out_data[N-1 -: K] != it.msg || dec_out_fail) failures++;
      end
    end
  end

  initial begin
    gf_init(M, int'(bch_pkg::DEF_POLY));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (pi = 0; pi < NP; pi++) begin
      in_err = 0; out_err = 0; bits = 0; heavy = 0; n_fail = 0;
      for (int w = 0; w < WORDS; w++) begin
        @(negedge clk);
        enc_in_valid = 1;
        enc_msg = {$urandom(), $urandom()};
        sent.push_back('{msg: enc_msg, ne: 0});
      end
      @(negedge clk) enc_in_valid = 0;
      repeat (T + 8) @(posedge clk);
      #2;
      $display("input BER %s: in %0d/%0d = %e, out %0d = %e, words over t flips %0d, of them found uncorrectable %0d",
               PNAME[pi], in_err, bits, real'(in_err) / real'(bits), out_err,
               real'(out_err) / real'(bits), heavy, n_fail);
      if (pi > 0) begin
        checks++;
        if (out_err >= in_err) failures++;
      end
      checks++;
      if (heavy == 0 && out_err != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
