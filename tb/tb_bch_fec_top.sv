// tb_bch_fec_top: end-to-end run of the FEC pair at its default size,
// BCH(63,45,3): random messages into the encoder, its codewords through a
// binary symmetric channel with a controlled number of bit flips, and the
// noisy words into the decoder. Every message with at most t flips must
// come back intact and not marked as failed, T+3 cycles after it was
// presented to the decoder. Words with t+1 flips must be flagged; those
// marked as failed must come out exactly as received, and the others must
// differ from the sent codeword (miscorrection). Counted mechanisms, each of
// which must occur: error-free words taking the bypass path (riBM and Chien
// registers held), corrected words of every weight 1..t, uncorrectable
// (t+1) words passed on unchanged, full rate bursts of at least 64
// back-to-back words, and idle cycles.
module tb_bch_fec_top;
  import tb_gf_pkg::*;
  localparam int M = bch_pkg::DEF_M;
  localparam int T = bch_pkg::DEF_T;
  localparam int N = (1 << M) - 1;
  localparam int K = N - bch_pkg::gen_degree(M, T);
  localparam int LAT = T + 3;
  localparam int WORDS = 20000;
  int checks = 0, failures = 0;
  int n_err [T+2];
  int n_fail = 0, n_miscorr = 0;
  int n_bypass = 0, n_corrected = 0, n_flagged = 0, n_idle = 0, n_burst = 0;
  int run = 0, cyc = 0;

  logic clk = 0, rst_n = 0;
  logic enc_in_valid = 0, enc_out_valid;
  logic [K-1:0] enc_msg = '0;
  logic [N-1:0] enc_codeword;
  logic dec_in_valid = 0, dec_out_valid, dec_out_err, dec_out_fail;
  logic [N-1:0] dec_in_data = '0, dec_out_data;

  bch_fec_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic [K-1:0] msg; logic [N-1:0] cw, rx; int ne; int at; } item_t;
  item_t  sent [$];   // messages in the encoder
  item_t  q [$];      // words in the decoder

  initial begin
    #(20 * WORDS * 10 + 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decoder output checker
  always @(posedge clk) begin
    #1;
    if (rst_n && dec_out_valid) begin
      item_t it;
      if (q.size() == 0) failures++;
      else begin
        it = q.pop_front();
        checks += 3;
        if (cyc - it.at != LAT) failures++;
        if (dec_out_err != (it.ne != 0)) failures++;
        if (it.ne == 0 && !dec_out_err) n_bypass++;
        if (it.ne <= T) begin
          checks++;
          if (dec_out_fail) failures++;
          if (dec_out_data[N-1 -: K] != it.msg) begin
            failures++;
            if (failures < 5) $display("ne=%0d msg mismatch", it.ne);
          end else if (it.ne > 0) n_corrected++;
        end else begin
          // more than t errors: either found uncorrectable and passed on
          // unchanged, or (rarely) miscorrected to a different codeword
          checks++;
          if (dec_out_err) n_flagged++;
          if (dec_out_fail) begin
            n_fail++;
            if (dec_out_data != it.rx) failures++;
          end else begin
            n_miscorr++;
            if (dec_out_data == it.cw) failures++;
          end
        end
      end
    end
  end

  // encoder -> channel -> decoder
  always @(negedge clk) begin
    if (rst_n) begin
      dec_in_valid <= 1'b0;
      if (enc_out_valid) begin
        item_t it;
        logic [N-1:0] pat;
        int ne;
        it = sent.pop_front();
        checks++;
        if (enc_codeword[N-1 -: K] != it.msg) failures++;
        ne = $urandom_range(T + 1, 0);
        if ($urandom_range(2, 0) == 0) ne = 0;
        pat = '0;
        while ($countones(pat) < ne) pat[$urandom_range(N - 1, 0)] = 1'b1;
        n_err[ne]++;
        dec_in_valid <= 1'b1;
        dec_in_data  <= enc_codeword ^ pat;
        it.ne = ne;
        it.cw = enc_codeword;
        it.rx = enc_codeword ^ pat;
        it.at = cyc;
        q.push_back(it);
      end
    end
  end

  initial begin
    int w = 0;
    gf_init(M, int'(bch_pkg::DEF_POLY));
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (w < WORDS) begin
      @(negedge clk);
      // alternate full-rate bursts and sparse traffic
      if ((w / 500) % 2 == 1 && $urandom_range(3, 0) == 0) begin
        enc_in_valid = 0;
        n_idle++;
        if (run >= 64) n_burst++;
        run = 0;
      end else begin
        enc_in_valid = 1;
        enc_msg = {$urandom(), $urandom(), $urandom()};
        sent.push_back('{msg: enc_msg, cw: '0, rx: '0, ne: 0, at: 0});
        w++;
        run++;
      end
    end
    if (run >= 64) n_burst++;
    @(negedge clk) enc_in_valid = 0;
    repeat (LAT + 4) @(posedge clk);
    #2;
    checks++;
    if (q.size() != 0 || sent.size() != 0) failures++;
    for (int i = 0; i <= T + 1; i++) begin
      $display("words with %0d channel errors: %0d", i, n_err[i]);
      if (n_err[i] == 0) failures++;
    end
    $display("bypassed=%0d corrected=%0d flagged_uncorrectable=%0d idle=%0d bursts=%0d",
             n_bypass, n_corrected, n_flagged, n_idle, n_burst);
    $display("uncorrectable_passed_unchanged=%0d miscorrected=%0d", n_fail, n_miscorr);
    if (n_bypass == 0 || n_corrected == 0 || n_flagged == 0 || n_idle == 0 || n_burst == 0 ||
        n_fail == 0)
      failures++;
    checks++;
    if (n_flagged != n_err[T+1]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
