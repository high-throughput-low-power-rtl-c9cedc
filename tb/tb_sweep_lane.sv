// tb_sweep_lane: one lane of the code-size sweep, a self-contained
// encoder -> channel -> decoder loop for one (M, T, POLY) build of
// bch_fec_top. It is a helper of tb_bch_m_sweep and has no reference model
// of its own: the encoder is checked separately (tb_bch_encoder), so here
// the decoder must return the encoder's codeword for every word with at
// most T random bit flips, without marking it failed, and exactly T+3
// cycles after it went in. Words with T+1 flips must set dec_out_err, and
// when marked failed they must come out exactly as received.
//
// Interface: clk and rst_n come from the sweep testbench. The lane starts
// after reset, sends WORDS words with random one-cycle gaps, and raises
// done once the last word has been checked; checks and failures count
// what it compared. n_fail counts words rejected as uncorrectable.
module tb_sweep_lane #(
  parameter int unsigned M     = 6,
  parameter int unsigned T     = 3,
  parameter logic [M:0]  POLY  = 7'h43,
  parameter int unsigned WORDS = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_fail
);
  localparam int N   = (1 << M) - 1;
  localparam int K   = N - bch_pkg::gen_degree(M, T);
  localparam int LAT = T + 3;

  logic         enc_in_valid, enc_out_valid;
  logic [K-1:0] enc_msg;
  logic [N-1:0] enc_codeword;
  logic         dec_in_valid, dec_out_valid, dec_out_err, dec_out_fail;
  logic [N-1:0] dec_in_data, dec_out_data;

  bch_fec_top #(.M(M), .T(T), .POLY(POLY)) dut (.*);

  typedef struct { logic [N-1:0] cw, rx; int ne; int at; } item_t;
  item_t q [$];
  int    cyc = 0, sent = 0, got = 0;

  initial begin
    done = 1'b0; checks = 0; failures = 0; n_fail = 0;
    enc_in_valid = 1'b0; enc_msg = '0; dec_in_valid = 1'b0; dec_in_data = '0;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // message source, with a random gap now and then
  always @(negedge clk) begin
    if (rst_n && sent < int'(WORDS) && $urandom_range(7, 0) != 0) begin
      enc_in_valid <= 1'b1;
      foreach (enc_msg[b]) enc_msg[b] <= 1'($urandom());
      sent++;
    end else begin
      enc_in_valid <= 1'b0;
    end
  end

  // channel: 0..T+1 random flips on each encoded word
  always @(negedge clk) begin
    dec_in_valid <= 1'b0;
    if (rst_n && enc_out_valid) begin
      logic [N-1:0] pat;
      int ne;
      ne = $urandom_range(T + 1, 0);
      pat = '0;
      while ($countones(pat) < ne) pat[$urandom_range(N - 1, 0)] = 1'b1;
      dec_in_valid <= 1'b1;
      dec_in_data  <= enc_codeword ^ pat;
      q.push_back('{cw: enc_codeword, rx: enc_codeword ^ pat, ne: ne, at: cyc});
    end
  end

  // decoder output checker
  always @(posedge clk) begin
    #1;
    if (rst_n && dec_out_valid) begin
      item_t it;
      checks += 3;
      if (q.size() == 0) failures++;
      else begin
        it = q.pop_front();
        got++;
        if (cyc - it.at != LAT) failures++;
        if (dec_out_err != (it.ne != 0)) failures++;
        if (it.ne <= int'(T)) begin
          if (dec_out_data != it.cw || dec_out_fail) failures++;
        end else if (dec_out_fail) begin
          n_fail++;
          if (dec_out_data != it.rx) failures++;
        end
        if (got == int'(WORDS)) done <= 1'b1;
      end
    end
  end
endmodule
