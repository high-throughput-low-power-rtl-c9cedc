// bch_fec_top: the BCH forward-error-correction pair for a short-reach
// optical link, BCH(63,45,3) over GF(2^6) by default: the parallel
// systematic encoder of the transmitter and the unrolled-pipeline decoder
// of the receiver, side by side.
//
// The two halves sit at opposite ends of the fibre, so they share only the
// clock and reset here; the encoder's codeword is brought out for the
// laser driver and the decoder takes the sliced received word from the
// receiver's amplifier. Both accept one word per clock.
//
// Timing: codeword follows msg by one cycle (one register); dec_out_*
// follows dec_in_* by T+3 cycles (T+3 registers). dec_out_err marks a word
// in which errors were seen, dec_out_fail one found uncorrectable and passed
// on as received. Reset is active low and asynchronous.
module bch_fec_top #(
  parameter int unsigned M    = bch_pkg::DEF_M,
  parameter int unsigned T    = bch_pkg::DEF_T,
  parameter logic [M:0]  POLY = (M + 1)'(bch_pkg::DEF_POLY),
  localparam int unsigned N   = (1 << M) - 1,
  localparam int unsigned K   = N - bch_pkg::gen_degree(M, T)
) (
  input  logic         clk,
  input  logic         rst_n,
  // transmitter side
  input  logic         enc_in_valid,
  input  logic [K-1:0] enc_msg,
  output logic         enc_out_valid,
  output logic [N-1:0] enc_codeword,
  // receiver side
  input  logic         dec_in_valid,
  input  logic [N-1:0] dec_in_data,
  output logic         dec_out_valid,
  output logic [N-1:0] dec_out_data,
  output logic         dec_out_err,
  output logic         dec_out_fail
);

  bch_encoder #(.M(M), .T(T), .POLY(POLY)) u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (enc_in_valid),
    .msg      (enc_msg),
    .out_valid(enc_out_valid),
    .codeword (enc_codeword)
  );

  bch_decoder_up #(.M(M), .T(T), .POLY(POLY)) u_dec (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (dec_in_valid),
    .in_data  (dec_in_data),
    .out_valid(dec_out_valid),
    .out_data (dec_out_data),
    .out_err  (dec_out_err),
    .out_fail (dec_out_fail)
  );

endmodule
