// bch_encoder: parallel systematic encoder for the binary BCH(n, k, t) code
// over GF(2^M), one codeword per clock.
//
// The codeword is c(x) = m(x) x^(n-k) + Rem(m(x) x^(n-k), g(x)), with
// g(x) the least common multiple of the minimal polynomials of alpha,
// alpha^3, ..., alpha^(2t-1). Instead of a serial LFSR the remainder is
// taken all at once from the generator matrix: parity bit q is the XOR of
// the message bits m_i for which bit q of x^(n-k+i) mod g(x) is one. g(x)
// and these masks are computed at elaboration, so the encoder is n-k XOR
// trees. The message sits in the top k bits of the codeword, the parity in
// the low n-k bits (bit j = coefficient of x^j).
//
// Interface: in_valid/msg are registered and the codeword appears on
// out_valid/codeword one cycle later (the output register is this design's
// choice). rst_n, active low and asynchronous, clears out_valid.
module bch_encoder #(
  parameter int unsigned M    = bch_pkg::DEF_M,
  parameter int unsigned T    = bch_pkg::DEF_T,
  parameter logic [M:0]  POLY = (M + 1)'(bch_pkg::DEF_POLY),
  localparam int unsigned N   = (1 << M) - 1,
  localparam int unsigned NK  = bch_pkg::gen_degree(M, T),
  localparam int unsigned K   = N - NK
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [K-1:0] msg,
  output logic         out_valid,
  output logic [N-1:0] codeword
);
  import bch_pkg::*;

  localparam gpoly_t G = gen_poly(M, T, (MAXM + 1)'(POLY));

  // Message bits that feed parity bit q.
  function automatic logic [K-1:0] par_mask(int unsigned q);
    logic [K-1:0] mask = '0;
    gpoly_t r = xpow_mod(NK, G, NK);
    for (int unsigned i = 0; i < K; i++) begin
      mask[i] = r[q];
      r = r << 1;
      if (r[NK]) r ^= G;
    end
    return mask;
  endfunction

  logic [NK-1:0] parity;
  for (genvar q = 0; q < int'(NK); q++) begin : g_par
    localparam logic [K-1:0] MASK = par_mask(q);
    assign parity[q] = ^(msg & MASK);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) codeword <= {msg, parity};
  end

endmodule
