// bch_syndrome: computes the 2t syndromes S_i = r(alpha^i), i = 1..2t, of an
// n-bit received word in one combinational step.
//
// Written out in bits, S = r * H^T where row i of the parity-check matrix H
// is (1, alpha^i, alpha^2i, ..., alpha^(n-1)i). Every bit of every S_i is
// therefore the XOR of those received bits r_j for which bit b of
// alpha^(i*j) is one: 2*t*m XOR trees whose connections are fixed by H and
// computed here at elaboration. No multipliers are needed.
//
// Interface: r[j] is the coefficient of x^j of the received polynomial.
// syn[i-1] is S_i. Combinational; the decoder registers the result.
module bch_syndrome #(
  parameter int unsigned M    = bch_pkg::DEF_M,
  parameter int unsigned T    = bch_pkg::DEF_T,
  parameter logic [M:0]  POLY = (M + 1)'(bch_pkg::DEF_POLY),
  localparam int unsigned N   = (1 << M) - 1
) (
  input  logic [N-1:0] r,
  output logic [M-1:0] syn [2*T]
);
  import bch_pkg::*;

  // Column of H for syndrome i, bit b: which r_j feed that XOR tree.
  function automatic logic [N-1:0] h_mask(int unsigned i, int unsigned b);
    logic [N-1:0] mask = '0;
    gfe_t step = alpha_pow(i, M, (MAXM + 1)'(POLY));
    gfe_t e    = gfe_t'(1);                  // alpha^(i*j), starting at j = 0
    for (int unsigned j = 0; j < N; j++) begin
      mask[j] = e[b];
      e = gf_mul(e, step, M, (MAXM + 1)'(POLY));
    end
    return mask;
  endfunction

  for (genvar i = 1; i <= int'(2 * T); i++) begin : g_syn
    for (genvar b = 0; b < int'(M); b++) begin : g_bit
      localparam logic [N-1:0] MASK = h_mask(i, b);
      assign syn[i-1][b] = ^(r & MASK);
    end
  end

endmodule
