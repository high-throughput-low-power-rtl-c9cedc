// chien_search: fully unrolled (parallel) Chien search with bit correction.
//
// For every bit position p = 0..n-1 of the codeword it evaluates
//   Lambda(alpha^(n-p)) = Lambda_0 + sum_l Lambda_l * alpha^((n-p) l)
// with t constant multipliers (pure XOR networks) and an XOR tree. A zero
// result means alpha^(n-p) is a root of Lambda, i.e. bit p is in error;
// the correction bit corr[p] is then one and the output bit is the
// received bit flipped. All n rows work in parallel, so a whole codeword
// is searched and corrected in one cycle.
//
// Interface: combinational. lam[i] is the coefficient of x^i of the error
// locator (it may be scaled by any nonzero constant, as riBM delivers it).
// cw is the received codeword, dc the corrected one, corr the error pattern.
module chien_search #(
  parameter int unsigned M    = bch_pkg::DEF_M,
  parameter int unsigned T    = bch_pkg::DEF_T,
  parameter logic [M:0]  POLY = (M + 1)'(bch_pkg::DEF_POLY),
  localparam int unsigned N   = (1 << M) - 1
) (
  input  logic [M-1:0] lam [T+1],
  input  logic [N-1:0] cw,
  output logic [N-1:0] dc,
  output logic [N-1:0] corr
);
  import bch_pkg::*;

  for (genvar p = 0; p < int'(N); p++) begin : g_row
    logic [M-1:0] term [T+1];
    logic [M-1:0] sum;
    assign term[0] = lam[0];
    for (genvar l = 1; l <= int'(T); l++) begin : g_term
      localparam logic [M-1:0] E =
        M'(alpha_pow(((N - p) * l) % N, M, (MAXM + 1)'(POLY)));
      gf_const_mult #(.M(M), .POLY(POLY), .CONST(E)) u_cm (
        .a(lam[l]), .c(term[l]));
    end
    always_comb begin
      sum = '0;
      for (int l = 0; l <= int'(T); l++) sum ^= term[l];
    end
    assign corr[p] = (sum == '0);
    assign dc[p]   = cw[p] ^ corr[p];
  end

endmodule
