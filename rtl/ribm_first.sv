// ribm_first: first iteration (r = -1 -> 1) of the look-ahead riBM
// key-equation solver, simplified for its known initial state.
//
// At r = -1 the algorithm starts from Lambda = 1, B = x^-1, gamma = 1,
// k = -1, Delta(x) = S1 x + ... + S2t x^2t and
// Theta(x) = S1 + S2 x + ... + S2t x^(2t-1). Substituting these constants:
//   Lambda(1) = 1 + S1 x                      (no multiplier)
//   Delta_i(1) = S_(i+2) + S1 * S_(i+1)       (2t multipliers, gamma = 1)
//   and, because k = -1 already meets k >= -1, the branch depends on S1:
//   S1 != 0: B = 1, Theta_i = S_(i+2), gamma = S1, k = -1
//   S1 == 0: B = x, Theta_i = S_(i+1), gamma = 1,  k = 1
// B is handed on as x^2*B (xb[i] is the coefficient of x^i), the form the
// next core's PE0 engines read. Coefficients of x^2*B above x^t are dropped:
// they can never reach Lambda within t iterations.
//
// Interface: combinational. syn[i-1] = S_i. Outputs are the riBM state
// after the first iteration; the decoder registers them.
module ribm_first #(
  parameter int unsigned M    = bch_pkg::DEF_M,
  parameter int unsigned T    = bch_pkg::DEF_T,
  parameter logic [M:0]  POLY = (M + 1)'(bch_pkg::DEF_POLY)
) (
  input  logic [M-1:0]   syn   [2*T],
  output logic [M-1:0]   lam   [T+1],
  output logic [M-1:0]   xb    [T+1],
  output logic [M-1:0]   delta [2*T],
  output logic [M-1:0]   theta [2*T],
  output logic [M-1:0]   gamma,
  output bch_pkg::kval_t k
);
  import bch_pkg::*;

  // Position of x^3 in x^2*B; only exists for t >= 3.
  localparam int unsigned XB3 = (T >= 3) ? 3 : 2;

  logic upd;
  assign upd = (syn[0] != '0);

  // Delta(1)_i = S_(i+2) + S1 * S_(i+1); Delta(-1)/x^2 has S_(i+2) at x^i
  for (genvar i = 0; i < int'(2 * T); i++) begin : g_delta
    logic [M-1:0] prod;
    logic [M-1:0] s_ip2;
    gf_mult #(.M(M), .POLY(POLY)) u_mul (.a(syn[0]), .b(syn[i]), .c(prod));
    if (i + 1 < int'(2 * T)) begin : g_in
      assign s_ip2 = syn[i+1];
    end else begin : g_out
      assign s_ip2 = '0;
    end
    assign delta[i] = s_ip2 ^ prod;
    // Theta(1)_i = upd ? S_(i+2) : S_(i+1)
    if (i + 1 < int'(2 * T)) begin : g_th
      assign theta[i] = upd ? syn[i+1] : syn[i];
    end else begin : g_th_top
      assign theta[i] = upd ? '0 : syn[i];
    end
  end

  always_comb begin
    for (int i = 0; i <= int'(T); i++) begin
      lam[i] = '0;
      xb[i]  = '0;
    end
    lam[0] = M'(1);
    lam[1] = syn[0];
    // x^2*B: B = 1 -> x^2, B = x -> x^3
    if (upd)         xb[2]   = M'(1);
    else if (T >= 3) xb[XB3] = M'(1);
    gamma = upd ? syn[0] : M'(1);
    k     = upd ? kval_t'(-1) : kval_t'(1);
  end

endmodule
