// ribm_mid: one full iteration r -> r+2 of the look-ahead reformulated
// inversionless Berlekamp-Massey (riBM) algorithm for binary BCH codes.
//
// The core evaluates, with t+1 PE0 and 2t PE1 engines working in parallel,
//   Lambda(r+2) = gamma Lambda(r) + Delta_1 x^2 B(r)
//   Delta(r+2)  = gamma Delta(r)/x^2 + Delta_1 Theta(r)
// and, when Delta_1 != 0 and k >= -1:
//   B = Lambda(r), Theta = Delta(r)/x^2, gamma = Delta_1, k = -k - 2
// otherwise:
//   B = x^2 B(r), Theta unchanged, gamma unchanged, k = k + 2.
// The next discrepancy Delta_1(r+2) comes out of the same step as
// Lambda(r+2), so the longest path is one multiplier plus one adder plus
// the MUX. B is carried as x^2*B (xb[i] = coefficient of x^i); PE0 number
// i passes its B_i to position i+2 of xb.
//
// Interface: combinational; inputs are the riBM state at r, outputs the
// state at r+2. k is a small signed integer. One instance per middle
// iteration of the unrolled pipeline (t-2 of them).
module ribm_mid #(
  parameter int unsigned M    = bch_pkg::DEF_M,
  parameter int unsigned T    = bch_pkg::DEF_T,
  parameter logic [M:0]  POLY = (M + 1)'(bch_pkg::DEF_POLY)
) (
  input  logic [M-1:0]   lam       [T+1],
  input  logic [M-1:0]   xb        [T+1],
  input  logic [M-1:0]   delta     [2*T],
  input  logic [M-1:0]   theta     [2*T],
  input  logic [M-1:0]   gamma,
  input  bch_pkg::kval_t k,
  output logic [M-1:0]   lam_nxt   [T+1],
  output logic [M-1:0]   xb_nxt    [T+1],
  output logic [M-1:0]   delta_nxt [2*T],
  output logic [M-1:0]   theta_nxt [2*T],
  output logic [M-1:0]   gamma_nxt,
  output bch_pkg::kval_t k_nxt
);
  import bch_pkg::*;

  logic         upd;
  logic [M-1:0] b_nxt [T+1];

  assign upd = (delta[1] != '0) && (k >= kval_t'(-1));

  for (genvar i = 0; i <= int'(T); i++) begin : g_pe0
    ribm_pe0 #(.M(M), .POLY(POLY)) u_pe0 (
      .lam    (lam[i]),
      .bm2    (xb[i]),
      .gamma  (gamma),
      .delta1 (delta[1]),
      .upd    (upd),
      .lam_nxt(lam_nxt[i]),
      .b_nxt  (b_nxt[i])
    );
    if (i >= 2) begin : g_sh
      assign xb_nxt[i] = b_nxt[i-2];
    end else begin : g_zero
      assign xb_nxt[i] = '0;
    end
  end

  for (genvar i = 0; i < int'(2 * T); i++) begin : g_pe1
    logic [M-1:0] dip2;
    if (i + 2 < int'(2 * T)) begin : g_in
      assign dip2 = delta[i+2];
    end else begin : g_out
      assign dip2 = '0;
    end
    ribm_pe1 #(.M(M), .POLY(POLY)) u_pe1 (
      .dip2     (dip2),
      .theta    (theta[i]),
      .gamma    (gamma),
      .delta1   (delta[1]),
      .upd      (upd),
      .delta_nxt(delta_nxt[i]),
      .theta_nxt(theta_nxt[i])
    );
  end

  assign gamma_nxt = upd ? delta[1] : gamma;
  assign k_nxt     = upd ? (-k - kval_t'(2)) : (k + kval_t'(2));

endmodule
