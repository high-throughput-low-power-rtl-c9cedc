// ribm_pe1: processing engine PE1 of the riBM key-equation solver, one per
// coefficient i = 0..2t-1 of the discrepancy polynomial Delta(x).
//
// For one iteration r -> r+2 of the look-ahead riBM algorithm it forms
//   Delta_i(r+2) = gamma(r) * Delta_(i+2)(r) + Delta_1(r) * Theta_i(r)
//   Theta_i(r+2) = upd ? Delta_(i+2)(r) : Theta_i(r)
// The division Delta(x)/x^2 is only the index shift i+2 -> i, wired by the
// instantiating core. Two Mastrovito multipliers, one XOR adder, one MUX.
// As with PE0, the unrolled pipeline needs no register or initial-value MUX
// inside the engine. Interface: combinational, all data M bits wide.
module ribm_pe1 #(
  parameter int unsigned M    = bch_pkg::DEF_M,
  parameter logic [M:0]  POLY = (M + 1)'(bch_pkg::DEF_POLY)
) (
  input  logic [M-1:0] dip2,       // Delta_(i+2)(r)
  input  logic [M-1:0] theta,      // Theta_i(r)
  input  logic [M-1:0] gamma,      // gamma(r)
  input  logic [M-1:0] delta1,     // Delta_1(r)
  input  logic         upd,        // take the "update" branch
  output logic [M-1:0] delta_nxt,  // Delta_i(r+2)
  output logic [M-1:0] theta_nxt   // Theta_i(r+2)
);

  logic [M-1:0] p_gd, p_dt;

  gf_mult #(.M(M), .POLY(POLY)) u_mul_gd (.a(gamma),  .b(dip2),  .c(p_gd));
  gf_mult #(.M(M), .POLY(POLY)) u_mul_dt (.a(delta1), .b(theta), .c(p_dt));

  assign delta_nxt = p_gd ^ p_dt;
  assign theta_nxt = upd ? dip2 : theta;

endmodule
