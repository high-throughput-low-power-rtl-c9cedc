// ribm_pe0: processing engine PE0 of the riBM key-equation solver, one per
// coefficient i = 0..t of the error-locator polynomial Lambda(x).
//
// It forms, for one iteration r -> r+2 of the look-ahead riBM algorithm,
//   Lambda_i(r+2) = gamma(r) * Lambda_i(r) + Delta_1(r) * B_(i-2)(r)
//   B_i(r+2)      = upd ? Lambda_i(r) : B_(i-2)(r)
// with two Mastrovito multipliers, one GF adder (XOR) and one MUX. B_(i-2)
// is the coefficient of x^i in x^2*B(x); the neighbouring wiring (B_i feeds
// PE0 number i+2) is done by the core that instantiates the engines. upd is
// the shared decision "Delta_1 != 0 and k >= -1" made once per core.
//
// In the unrolled pipeline every iteration has its own core, so the engine
// has no register and no initial-value MUX: the pipeline register sits
// between cores. Interface: combinational, all data M bits wide.
module ribm_pe0 #(
  parameter int unsigned M    = bch_pkg::DEF_M,
  parameter logic [M:0]  POLY = (M + 1)'(bch_pkg::DEF_POLY)
) (
  input  logic [M-1:0] lam,      // Lambda_i(r)
  input  logic [M-1:0] bm2,      // B_(i-2)(r)
  input  logic [M-1:0] gamma,    // gamma(r)
  input  logic [M-1:0] delta1,   // Delta_1(r), the discrepancy
  input  logic         upd,      // take the "update B" branch
  output logic [M-1:0] lam_nxt,  // Lambda_i(r+2)
  output logic [M-1:0] b_nxt     // B_i(r+2)
);

  logic [M-1:0] p_gl, p_db;

  gf_mult #(.M(M), .POLY(POLY)) u_mul_gl (.a(gamma),  .b(lam), .c(p_gl));
  gf_mult #(.M(M), .POLY(POLY)) u_mul_db (.a(delta1), .b(bm2), .c(p_db));

  assign lam_nxt = p_gl ^ p_db;
  assign b_nxt   = upd ? lam : bm2;

endmodule
