// ribm_last: last iteration (r = 2t-3 -> 2t-1) of the look-ahead riBM
// solver, reduced to the error-locator update only:
//   Lambda(2t-1) = gamma Lambda(r) + Delta_1 x^2 B(r)
// Nothing else of the state is needed after this step. After the first
// iteration x^2*B has no terms below x^2, so Lambda_0 and Lambda_1 need
// only the gamma product: 2t multipliers and t-1 adders in all.
//
// Interface: combinational. xb_hi[j] is the coefficient of x^(j+2) of
// x^2*B(x), j = 0..t-2. lam_out is the final error-locator polynomial,
// lam_out[i] the coefficient of x^i.
module ribm_last #(
  parameter int unsigned M    = bch_pkg::DEF_M,
  parameter int unsigned T    = bch_pkg::DEF_T,
  parameter logic [M:0]  POLY = (M + 1)'(bch_pkg::DEF_POLY)
) (
  input  logic [M-1:0] lam     [T+1],
  input  logic [M-1:0] xb_hi   [T-1],
  input  logic [M-1:0] gamma,
  input  logic [M-1:0] delta1,
  output logic [M-1:0] lam_out [T+1]
);

  for (genvar i = 0; i <= int'(T); i++) begin : g_coef
    logic [M-1:0] p_gl;
    gf_mult #(.M(M), .POLY(POLY)) u_mul_gl (.a(gamma), .b(lam[i]), .c(p_gl));
    if (i >= 2) begin : g_full
      logic [M-1:0] p_db;
      gf_mult #(.M(M), .POLY(POLY)) u_mul_db (.a(delta1), .b(xb_hi[i-2]), .c(p_db));
      assign lam_out[i] = p_gl ^ p_db;
    end else begin : g_low
      assign lam_out[i] = p_gl;
    end
  end

endmodule
