// gf_mult: Mastrovito multiplier over GF(2^M), c = a * b mod p(x).
//
// The product is formed as a matrix-vector product c = Mx * b. Column 0 of
// Mx is the operand a; column i is column i-1 multiplied by alpha, which is
// a one-place shift of the column with its top bit fed back into the
// positions where p(x) has a one:
//   Mx[0][i] = Mx[M-1][i-1]
//   Mx[j][i] = Mx[j-1][i-1] ^ (Mx[M-1][i-1] & p_j)
// Because p(x) is a constant, building Mx costs only wires and one XOR per
// feedback tap; each output bit is then M AND gates and an XOR tree. This is
// the structure the design uses in every riBM processing engine.
//
// Interface: purely combinational, a and b in, c out, all M bits wide in
// the polynomial basis. POLY holds all M+1 coefficients of p(x).
module gf_mult #(
  parameter int unsigned   M    = bch_pkg::DEF_M,
  parameter logic [M:0]    POLY = (M + 1)'(bch_pkg::DEF_POLY)
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] c
);

  always_comb begin
    logic [M-1:0] col;   // current column of the multiplication matrix
    logic [M-1:0] nxt;
    col = a;
    c   = '0;
    for (int i = 0; i < int'(M); i++) begin
      if (b[i]) c ^= col;
      nxt[0] = col[M-1];
      for (int j = 1; j < int'(M); j++)
        nxt[j] = col[j-1] ^ (col[M-1] & POLY[j]);
      col = nxt;
    end
  end

endmodule
