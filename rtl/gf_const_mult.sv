// gf_const_mult: multiply a field element by a constant, c = a * CONST.
//
// Since CONST is known at elaboration, every output bit is a fixed XOR of
// input bits: c[j] = XOR over i of a[i] & (alpha^i * CONST)[j]. The masks
// are computed by bch_pkg functions, so the circuit is an XOR network with
// no AND gates, as used by the parallel Chien search.
//
// Interface: combinational, M-bit a in, M-bit c out.
module gf_const_mult #(
  parameter int unsigned M     = bch_pkg::DEF_M,
  parameter logic [M:0]  POLY  = (M + 1)'(bch_pkg::DEF_POLY),
  parameter logic [M-1:0] CONST = M'(2)
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] c
);
  import bch_pkg::*;

  // Row j of the constant multiplication matrix.
  function automatic logic [M-1:0] row_mask(int unsigned j);
    logic [M-1:0] r = '0;
    for (int unsigned i = 0; i < M; i++) begin
      gfe_t p = gf_mul(gfe_t'(1) << i, gfe_t'(CONST), M, (MAXM + 1)'(POLY));
      r[i] = p[j];
    end
    return r;
  endfunction

  for (genvar j = 0; j < int'(M); j++) begin : g_bit
    localparam logic [M-1:0] MASK = row_mask(j);
    assign c[j] = ^(a & MASK);
  end

endmodule
