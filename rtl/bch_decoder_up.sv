// bch_decoder_up: unrolled-pipeline (UP) binary BCH decoder, one n-bit
// codeword per clock, for BCH(63,45,3) by default (M = 6, T = 3).
//
// Pipeline (one register stage per line, every stage one clock):
//   p0      input register
//   p1      syndromes S1..S2t (XOR trees) and the error flag  S != 0
//   p2      riBM first iteration (simplified, no Lambda multipliers)
//   p3..pT  riBM middle iterations, t-2 full riBM cores
//   pT+1    riBM last iteration (Lambda only); the codeword arrives here
//           from the FIFO, delayed t+1 cycles behind p0
//   pT+2    output register: Chien search and correction, or bypass for
//           error-free and uncorrectable words
// The riBM loop of t iterations is unrolled into t cores, so no core is
// reused and there are no input/output MUXes around the engines; the
// pipeline accepts a new codeword every cycle and never stalls.
//
// Zero-syndrome control: the flag "some syndrome is nonzero" is formed from
// the syndrome unit's output and travels down the pipeline with the data.
// For an error-free word the riBM stage registers and the Chien search
// input register are not loaded (their enables are the clock-gating
// conditions of a gated implementation) and the output MUX takes the
// FIFO's copy of the received word directly. The enables are written as
// register load conditions; an integrated clock-gating cell is left to
// synthesis.
//
// Interface: in_valid/in_data (bit j = coefficient of x^j) are sampled on
// a rising edge and pass through T+3 registers (p0..pT+2): a word presented
// in clock cycle c appears on out_valid/out_data in cycle c+T+3, carrying
// the corrected codeword; out_err says that the syndrome was nonzero
// (errors were seen, and were corrected or found uncorrectable); out_fail
// says that the word was found uncorrectable: the number of roots the Chien search found
// differs from the length of the error locator, so it has more than t
// errors, and it is output exactly as received. rst_n is active low and
// asynchronous and clears the valid and flag bits; data registers are not
// reset. A word with more than t errors that lies within distance t of
// another codeword cannot be told apart and is miscorrected to it.
//
// The stage order, the zero-syndrome gating, the FIFO and the output MUX
// follow the source design. Leaving uncorrectable words unchanged does
// too, but the test used for it (root count against the length taken from
// k) is this design's own choice, as are the valid bits and the reset.
module bch_decoder_up #(
  parameter int unsigned M    = bch_pkg::DEF_M,
  parameter int unsigned T    = bch_pkg::DEF_T,
  parameter logic [M:0]  POLY = (M + 1)'(bch_pkg::DEF_POLY),
  localparam int unsigned N   = (1 << M) - 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] in_data,
  output logic         out_valid,
  output logic [N-1:0] out_data,
  output logic         out_err,
  output logic         out_fail
);
  import bch_pkg::*;

  // Number of riBM state registers between first and last core.
  localparam int unsigned NS = T - 1;

  // ---------------- p0: input register ----------------
  logic         v0;
  logic [N-1:0] x0;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v0 <= 1'b0;
    else        v0 <= in_valid;
  end
  always_ff @(posedge clk) if (in_valid) x0 <= in_data;

  // ---------------- p1: syndromes ----------------
  logic [M-1:0] syn_c [2*T];
  logic [M-1:0] syn_q [2*T];
  logic         err_c;

  bch_syndrome #(.M(M), .T(T), .POLY(POLY)) u_syn (.r(x0), .syn(syn_c));

  always_comb begin
    err_c = 1'b0;
    for (int i = 0; i < int'(2 * T); i++) err_c |= (syn_c[i] != '0);
  end

  // valid / error flag per stage: index s is the register stage p(s)
  logic [T+2:1] vld;
  logic [T+2:1] err;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      err <= '0;
    end else begin
      vld[1] <= v0;
      err[1] <= v0 & err_c;
      for (int s = 2; s <= int'(T) + 2; s++) begin
        vld[s] <= vld[s-1];
        err[s] <= err[s-1];
      end
    end
  end

  always_ff @(posedge clk) if (v0 && err_c) syn_q <= syn_c;

  // ---------------- p2..pT: riBM first and middle cores ----------------
  // Stage s (1..T-1) holds the riBM state after s iterations.
  logic [M-1:0] lam_c   [1:NS][T+1];
  logic [M-1:0] xb_c    [1:NS][T+1];
  logic [M-1:0] dl_c    [1:NS][2*T];
  logic [M-1:0] th_c    [1:NS][2*T];
  logic [M-1:0] g_c     [1:NS];
  kval_t        k_c     [1:NS];
  logic [M-1:0] lam_q   [1:NS][T+1];
  logic [M-1:0] xb_q    [1:NS][T+1];
  logic [M-1:0] dl_q    [1:NS][2*T];
  logic [M-1:0] th_q    [1:NS][2*T];
  logic [M-1:0] g_q     [1:NS];
  kval_t        k_q     [1:NS];

  ribm_first #(.M(M), .T(T), .POLY(POLY)) u_first (
    .syn  (syn_q),
    .lam  (lam_c[1]),
    .xb   (xb_c[1]),
    .delta(dl_c[1]),
    .theta(th_c[1]),
    .gamma(g_c[1]),
    .k    (k_c[1])
  );

  for (genvar s = 2; s <= int'(NS); s++) begin : g_mid
    ribm_mid #(.M(M), .T(T), .POLY(POLY)) u_mid (
      .lam      (lam_q[s-1]),
      .xb       (xb_q[s-1]),
      .delta    (dl_q[s-1]),
      .theta    (th_q[s-1]),
      .gamma    (g_q[s-1]),
      .k        (k_q[s-1]),
      .lam_nxt  (lam_c[s]),
      .xb_nxt   (xb_c[s]),
      .delta_nxt(dl_c[s]),
      .theta_nxt(th_c[s]),
      .gamma_nxt(g_c[s]),
      .k_nxt    (k_c[s])
    );
  end

  // Stage s register loads what core s produced from stage p(s), whose
  // flags are vld[s]/err[s]; error-free words leave it untouched.
  always_ff @(posedge clk) begin
    for (int s = 1; s <= int'(NS); s++) begin
      if (vld[s] && err[s]) begin
        lam_q[s] <= lam_c[s];
        xb_q[s]  <= xb_c[s];
        dl_q[s]  <= dl_c[s];
        th_q[s]  <= th_c[s];
        g_q[s]   <= g_c[s];
        k_q[s]   <= k_c[s];
      end
    end
  end

  // ---------------- pT+1: riBM last core, codeword from the FIFO --------
  logic [M-1:0] xb_hi  [T-1];
  logic [M-1:0] lamf_c [T+1];
  logic [M-1:0] lamf_q [T+1];
  for (genvar j = 0; j < int'(T) - 1; j++) begin : g_xbhi
    assign xb_hi[j] = xb_q[NS][j+2];
  end

  ribm_last #(.M(M), .T(T), .POLY(POLY)) u_last (
    .lam    (lam_q[NS]),
    .xb_hi  (xb_hi),
    .gamma  (g_q[NS]),
    .delta1 (dl_q[NS][1]),
    .lam_out(lamf_c)
  );

  // k after the last iteration, and from it the locator length L.
  kval_t        k_fin;
  kval_t        len_c;
  logic [M:0]   len_q;
  always_comb begin
    if (dl_q[NS][1] != '0 && k_q[NS] >= -1) k_fin = -k_q[NS] - kval_t'(2);
    else                                     k_fin = k_q[NS] + kval_t'(2);
    len_c = (kval_t'(2 * T - 1) - k_fin) >>> 1;
  end

  always_ff @(posedge clk) begin
    if (vld[T] && err[T]) begin
      lamf_q <= lamf_c;
      len_q  <= (M + 1)'(len_c);
    end
  end

  logic         fifo_v;
  logic [N-1:0] fifo_d;
  logic [N-1:0] cw_q;

  delay_fifo #(.WIDTH(N), .DEPTH(T)) u_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v0),
    .in_data  (x0),
    .out_valid(fifo_v),
    .out_data (fifo_d)
  );

  always_ff @(posedge clk) if (fifo_v) cw_q <= fifo_d;

  // ---------------- pT+2: Chien search, bypass MUX, output ----------------
  logic [N-1:0] dc_c;
  logic [N-1:0] corr_c;

  chien_search #(.M(M), .T(T), .POLY(POLY)) u_chien (
    .lam (lamf_q),
    .cw  (cw_q),
    .dc  (dc_c),
    .corr(corr_c)
  );

  // Failure detection: the riBM register length after the last iteration,
  // L = (2t-1-k)/2 with k the final k, is the number of errors the locator
  // describes. A correctable word has exactly L distinct roots among the n
  // nonzero field elements; any other word has more than t errors and is
  // marked and passed on unchanged, so that decoding adds no errors.
  logic [M:0] nroot_c;
  logic       fail_c;
  always_comb begin
    nroot_c = '0;
    for (int p = 0; p < int'(N); p++) nroot_c += (M + 1)'(corr_c[p]);
    fail_c = err[T+1] && (nroot_c != len_q);
  end

  always_ff @(posedge clk) begin
    if (vld[T+1]) out_data <= (err[T+1] && !fail_c) ? dc_c : cw_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_fail <= 1'b0;
    else        out_fail <= fail_c;
  end

  assign out_valid = vld[T+2];
  assign out_err   = err[T+2];

  // The FIFO and the flag pipeline must stay aligned.
  a_fifo_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                   fifo_v == vld[T]);
  a_err_valid:    assert property (@(posedge clk) disable iff (!rst_n)
                                   out_err |-> out_valid);
  a_fail_err:     assert property (@(posedge clk) disable iff (!rst_n)
                                   out_fail |-> out_err);

endmodule
