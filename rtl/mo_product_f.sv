// mo_product_f -- Massey-Omura product function f for GF(2^m) in a normal
// basis.
//
// f(b; c) = XOR of the terms b_i c_j selected by the normal-basis
// multiplication table; it is the top component d_{m-1} of the product
// beta * gamma.  The circuit follows the two-plane structure of the classic
// nMOS design: an AND plane whose inputs are the complemented operand bits,
// each term formed as NOR(b_i-bar, c_j-bar) = b_i c_j, followed by an XOR
// plane that reduces the n(0) terms pairwise in k = ceil(log2 n(0)) levels,
// n(j+1) = ceil(n(j)/2), an odd signal passing straight to the next level.
// For m = 4, P(x) = x^4 + x^3 + 1 there are nine terms and four levels
// (eight XOR gates).
//
// The term list is computed at elaboration from M and POLY (see
// gf2m_nb_pkg); the terms are wired in row-major (i,j) order.  That list
// and the option below are this design's generalisation of the m = 4
// circuit.
//
// Timing: with XOR_PIPE = 0 (default) f is purely combinational and clk and
// rst_n are unused.  With XOR_PIPE = 1 a register follows every XOR level,
// as suggested for large m, and f appears k clocks after its inputs; the
// registers reset asynchronously to 0.
module mo_product_f
  import gf2m_nb_pkg::*;
#(
  parameter int unsigned    M        = DEFAULT_M,
  parameter logic [MAX_M:0] POLY     = DEFAULT_POLY,
  parameter bit             XOR_PIPE = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] b_n,   // complemented components of beta
  input  logic [M-1:0] c_n,   // complemented components of gamma
  output logic         f
);

  localparam mat_t        LAMBDA = nb_lambda(M, POLY);
  localparam int unsigned NT     = nb_term_count(LAMBDA, M);
  localparam int unsigned K      = xor_levels(NT);

  if (M < 2 || M > MAX_M) begin : g_bad_m
    $error("mo_product_f: M must be in 2..MAX_M");
  end
  if (!nb_is_normal(M, POLY)) begin : g_bad_poly
    $error("mo_product_f: the roots of POLY do not form a normal basis");
  end

  // ---------------- AND plane ----------------
  logic [NT-1:0] term;

  for (genvar i = 0; i < M; i++) begin : g_row
    for (genvar j = 0; j < M; j++) begin : g_col
      if (LAMBDA[i][j]) begin : g_term
        localparam int unsigned T = nb_term_index(LAMBDA, M, i, j);
        assign term[T] = ~(b_n[i] | c_n[j]);
      end
    end
  end

  // ---------------- XOR plane ----------------
  // lvl[0] holds the terms; lvl[j+1] the outputs of XOR level j+1.
  logic [NT-1:0] lvl [K+1];

  assign lvl[0] = term;

  for (genvar j = 0; j < K; j++) begin : g_lvl
    localparam int unsigned NIN  = xor_level_width(NT, j);
    localparam int unsigned NOUT = xor_level_width(NT, j + 1);
    logic [NOUT-1:0] x;

    for (genvar q = 0; q < NOUT; q++) begin : g_gate
      if (2 * q + 1 < NIN) begin : g_xor
        assign x[q] = lvl[j][2*q] ^ lvl[j][2*q+1];
      end else begin : g_pass
        assign x[q] = lvl[j][2*q];
      end
    end

    if (XOR_PIPE) begin : g_reg
      logic [NOUT-1:0] x_q;
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) x_q <= '0;
        else        x_q <= x;
      assign lvl[j+1] = NT'(x_q);
    end else begin : g_comb
      assign lvl[j+1] = NT'(x);
    end
  end

  assign f = lvl[K][0];

endmodule
