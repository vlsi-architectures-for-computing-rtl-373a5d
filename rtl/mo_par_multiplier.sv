// mo_par_multiplier -- parallel-type Massey-Omura multiplier over GF(2^m).
//
// Computes delta = beta * gamma in a normal basis with m identical copies of
// the product function f.  Because squaring is a rotation, product
// component d_j equals f applied to beta and gamma rotated so that operand
// position i carries b_{(i+j+1) mod m} and c_{(i+j+1) mod m}; copy m-1 sees
// the operands unrotated.  For m = 4 this is the wiring of the classic
// four-copy array: d0 <- (b1 b2 b3 b0), d1 <- (b2 b3 b0 b1),
// d2 <- (b3 b0 b1 b2), d3 <- (b0 b1 b2 b3).
//
// Interface: the operands arrive complemented (b_n = beta-bar, c_n =
// gamma-bar), the polarity held in the operand registers of the pipelined
// circuits; the product d is in true polarity.  Purely combinational: the
// whole product is available in the same clock as its operands.
module mo_par_multiplier
  import gf2m_nb_pkg::*;
#(
  parameter int unsigned    M    = DEFAULT_M,
  parameter logic [MAX_M:0] POLY = DEFAULT_POLY
) (
  input  logic [M-1:0] b_n,
  input  logic [M-1:0] c_n,
  output logic [M-1:0] d
);

  for (genvar j = 0; j < M; j++) begin : g_f
    logic [M-1:0] bj_n, cj_n;

    for (genvar i = 0; i < M; i++) begin : g_rot
      assign bj_n[i] = b_n[(i + j + 1) % M];
      assign cj_n[i] = c_n[(i + j + 1) % M];
    end

    mo_product_f #(
      .M        (M),
      .POLY     (POLY),
      .XOR_PIPE (1'b0)
    ) u_f (
      .clk   (1'b0),
      .rst_n (1'b1),
      .b_n   (bj_n),
      .c_n   (cj_n),
      .f     (d[j])
    );
  end

endmodule
