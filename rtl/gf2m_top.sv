// gf2m_top -- serial GF(2^m) multiplier and inverter in a normal basis.
//
// Two independent bit-serial pipelines share one clock and one control
// generator:
//   * mo_seq_multiplier: delta = beta * gamma.  beta_in and gamma_in each
//     carry one operand per m clocks, highest index first; delta_out carries
//     the product m clocks later in the same format.
//   * mo_inverter: alpha^-1.  alpha_in carries one element per m clocks;
//     inv_out carries its inverse 2m-1 clocks after its first bit.
// Elements are in the normal basis {alpha, alpha^2, ..., alpha^(2^(m-1))}
// of GF(2^m) defined by POLY (default m = 4, x^4 + x^3 + 1).
//
// Framing: ld1 is high in the last clock of every m-clock period; the bit
// with index 0 of an input element must be presented in that clock, and
// the first output bit of the multiplier appears in the clock after it.
// ld2 (high one clock earlier) is the inverter's output-load strobe.  Both
// are brought out so that a user can align the serial streams.  Sharing one
// generator between the two pipelines is this design's choice; their
// control waveforms are identical.
module gf2m_top
  import gf2m_nb_pkg::*;
#(
  parameter int unsigned    M    = DEFAULT_M,
  parameter logic [MAX_M:0] POLY = DEFAULT_POLY
) (
  input  logic clk,
  input  logic rst_n,
  input  logic beta_in,
  input  logic gamma_in,
  output logic delta_out,
  input  logic alpha_in,
  output logic inv_out,
  output logic ld1,
  output logic ld2
);

  mo_ld_gen #(.M(M)) u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .ld1   (ld1),
    .ld2   (ld2)
  );

  mo_seq_multiplier #(.M(M), .POLY(POLY), .XOR_PIPE(1'b0)) u_mul (
    .clk       (clk),
    .rst_n     (rst_n),
    .ld        (ld1),
    .beta_in   (beta_in),
    .gamma_in  (gamma_in),
    .delta_out (delta_out)
  );

  mo_inverter #(.M(M), .POLY(POLY)) u_inv (
    .clk      (clk),
    .rst_n    (rst_n),
    .ld1      (ld1),
    .ld2      (ld2),
    .alpha_in (alpha_in),
    .inv_out  (inv_out)
  );

endmodule
