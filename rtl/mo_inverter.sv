// mo_inverter -- pipelined inversion circuit for GF(2^m) in a normal basis.
//
// Since alpha^(2^m) = alpha, alpha^-1 = alpha^(2^m - 2)
//   = alpha^2 * alpha^4 * ... * alpha^(2^(m-1)).
// The circuit evaluates this product with one parallel Massey-Omura
// multiplier used m-1 times in a row:
//   B <- alpha^2, C <- 1;  repeat m-1 times { D = B * C; B <- B^2; C <- D }.
// B is the cyclic shift register R of an input channel wired to load the
// operand already rotated once (alpha^2); its rotation on every clock
// supplies alpha^4, alpha^8, ...  C is an m-bit register holding the
// running product in complemented polarity.
//
// Control (period m, see mo_ld_gen):
//   ld1 high (clock m):   R <- alpha^2 of the operand just received,
//                         C <- all zeros (the complement of 1 = [1,...,1]).
//   ld1, ld2 low:         C <- complement of the product D, R rotates.
//   ld2 high (clock m-1): the m-1 multiplications are done; D = alpha^-1 is
//                         loaded into the output buffer; C holds.
// The output buffer shifts the result out highest index first while the
// next operand is shifted in, so one inverse leaves every m clocks.
//
// Timing: operand bits a_{m-1}..a_0 enter in clocks 1..m of a period; the
// inverse appears on inv_out from clock m of the next period (2m-1 clocks
// after the first input bit) for m clocks, highest index first.  The
// inverse of 0 comes out as 0.  Asynchronous active-low reset to 0.
module mo_inverter
  import gf2m_nb_pkg::*;
#(
  parameter int unsigned    M    = DEFAULT_M,
  parameter logic [MAX_M:0] POLY = DEFAULT_POLY
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ld1,
  input  logic ld2,
  input  logic alpha_in,
  output logic inv_out
);

  logic [M-1:0] b_n;   // R_1..R_m: alpha^(2^k), complemented
  logic [M-1:0] c_n;   // R_{m+1}..R_{2m}: running product, complemented
  logic [M-1:0] d;     // product B * C, true polarity

  mo_input_channel #(.M(M), .LOAD_ROT(1'b1)) u_in (
    .clk   (clk),
    .rst_n (rst_n),
    .ld    (ld1),
    .din   (alpha_in),
    .r_n   (b_n)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    c_n <= '0;
    else if (ld1)  c_n <= '0;
    else if (!ld2) c_n <= ~d;
  end

  mo_par_multiplier #(.M(M), .POLY(POLY)) u_mul (
    .b_n (b_n),
    .c_n (c_n),
    .d   (d)
  );

  // Control rule: Ld1 and Ld2 fall in different clocks of the period.
  a_ld_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(ld1 && ld2))
    else $error("mo_inverter: ld1 and ld2 high together");

  mo_output_buffer #(.M(M)) u_out (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (ld2),
    .d     (d),
    .dout  (inv_out)
  );

endmodule
