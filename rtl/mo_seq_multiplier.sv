// mo_seq_multiplier -- pipelined sequential-type Massey-Omura multiplier
// over GF(2^m) in a normal basis.
//
// Two serial operands beta and gamma enter one bit per clock, highest index
// first, in periods of m clocks.  Each goes through an input channel
// (inverter, (m-1)-stage buffer B, m-stage cyclic shift register R).  In
// the last clock of a period (ld high) both operands move from B into R;
// during the next period R rotates every clock, and because rotation is
// squaring the single product function f, looking at the two R registers,
// yields d_{m-1}, d_{m-2}, ..., d_0 in successive clocks.  Meanwhile B
// collects the next operand pair, so products leave back to back with no
// idle clocks.
//
// Timing: the bits of a pair entering in clocks 1..m of one period produce
// delta_out = d_{m-1} in clock 1 of the next period and d_0 in clock m,
// i.e. m clocks from first bit in to first bit out.  With XOR_PIPE = 1 the
// XOR tree of f is registered per level and every output bit comes
// k = ceil(log2 n(0)) clocks later; XOR_PIPE is this design's option.
// delta_out is combinational from the R registers when XOR_PIPE = 0.
//
// ld must be high in exactly one clock of every m (see mo_ld_gen).
module mo_seq_multiplier
  import gf2m_nb_pkg::*;
#(
  parameter int unsigned    M        = DEFAULT_M,
  parameter logic [MAX_M:0] POLY     = DEFAULT_POLY,
  parameter bit             XOR_PIPE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ld,
  input  logic beta_in,
  input  logic gamma_in,
  output logic delta_out
);

  logic [M-1:0] rb_n, rc_n;

  mo_input_channel #(.M(M), .LOAD_ROT(1'b0)) u_beta (
    .clk   (clk),
    .rst_n (rst_n),
    .ld    (ld),
    .din   (beta_in),
    .r_n   (rb_n)
  );

  mo_input_channel #(.M(M), .LOAD_ROT(1'b0)) u_gamma (
    .clk   (clk),
    .rst_n (rst_n),
    .ld    (ld),
    .din   (gamma_in),
    .r_n   (rc_n)
  );

  mo_product_f #(.M(M), .POLY(POLY), .XOR_PIPE(XOR_PIPE)) u_f (
    .clk   (clk),
    .rst_n (rst_n),
    .b_n   (rb_n),
    .c_n   (rc_n),
    .f     (delta_out)
  );

endmodule
