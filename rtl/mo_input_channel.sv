// mo_input_channel -- serial input path of the pipelined GF(2^m) circuits.
//
// An operand arrives one bit per clock, highest index first: a_{m-1} in
// clock 1 of a period, ..., a_1 in clock m-1 and a_0 in clock m.  Each bit
// is inverted on entry and, while ld is low, shifted into an (m-1)-stage
// buffer B (B_1 takes the new bit, B_{k+1} takes B_k), so that after clock
// m-1 B_k holds a_k-bar.  In clock m (ld high) the whole operand -- a_0-bar
// straight from the inverter and a_1-bar..a_{m-1}-bar from B -- is copied in
// parallel into the m-stage cyclic shift register R.  On every clock with ld
// low R rotates one place, i.e. squares its element, while B collects the
// next operand; B holds while ld is high.
//
// LOAD_ROT selects how B is wired to R:
//   0  R_k <- a_{k-1}-bar: R holds the operand itself (multiplier).
//   1  R_1 <- a_{m-1}-bar, R_k <- a_{k-2}-bar: R holds the operand already
//      squared once (inversion circuit, which starts from alpha^2).
//
// r_n is R in complemented polarity, bit k-1 = R_k, as consumed by the AND
// plane of the product function.  Asynchronous active-low reset to 0.
module mo_input_channel #(
  parameter int unsigned M        = 4,
  parameter bit          LOAD_ROT = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic         din,
  output logic [M-1:0] r_n
);

  logic         din_n;
  logic [M-1:1] buf_n;     // buf_n[k] is B_k
  logic [M-1:0] word_n;    // operand as it is loaded: bit k = a_k-bar
  logic [M-1:0] load_n;

  assign din_n = ~din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   buf_n <= '0;
    else if (!ld) begin
      buf_n[1] <= din_n;
      for (int k = 2; k < M; k++) buf_n[k] <= buf_n[k-1];
    end
  end

  assign word_n = {buf_n, din_n};

  if (LOAD_ROT) begin : g_square
    assign load_n = {word_n[M-2:0], word_n[M-1]};
  end else begin : g_plain
    assign load_n = word_n;
  end

  nb_cyclic_shift_reg #(.M(M)) u_r (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (ld),
    .rotate (~ld),
    .d      (load_n),
    .q      (r_n)
  );

endmodule
