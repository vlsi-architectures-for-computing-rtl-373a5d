// nb_cyclic_shift_reg -- normal-basis squaring register for GF(2^m).
//
// In a normal basis {alpha, alpha^2, ..., alpha^(2^(m-1))} the square of
// [b0, b1, ..., b_{m-1}] is [b_{m-1}, b0, ..., b_{m-2}], so squaring is a
// one-place cyclic shift.  This register holds one element and squares it
// in place: on a clock edge with rotate = 1 cell k takes cell k-1 and cell 0
// takes cell m-1.  load = 1 overwrites the contents with d (load wins over
// rotate); with neither, the register holds.  The parallel load and the hold
// state are this design's additions so that the ring can serve as the R
// register of the pipelined multiplier and inverter.
//
// The register is polarity-agnostic: rotating a complemented element gives
// the complement of its square.  Asynchronous active-low reset to 0.
module nb_cyclic_shift_reg #(
  parameter int unsigned M = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         rotate,
  input  logic [M-1:0] d,
  output logic [M-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (load)   q <= d;
    else if (rotate) q <= {q[M-2:0], q[M-1]};
  end

endmodule
