// mo_ld_gen -- control signal generator for the pipelined GF(2^m) circuits.
//
// Both pipelined circuits work in periods of m clocks, numbered 1..m.  Ld1
// (the Ld of the multiplier) is high in clock m, when a new operand is moved
// from the input buffers into the cyclic shift registers.  Ld2 is high in
// clock m-1, when the inversion circuit has finished its m-1
// multiplications and its product is moved into the output buffer.
//
// Implementation: a modulo-m counter (this design's choice; only the
// waveforms are prescribed).  After reset the counter is in clock 1.
// Outputs are decoded from the counter register, so they are glitch-free
// and change just after the rising clock edge.  Asynchronous active-low
// reset.
module mo_ld_gen #(
  parameter int unsigned M = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic ld1,
  output logic ld2
);

  localparam int unsigned CW = (M > 2) ? $clog2(M) : 1;

  logic [CW-1:0] cnt;   // clock number within the period, minus one

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 cnt <= '0;
    else if (cnt == CW'(M - 1)) cnt <= '0;
    else                        cnt <= cnt + 1'b1;
  end

  assign ld1 = (cnt == CW'(M - 1));
  assign ld2 = (cnt == CW'(M - 2));

endmodule
