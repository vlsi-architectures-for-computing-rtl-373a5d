// mo_output_buffer -- m-stage parallel-in, serial-out buffer.
//
// Used by the inversion circuit to turn the parallel product into a serial
// stream while the next inversion is under way.  When load (Ld2) is high
// stage k takes d[k]; on every other clock the contents move one stage
// toward the output (stage k+1 takes stage k, stage 0 takes 0).  dout is the
// last stage, so d[m-1] leaves first, then d[m-2], ..., d[0] -- the same
// highest-index-first order in which operands enter.  Asynchronous
// active-low reset to 0.
module mo_output_buffer #(
  parameter int unsigned M = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [M-1:0] d,
  output logic         dout
);

  logic [M-1:0] stage;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    stage <= '0;
    else if (load) stage <= d;
    else           stage <= {stage[M-2:0], 1'b0};
  end

  assign dout = stage[M-1];

endmodule
