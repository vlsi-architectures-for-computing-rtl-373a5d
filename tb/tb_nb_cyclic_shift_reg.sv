// tb_nb_cyclic_shift_reg -- self-checking testbench for the normal-basis
// squaring register.
//
// For random elements of GF(2^4) (x^4+x^3+1) and GF(2^5) (x^5+x^4+x^2+x+1):
// load the element, then rotate it m times, checking after each clock that
// the contents equal the square of the previous contents as computed by the
// reference arithmetic, and that m squarings return the element
// (alpha^(2^m) = alpha).  Hold (no load, no rotate), load priority and reset
// are checked as well.
module tb_nb_cyclic_shift_reg;
  import tb_gf_ref_pkg::*;

  localparam longint unsigned P4 = 'b11001;
  localparam longint unsigned P5 = 'b110111;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic       load, rotate;
  logic [3:0] d4, q4;
  logic [4:0] d5, q5;

  nb_cyclic_shift_reg #(.M(4)) u4 (.clk(clk), .rst_n(rst_n), .load(load), .rotate(rotate), .d(d4), .q(q4));
  nb_cyclic_shift_reg #(.M(5)) u5 (.clk(clk), .rst_n(rst_n), .load(load), .rotate(rotate), .d(d5), .q(q5));

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int x4, x5, p4, p5;
    load = 1'b0; rotate = 1'b0; d4 = '0; d5 = '0;
    @(negedge clk);   // first clock edge seen in reset
    check(int'(q4), 0, "reset m4");
    check(int'(q5), 0, "reset m5");
    rst_n = 1'b1;
    for (int n = 0; n < 60; n++) begin
      x4 = int'($urandom_range(15));
      x5 = int'($urandom_range(31));
      d4 = 4'(x4); d5 = 5'(x5);
      load = 1'b1; rotate = (n % 2 == 0);   // load wins over rotate
      @(negedge clk);
      check(int'(q4), x4, "load m4");
      check(int'(q5), x5, "load m5");
      load = 1'b0;
      rotate = 1'b0;
      @(negedge clk);
      check(int'(q4), x4, "hold m4");
      check(int'(q5), x5, "hold m5");
      rotate = 1'b1;
      for (int k = 1; k <= 5; k++) begin
        p4 = int'(q4);
        p5 = int'(q5);
        @(negedge clk);
        if (k <= 4) check(int'(q4), int'(ref_nb_mul(p4, p4, P4, 4)), "square m4");
        check(int'(q5), int'(ref_nb_mul(p5, p5, P5, 5)), "square m5");
        if (k == 4) check(int'(q4), x4, "alpha^(2^4) = alpha");
        if (k == 5) check(int'(q5), x5, "alpha^(2^5) = alpha");
      end
      rotate = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
