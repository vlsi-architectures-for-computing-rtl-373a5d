// tb_mo_ld_gen -- self-checking testbench for the control signal generator.
//
// For m = 4 and m = 5, checks over many periods that ld1 is high exactly in
// clock m and ld2 exactly in clock m-1 of each m-clock period, counting
// clocks from the release of reset (clock 1).
module tb_mo_ld_gen;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic ld1_4, ld2_4, ld1_5, ld2_5;

  mo_ld_gen #(.M(4)) u4 (.clk(clk), .rst_n(rst_n), .ld1(ld1_4), .ld2(ld2_4));
  mo_ld_gen #(.M(5)) u5 (.clk(clk), .rst_n(rst_n), .ld1(ld1_5), .ld2(ld2_5));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      // clock number within the period is (t mod m) + 1
      check(ld1_4, (t % 4) == 3, $sformatf("ld1 m4 t=%0d", t));
      check(ld2_4, (t % 4) == 2, $sformatf("ld2 m4 t=%0d", t));
      check(ld1_5, (t % 5) == 4, $sformatf("ld1 m5 t=%0d", t));
      check(ld2_5, (t % 5) == 3, $sformatf("ld2 m5 t=%0d", t));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
