// tb_mo_output_buffer -- self-checking testbench for the parallel-in,
// serial-out output buffer.
//
// Loads random 4-bit words every 4 clocks (and, in a second phase, with
// irregular gaps) and checks that the serial output carries d[3], d[2],
// d[1], d[0] in the clocks after each load, followed by zeros.
module tb_mo_output_buffer;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic       load, dout;
  logic [3:0] d;

  mo_output_buffer #(.M(4)) dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .dout(dout));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [3:0] w;
    load = 1'b0; d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(dout, 1'b0, "after reset");
    for (int n = 0; n < 100; n++) begin
      int gap;
      gap = (n < 50) ? 0 : int'($urandom_range(3));
      w = 4'($urandom);
      d = w;
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      d = 4'($urandom);   // ignored while not loading
      for (int s = 0; s < 4; s++) begin
        check(dout, w[3-s], $sformatf("word %0d bit %0d", n, 3 - s));
        if (s < 3 || gap > 0) @(negedge clk);
      end
      for (int g = 1; g < gap; g++) begin
        check(dout, 1'b0, "zero fill");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
