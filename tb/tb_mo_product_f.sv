// tb_mo_product_f -- self-checking testbench for the product function f.
//
// Three instances:
//   u4  m = 4, x^4+x^3+1, combinational: all 256 operand pairs checked
//       against the nine-term formula written out by hand and against the
//       top product bit from the reference arithmetic.
//   u5  m = 5, x^5+x^4+x^2+x+1, combinational: all 1024 pairs against the
//       reference arithmetic.
//   u4p m = 4 with a register after each XOR level: a random stream, each
//       result checked exactly ceil(log2 9) = 4 clocks after its operands.
module tb_mo_product_f;
  import tb_gf_ref_pkg::*;

  localparam longint unsigned P4 = 'b11001;
  localparam longint unsigned P5 = 'b110111;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic [3:0] b4_n, c4_n, bp_n, cp_n;
  logic [4:0] b5_n, c5_n;
  logic       f4, f5, fp;

  mo_product_f #(.M(4), .POLY(65'(P4)), .XOR_PIPE(1'b0)) u4 (
    .clk(clk), .rst_n(rst_n), .b_n(b4_n), .c_n(c4_n), .f(f4));
  mo_product_f #(.M(5), .POLY(65'(P5)), .XOR_PIPE(1'b0)) u5 (
    .clk(clk), .rst_n(rst_n), .b_n(b5_n), .c_n(c5_n), .f(f5));
  mo_product_f #(.M(4), .POLY(65'(P4)), .XOR_PIPE(1'b1)) u4p (
    .clk(clk), .rst_n(rst_n), .b_n(bp_n), .c_n(cp_n), .f(fp));

  // f for GF(2^4), x^4 + x^3 + 1, written out term by term.
  function automatic logic f_formula(logic [3:0] b, logic [3:0] c);
    return (b[2] & c[2]) ^ (b[3] & c[2]) ^ (b[2] & c[3]) ^ (b[3] & c[1]) ^
           (b[1] & c[3]) ^ (b[3] & c[0]) ^ (b[0] & c[3]) ^ (b[1] & c[0]) ^
           (b[0] & c[1]);
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [3:0] hist_b [$];
    logic [3:0] hist_c [$];
    b4_n = '0; c4_n = '0; b5_n = '0; c5_n = '0; bp_n = '0; cp_n = '0;

    // exhaustive m = 4
    for (int b = 0; b < 16; b++)
      for (int c = 0; c < 16; c++) begin
        b4_n = ~4'(b);
        c4_n = ~4'(c);
        #1;
        check(f4, f_formula(4'(b), 4'(c)), $sformatf("m4 formula b=%0h c=%0h", b, c));
        check(f4, 1'(ref_nb_mul(b, c, P4, 4) >> 3), $sformatf("m4 ref b=%0h c=%0h", b, c));
      end

    // exhaustive m = 5
    for (int b = 0; b < 32; b++)
      for (int c = 0; c < 32; c++) begin
        b5_n = ~5'(b);
        c5_n = ~5'(c);
        #1;
        check(f5, 1'(ref_nb_mul(b, c, P5, 5) >> 4), $sformatf("m5 b=%0h c=%0h", b, c));
      end

    // pipelined XOR plane: latency 4
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      logic [3:0] b, c;
      b = 4'($urandom);
      c = 4'($urandom);
      bp_n = ~b;
      cp_n = ~c;
      hist_b.push_back(b);
      hist_c.push_back(c);
      #1;
      if (t >= 4) begin
        logic [3:0] ob, oc;
        ob = hist_b.pop_front();
        oc = hist_c.pop_front();
        check(fp, f_formula(ob, oc), $sformatf("pipelined t=%0d", t));
      end
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
