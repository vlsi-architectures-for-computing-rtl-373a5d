// tb_mo_par_multiplier -- self-checking testbench for the parallel-type
// Massey-Omura multiplier.
//
// All operand pairs are applied for m = 4 (x^4+x^3+1) and m = 5
// (x^5+x^4+x^2+x+1); every product is compared with the reference
// arithmetic of tb_gf_ref_pkg; 2000 random pairs for m = 8
// (x^8+x^7+x^2+x+1).  Also checked: 1 * a = a (1 = all ones) and
// a * a = the rotation of a (squaring is a cyclic shift).
module tb_mo_par_multiplier;
  import tb_gf_ref_pkg::*;

  localparam longint unsigned P4 = 'b11001;
  localparam longint unsigned P5 = 'b110111;
  localparam longint unsigned P8 = 'h187;

  int checks = 0;
  int failures = 0;

  logic [3:0] b4_n, c4_n, d4;
  logic [4:0] b5_n, c5_n, d5;
  logic [7:0] b8_n, c8_n, d8;

  mo_par_multiplier #(.M(4), .POLY(65'(P4))) u4 (.b_n(b4_n), .c_n(c4_n), .d(d4));
  mo_par_multiplier #(.M(5), .POLY(65'(P5))) u5 (.b_n(b5_n), .c_n(c5_n), .d(d5));
  mo_par_multiplier #(.M(8), .POLY(65'(P8))) u8 (.b_n(b8_n), .c_n(c8_n), .d(d8));

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    for (int b = 0; b < 16; b++)
      for (int c = 0; c < 16; c++) begin
        b4_n = ~4'(b);
        c4_n = ~4'(c);
        #1;
        check(int'(d4), int'(ref_nb_mul(b, c, P4, 4)), $sformatf("m4 %0h*%0h", b, c));
        if (b == 15) check(int'(d4), c, $sformatf("m4 1*%0h", c));
        if (b == c)  check(int'(d4), int'({4'(b), 4'(b)} >> 3) & 15, $sformatf("m4 %0h^2", b));
      end

    for (int b = 0; b < 32; b++)
      for (int c = 0; c < 32; c++) begin
        b5_n = ~5'(b);
        c5_n = ~5'(c);
        #1;
        check(int'(d5), int'(ref_nb_mul(b, c, P5, 5)), $sformatf("m5 %0h*%0h", b, c));
        if (b == 31) check(int'(d5), c, $sformatf("m5 1*%0h", c));
      end

    for (int n = 0; n < 2000; n++) begin
      int b, c;
      b = int'($urandom_range(255));
      c = int'($urandom_range(255));
      b8_n = ~8'(b);
      c8_n = ~8'(c);
      #1;
      check(int'(d8), int'(ref_nb_mul(b, c, P8, 8)), $sformatf("m8 %0h*%0h", b, c));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
