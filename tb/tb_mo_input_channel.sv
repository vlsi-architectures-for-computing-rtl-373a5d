// tb_mo_input_channel -- self-checking testbench for the serial input path.
//
// A stream of random GF(2^4) elements enters one bit per clock, highest
// index first, with ld high in the last clock of every 4-clock period.  Two
// channels see the same stream: LOAD_ROT = 0 must hold the complement of
// the element just after ld, LOAD_ROT = 1 the complement of its square
// (one-place rotation).  In the following clocks both registers must hold
// the complements of successive squares (reference arithmetic).
module tb_mo_input_channel;
  import tb_gf_ref_pkg::*;

  localparam int unsigned     M  = 4;
  localparam longint unsigned P4 = 'b11001;
  localparam int              NE = 60;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic         ld, din;
  logic [M-1:0] r0_n, r1_n;
  int unsigned  pos;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pos <= 0;
    else        pos <= (pos + 1) % M;

  assign ld = (pos == M - 1);

  mo_input_channel #(.M(M), .LOAD_ROT(1'b0)) u0 (.clk(clk), .rst_n(rst_n), .ld(ld), .din(din), .r_n(r0_n));
  mo_input_channel #(.M(M), .LOAD_ROT(1'b1)) u1 (.clk(clk), .rst_n(rst_n), .ld(ld), .din(din), .r_n(r1_n));

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (NE * M + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int unsigned x [NE];
    int unsigned s0, s1;
    din = 1'b0;
    foreach (x[e]) x[e] = $urandom_range(15);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < (NE + 1) * M; t++) begin
      int e, s;
      e = t / M;
      s = t % M;
      din = (e < NE) ? x[e][M-1-s] : 1'b0;
      // element e-1 was loaded at the end of its last clock; after s clocks
      // of rotation R holds its 2^s-th power (times the initial square for
      // LOAD_ROT = 1)
      if (e >= 1) begin
        if (s == 0) begin
          s0 = x[e-1];
          s1 = ref_nb_mul(x[e-1], x[e-1], P4, M);
        end else begin
          s0 = ref_nb_mul(s0, s0, P4, M);
          s1 = ref_nb_mul(s1, s1, P4, M);
        end
        check(int'(M'(~r0_n)), int'(s0), $sformatf("plain e=%0d s=%0d", e - 1, s));
        check(int'(M'(~r1_n)), int'(s1), $sformatf("squared e=%0d s=%0d", e - 1, s));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
