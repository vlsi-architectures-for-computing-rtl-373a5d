// tb_gf2m_top -- end-to-end testbench of the serial GF(2^4) multiplier and
// inverter at the default parameters (m = 4, x^4 + x^3 + 1).
//
// The multiplier is fed all 256 operand pairs back to back; at the same
// time the inverter is fed the 16 field elements over and over.  Framing is
// taken from the design itself: the checker confirms that ld1 is high in
// the last clock and ld2 in the clock before it of every 4-clock period.
// Every output bit is compared in the exact clock it is due (product bits 4
// clocks, inverse bits 7 clocks after the first input bit) with the
// reference arithmetic of tb_gf_ref_pkg.
//
// The mechanisms of the design are counted and each must occur:
//   operand loads (ld1), output-buffer loads (ld2), clocks in which a new
//   operand enters while an earlier result leaves (pipelining without idle
//   clocks), multiplication by 1, multiplication by 0, inversion of 1 and
//   inversion of 0.
module tb_gf2m_top;
  import tb_gf_ref_pkg::*;

  localparam int unsigned     M   = 4;
  localparam longint unsigned P   = 'b11001;
  localparam int              NE  = 256;
  localparam int              LMU = M;          // multiplier latency
  localparam int              LIN = 2 * M - 1;  // inverter latency

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic beta_in, gamma_in, delta_out, alpha_in, inv_out, ld1, ld2;

  gf2m_top dut (
    .clk       (clk),
    .rst_n     (rst_n),
    .beta_in   (beta_in),
    .gamma_in  (gamma_in),
    .delta_out (delta_out),
    .alpha_in  (alpha_in),
    .inv_out   (inv_out),
    .ld1       (ld1),
    .ld2       (ld2)
  );

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0b expected %0b", what, got, exp);
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
    int unsigned b [NE], c [NE], d [NE], a [NE], ainv [NE];
    int n_ld1, n_ld2, n_overlap, n_mul1, n_mul0, n_inv1, n_inv0;
    n_ld1 = 0; n_ld2 = 0; n_overlap = 0; n_mul1 = 0; n_mul0 = 0; n_inv1 = 0; n_inv0 = 0;

    for (int e = 0; e < NE; e++) begin
      b[e]    = e / 16;
      c[e]    = e % 16;
      d[e]    = ref_nb_mul(b[e], c[e], P, M);
      a[e]    = (e * 7) % 16;
      ainv[e] = ref_nb_inv(a[e], P, M);
    end

    beta_in = 1'b0; gamma_in = 1'b0; alpha_in = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < NE * int'(M) + LIN; t++) begin
      int e, s;
      e = t / int'(M);
      s = t % int'(M);
      beta_in  = (e < NE) ? b[e][M-1-s] : 1'b0;
      gamma_in = (e < NE) ? c[e][M-1-s] : 1'b0;
      alpha_in = (e < NE) ? a[e][M-1-s] : 1'b0;
      #1;
      check(ld1, s == int'(M) - 1, "ld1 framing");
      check(ld2, s == int'(M) - 2, "ld2 framing");
      if (ld1) n_ld1++;
      if (ld2 && t >= int'(M)) n_ld2++;
      if (e < NE && t >= LMU) n_overlap++;

      if (t >= LMU && (t - LMU) / int'(M) < NE) begin
        int eo, so;
        eo = (t - LMU) / int'(M);
        so = (t - LMU) % int'(M);
        check(delta_out, d[eo][M-1-so], $sformatf("product %0h*%0h bit %0d", b[eo], c[eo], M - 1 - so));
        if (so == int'(M) - 1) begin
          if (b[eo] == 15 || c[eo] == 15) n_mul1++;
          if (b[eo] == 0 || c[eo] == 0)   n_mul0++;
        end
      end

      if (t >= LIN && (t - LIN) / int'(M) < NE) begin
        int eo, so;
        eo = (t - LIN) / int'(M);
        so = (t - LIN) % int'(M);
        check(inv_out, ainv[eo][M-1-so], $sformatf("inverse of %0h bit %0d", a[eo], M - 1 - so));
        if (so == int'(M) - 1) begin
          if (a[eo] == 15) n_inv1++;
          if (a[eo] == 0)  n_inv0++;
        end
      end
      @(negedge clk);
    end

    $display("mechanisms: ld1=%0d ld2=%0d overlap=%0d mul_by_1=%0d mul_by_0=%0d inv_of_1=%0d inv_of_0=%0d",
             n_ld1, n_ld2, n_overlap, n_mul1, n_mul0, n_inv1, n_inv0);
    checks++; if (n_ld1 == 0)     failures++;
    checks++; if (n_ld2 == 0)     failures++;
    checks++; if (n_overlap == 0) failures++;
    checks++; if (n_mul1 == 0)    failures++;
    checks++; if (n_mul0 == 0)    failures++;
    checks++; if (n_inv1 == 0)    failures++;
    checks++; if (n_inv0 == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
