// tb_mo_inverter -- self-checking testbench for the pipelined inversion
// circuit.
//
// Three configurations, m = 4 (x^4+x^3+1), m = 5 (x^5+x^4+x^2+x+1) and
// m = 8 (x^8+x^7+x^2+x+1), each fed
// a back-to-back stream of elements: every field element once (including 0
// and 1) followed by random ones.  ld1 is high in clock m and ld2 in clock
// m-1 of each period.  Every output bit is compared, in the exact clock it
// is due (first bit 2m-1 clocks after the first input bit), with the inverse
// found by search in tb_gf_ref_pkg; for each nonzero element the product of
// element and reported inverse is also checked to be 1.
module tb_mo_inverter;
  import tb_gf_ref_pkg::*;

  localparam int NCFG = 3;
  localparam int NR   = 40;   // random elements after the exhaustive sweep

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  always #5 clk = ~clk;

  int cfg_checks   [NCFG];
  int cfg_failures [NCFG];
  bit cfg_done     [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned     MM  = (g == 2) ? 8 : (g == 1) ? 5 : 4;
    localparam longint unsigned PP  = (g == 2) ? 'h187 : (g == 1) ? 'b110111 : 'b11001;
    localparam int              NE  = (1 << MM) + NR;
    localparam int              LAT = 2 * int'(MM) - 1;

    logic        ld1, ld2, ai, dout;
    int unsigned pos;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) pos <= 0;
      else        pos <= (pos + 1) % MM;

    assign ld1 = (pos == MM - 1);
    assign ld2 = (pos == MM - 2);

    mo_inverter #(.M(MM), .POLY(65'(PP))) dut (
      .clk(clk), .rst_n(rst_n), .ld1(ld1), .ld2(ld2),
      .alpha_in(ai), .inv_out(dout));

    initial begin : run
      int unsigned a [NE], inv [NE], got [NE];
      int unsigned mask;
      mask = (1 << MM) - 1;
      cfg_checks[g] = 0;
      cfg_failures[g] = 0;
      cfg_done[g] = 1'b0;
      ai = 1'b0;
      foreach (a[e]) a[e] = (e < (1 << MM)) ? e : ($urandom & mask);
      foreach (inv[e]) begin
        inv[e] = ref_nb_inv(a[e], PP, MM);
        got[e] = 0;
      end
      @(posedge rst_n);
      for (int t = 0; t < NE * int'(MM) + LAT; t++) begin
        int e, s;
        e = t / int'(MM);
        s = t % int'(MM);
        ai = (e < NE) ? a[e][MM-1-s] : 1'b0;
        #1;
        if (t >= LAT) begin
          int eo, so;
          eo = (t - LAT) / int'(MM);
          so = (t - LAT) % int'(MM);
          got[eo][MM-1-so] = dout;
          cfg_checks[g]++;
          if (dout !== inv[eo][MM-1-so]) begin
            cfg_failures[g]++;
            if (cfg_failures[g] < 6)
              $display("FAIL cfg %0d element %0h bit %0d: got %0b expected %0b",
                       g, a[eo], MM - 1 - so, dout, inv[eo][MM-1-so]);
          end
        end
        @(negedge clk);
      end
      foreach (a[e])
        if (a[e] != 0) begin
          cfg_checks[g]++;
          if (ref_nb_mul(a[e], got[e], PP, MM) != mask) cfg_failures[g]++;
        end
      cfg_done[g] = 1'b1;
    end
  end

  function automatic int total(input int v [NCFG]);
    int s;
    s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin : watchdog
    repeat (((1 << 8) + NR) * 8 + 200) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(cfg_checks), total(cfg_failures) + 1);
    $finish;
  end

  initial begin : main
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (cfg_done[0] && cfg_done[1] && cfg_done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", total(cfg_checks), total(cfg_failures));
    $finish;
  end

endmodule
