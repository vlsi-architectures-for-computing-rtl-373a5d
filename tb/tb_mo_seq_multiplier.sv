// tb_mo_seq_multiplier -- self-checking testbench for the pipelined
// sequential-type Massey-Omura multiplier.
//
// Three configurations run side by side, each fed a back-to-back stream of
// operand pairs (random, plus 0, 1 and a*1 cases), bits highest index
// first, ld high in the last clock of each m-clock period:
//   g_cfg[0]  m = 4, x^4+x^3+1, combinational f:      latency 4 clocks
//   g_cfg[1]  m = 4, x^4+x^3+1, registered XOR levels: latency 4 + 4 clocks
//   g_cfg[2]  m = 5, x^5+x^4+x^2+x+1, combinational f: latency 5 clocks
//   g_cfg[3]  m = 8, x^8+x^7+x^2+x+1, registered XOR levels (29 terms,
//             5 levels): latency 8 + 5 clocks
// Every output bit is compared, in the exact clock it is due, with the
// reference product; the fixed latency (first output bit exactly LAT clocks
// after the first input bit) and the throughput of one product per m clocks
// therefore are checked for every pair.
module tb_mo_seq_multiplier;
  import tb_gf_ref_pkg::*;

  localparam int NE   = 64;
  localparam int NCFG = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  always #5 clk = ~clk;

  int cfg_checks   [NCFG];
  int cfg_failures [NCFG];
  bit cfg_done     [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned     MM  = (g == 3) ? 8 : (g == 2) ? 5 : 4;
    localparam longint unsigned PP  = (g == 3) ? 'h187 : (g == 2) ? 'b110111 : 'b11001;
    localparam bit              XP  = (g == 1) || (g == 3);
    // XOR levels: 9 terms -> 4 levels (m = 4); 29 terms -> 5 levels (m = 8)
    localparam int              KK  = (MM == 8) ? 5 : 4;
    localparam int              LAT = int'(MM) + (XP ? KK : 0);

    logic        ld, bi, gi, dout;
    int unsigned pos;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) pos <= 0;
      else        pos <= (pos + 1) % MM;

    assign ld = (pos == MM - 1);

    mo_seq_multiplier #(.M(MM), .POLY(65'(PP)), .XOR_PIPE(XP)) dut (
      .clk(clk), .rst_n(rst_n), .ld(ld),
      .beta_in(bi), .gamma_in(gi), .delta_out(dout));

    initial begin : run
      int unsigned a [NE], b [NE], p [NE];
      int unsigned mask;
      mask = (1 << MM) - 1;
      cfg_checks[g] = 0;
      cfg_failures[g] = 0;
      cfg_done[g] = 1'b0;
      bi = 1'b0;
      gi = 1'b0;
      foreach (a[e]) begin
        a[e] = $urandom & mask;
        b[e] = $urandom & mask;
      end
      a[0] = 0;    b[1] = mask;   // 0 * x, x * 1
      a[2] = mask; b[2] = mask;   // 1 * 1
      a[3] = 0;    b[3] = 0;
      foreach (p[e]) p[e] = ref_nb_mul(a[e], b[e], PP, MM);
      @(posedge rst_n);
      for (int t = 0; t < NE * int'(MM) + LAT; t++) begin
        int e, s;
        e = t / int'(MM);
        s = t % int'(MM);
        bi = (e < NE) ? a[e][MM-1-s] : 1'b0;
        gi = (e < NE) ? b[e][MM-1-s] : 1'b0;
        #1;
        if (t >= LAT) begin
          int eo, so;
          eo = (t - LAT) / int'(MM);
          so = (t - LAT) % int'(MM);
          cfg_checks[g]++;
          if (dout !== p[eo][MM-1-so]) begin
            cfg_failures[g]++;
            if (cfg_failures[g] < 6)
              $display("FAIL cfg %0d pair %0d bit %0d: got %0b expected %0b (a=%0h b=%0h)",
                       g, eo, MM - 1 - so, dout, p[eo][MM-1-so], a[eo], b[eo]);
          end
        end
        @(negedge clk);
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
    repeat (NE * 8 + 200) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(cfg_checks), total(cfg_failures) + 1);
    $finish;
  end

  initial begin : main
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (cfg_done[0] && cfg_done[1] && cfg_done[2] && cfg_done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", total(cfg_checks), total(cfg_failures));
    $finish;
  end

endmodule
