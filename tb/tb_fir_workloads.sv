// tb_fir_workloads: the filter at the sizes used in the design's area comparisons,
// each run through the four-phase scoreboard test (random, most negative, most
// positive, random again):
//   0: 2 bits at a time, 12-bit samples and coefficients, 4 taps
//   1: 2 bits at a time, 24-bit samples and coefficients, 32 taps
//   2: 3 bits at a time, 12-bit samples and coefficients, 16 taps
//   3: 4 bits at a time, 24-bit samples and coefficients, 32 taps
//   4: fully bit-parallel input (10 bits at a time), 10-bit samples and
//      coefficients, 8 taps: one result per cycle
module tb_fir_workloads;

  localparam int NCFG = 5;

  logic done   [NCFG];
  int   checks [NCFG];
  int   fails  [NCFG];
  int   reprog [NCFG];
  int   nmin   [NCFG];
  int   nmax   [NCFG];

  fir_config_run #(.N(4),  .WX(12), .WC(12), .P(2))  r0 (done[0], checks[0], fails[0], reprog[0], nmin[0], nmax[0]);
  fir_config_run #(.N(32), .WX(24), .WC(24), .P(2))  r1 (done[1], checks[1], fails[1], reprog[1], nmin[1], nmax[1]);
  fir_config_run #(.N(16), .WX(12), .WC(12), .P(3))  r2 (done[2], checks[2], fails[2], reprog[2], nmin[2], nmax[2]);
  fir_config_run #(.N(32), .WX(24), .WC(24), .P(4))  r3 (done[3], checks[3], fails[3], reprog[3], nmin[3], nmax[3]);
  fir_config_run #(.N(8),  .WX(10), .WC(10), .P(10)) r4 (done[4], checks[4], fails[4], reprog[4], nmin[4], nmax[4]);

  int total_checks;
  int total_fails;

  initial begin
    bit all_done;
    all_done = 1'b0;
    while (!all_done) begin
      #10;
      all_done = 1'b1;
      for (int i = 0; i < NCFG; i++) all_done &= done[i];
    end
    total_checks = 0;
    total_fails  = 0;
    for (int i = 0; i < NCFG; i++) begin
      $display("  config %0d: checks=%0d failures=%0d reprogrammed=%0d min=%0d max=%0d",
               i, checks[i], fails[i], reprog[i], nmin[i], nmax[i]);
      total_checks += checks[i] + 2;
      total_fails  += fails[i];
      if (nmin[i] == 0) total_fails++;
      if (nmax[i] == 0) total_fails++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_fails);
    $finish;
  end

  initial begin
    #2000000;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

endmodule
