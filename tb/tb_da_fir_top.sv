// tb_da_fir_top: end-to-end test of the filter at its default configuration
// (8 taps, 8-bit samples, 8-bit coefficients, 2 bits at a time).
//
// fir_scoreboard drives the filter and checks every result against a direct-form
// reference, plus the D+2 latency that gives one result every D = 4 cycles. The
// test also requires that each mechanism happened: coefficient reprogramming while
// running, negative results, and the most negative and most positive full-precision
// results.
module tb_da_fir_top;
  import da_fir_pkg::*;

  localparam int unsigned N  = DEF_N_TAPS;
  localparam int unsigned WX = DEF_WX;
  localparam int unsigned WC = DEF_WC;
  localparam int unsigned P  = DEF_P;
  localparam int unsigned D  = (WX + P - 1) / P;
  localparam int unsigned WY = WC + D * P + ((N > 1) ? $clog2(N) : 0);
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 coef_we;
  logic [AW-1:0]        coef_addr;
  logic signed [WC-1:0] coef_wdata;
  logic [WX-1:0]        x_in;
  logic                 x_ready;
  logic signed [WY-1:0] y_out;
  logic                 y_valid;
  logic                 done;
  int checks, failures, n_reprog, n_neg, n_min, n_max, skipped;
  int extra_fail = 0;
  int extra_checks = 0;

  always #5 clk = ~clk;

  da_fir_top dut (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_wdata, .x_in, .x_ready, .y_out, .y_valid
  );

  fir_scoreboard #(.N(N), .WX(WX), .WC(WC), .P(P), .NRAND(60)) sb (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_wdata, .x_in, .x_ready, .y_out, .y_valid,
    .done, .checks, .failures, .n_reprog, .n_neg, .n_min, .n_max, .skipped
  );

  task automatic need(string what, int count);
    extra_checks++;
    if (count == 0) begin
      extra_fail++;
      $display("ERROR: mechanism never exercised: %s", what);
    end else begin
      $display("  %-32s %0d", what, count);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done);
    need("coefficient reprogramming", n_reprog);
    need("negative results", n_neg);
    need("most negative result", n_min);
    need("most positive result", n_max);
    need("results compared", checks);
    $display("  results skipped during reprogramming: %0d", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_fail);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_fail + 1);
    $finish;
  end

endmodule
