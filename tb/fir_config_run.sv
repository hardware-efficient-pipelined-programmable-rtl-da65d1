// fir_config_run: one da_fir_top at a given configuration, driven and checked by
// fir_scoreboard, with its own free-running clock and reset. Used by the workload
// testbench to run several filter sizes side by side.
module fir_config_run #(
  parameter int unsigned N     = 8,
  parameter int unsigned WX    = 8,
  parameter int unsigned WC    = 8,
  parameter int unsigned P     = 2,
  parameter int unsigned NRAND = 40,
  localparam int unsigned D    = (WX + P - 1) / P,
  localparam int unsigned WY   = WC + D * P + ((N > 1) ? $clog2(N) : 0),
  localparam int unsigned AW   = (N > 1) ? $clog2(N) : 1
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_reprog,
  output int   n_min,
  output int   n_max
);

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 coef_we;
  logic [AW-1:0]        coef_addr;
  logic signed [WC-1:0] coef_wdata;
  logic [WX-1:0]        x_in;
  logic                 x_ready;
  logic signed [WY-1:0] y_out;
  logic                 y_valid;
  int                   n_neg, skipped;

  always #5 clk = ~clk;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
  end

  da_fir_top #(.N_TAPS(N), .WX(WX), .WC(WC), .P(P)) dut (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_wdata, .x_in, .x_ready, .y_out, .y_valid
  );

  fir_scoreboard #(.N(N), .WX(WX), .WC(WC), .P(P), .NRAND(NRAND)) sb (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_wdata, .x_in, .x_ready, .y_out, .y_valid,
    .done, .checks, .failures, .n_reprog, .n_neg, .n_min, .n_max, .skipped
  );

endmodule
