// fir_scoreboard: stimulus and reference model for one instance of da_fir_top.
//
// It programs the coefficients, feeds samples whenever the filter takes one, and
// compares every result with y_n = sum_i c_i * x_{n-i} computed here in 64-bit
// integers, together with the latency (D+2 edges from the edge that took x_n) and
// so the rate of one result per D cycles. The run has four phases, each opened by a
// reprogramming of all coefficients while the filter keeps running:
//   1. random coefficients, random samples;
//   2. all coefficients at the most negative value, all-ones samples: the most
//      negative result the output can hold;
//   3. all coefficients at the most positive value, all-ones samples: the largest
//      positive result;
//   4. random coefficients again, random samples.
// Results whose computation overlaps a coefficient write mix old and new
// coefficients by design and are not compared (counted in skipped). done rises
// once every sample taken has produced its result.
module fir_scoreboard #(
  parameter int unsigned N     = 8,
  parameter int unsigned WX    = 8,
  parameter int unsigned WC    = 8,
  parameter int unsigned P     = 2,
  parameter int unsigned NRAND = 40,
  localparam int unsigned D    = (WX + P - 1) / P,
  localparam int unsigned LOGN = (N > 1) ? $clog2(N) : 0,
  localparam int unsigned WY   = WC + D * P + LOGN,
  localparam int unsigned AW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 coef_we,
  output logic [AW-1:0]        coef_addr,
  output logic signed [WC-1:0] coef_wdata,
  output logic [WX-1:0]        x_in,
  input  logic                 x_ready,
  input  logic signed [WY-1:0] y_out,
  input  logic                 y_valid,
  output logic                 done,
  output int                   checks,
  output int                   failures,
  output int                   n_reprog,
  output int                   n_neg,
  output int                   n_min,
  output int                   n_max,
  output int                   skipped
);

  typedef enum logic [1:0] {SAMP_RANDOM, SAMP_ONES} samp_mode_e;

  localparam longint CMIN = -(longint'(1) << (WC - 1));
  localparam longint CMAX = (longint'(1) << (WC - 1)) - 1;
  localparam longint XMAX = (longint'(1) << WX) - 1;

  longint     coef_model [N];
  longint     hist [$];
  longint     load_cyc [$];
  longint     cyc;
  longint     last_write_cyc;
  int         n_out;
  samp_mode_e mode;

  function automatic longint rand_bits(int unsigned w);
    longint v;
    v = {32'($urandom), 32'($urandom)};
    return v & ((longint'(1) << w) - 1);
  endfunction

  function automatic longint rand_coef();
    longint v;
    v = rand_bits(WC);
    if (v > CMAX) v = v - (longint'(1) << WC);   // two's complement value
    return v;
  endfunction

  // Write one coefficient at the next edge.
  task automatic write_coef(int i, longint v);
    @(negedge clk);
    coef_we    = 1'b1;
    coef_addr  = AW'(i);
    coef_wdata = WC'(v);
    @(posedge clk);
    coef_model[i]  = v;
    last_write_cyc = cyc;
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  task automatic wait_loads(int n);
    int target;
    target = hist.size() + n;
    while (hist.size() < target) @(posedge clk);
  endtask

  // Cycle count, sample capture and result checking.
  always @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0;
    end else begin
      cyc <= cyc + 1;
      if (x_ready) begin
        hist.push_back(longint'(x_in));
        load_cyc.push_back(cyc);
      end
      if (y_valid) begin
        longint ref_y;
        int     k;
        k = n_out;
        n_out <= n_out + 1;
        if (k >= load_cyc.size()) begin
          failures++;
          $display("ERROR: result %0d without a sample", k);
        end else begin
          checks++;
          // y_valid was set D+2 edges after the load edge and is seen here one
          // edge later.
          if (cyc - load_cyc[k] != longint'(D + 3)) begin
            failures++;
            $display("ERROR: result %0d latency %0d, expected %0d", k, cyc - load_cyc[k], D + 3);
          end
          if (last_write_cyc + longint'(N) + 2 < load_cyc[k]) begin
            ref_y = 0;
            for (int i = 0; i < N; i++)
              if (k - i >= 0) ref_y += coef_model[i] * hist[k-i];
            checks++;
            if (longint'(y_out) != ref_y) begin
              failures++;
              $display("ERROR: N=%0d WX=%0d WC=%0d P=%0d result %0d = %0d, expected %0d",
                       N, WX, WC, P, k, longint'(y_out), ref_y);
            end
            if (ref_y < 0) n_neg++;
            if (ref_y == CMIN * XMAX * longint'(N)) n_min++;
            if (ref_y == CMAX * XMAX * longint'(N)) n_max++;
          end else begin
            skipped++;
          end
        end
      end
    end
  end

  // Sample source: a new value is presented after every edge.
  always @(negedge clk) begin
    x_in <= (mode == SAMP_ONES) ? WX'(XMAX) : WX'(rand_bits(WX));
  end

  initial begin
    checks = 0; failures = 0; n_reprog = 0; n_neg = 0; n_min = 0; n_max = 0;
    skipped = 0; n_out = 0; done = 1'b0;
    coef_we = 1'b0; coef_addr = '0; coef_wdata = '0;
    last_write_cyc = 0;
    mode = SAMP_RANDOM;
    for (int i = 0; i < N; i++) coef_model[i] = 0;
    @(posedge rst_n);
    // phase 1
    for (int i = 0; i < N; i++) write_coef(i, rand_coef());
    n_reprog++;
    wait_loads(NRAND);
    // phase 2
    for (int i = 0; i < N; i++) write_coef(i, CMIN);
    n_reprog++;
    mode = SAMP_ONES;
    wait_loads(N + (N + 2) / D + 5);
    // phase 3
    for (int i = 0; i < N; i++) write_coef(i, CMAX);
    n_reprog++;
    wait_loads(N + (N + 2) / D + 5);
    // phase 4
    mode = SAMP_RANDOM;
    for (int i = 0; i < N; i++) write_coef(i, rand_coef());
    n_reprog++;
    wait_loads(N + 12);
    // let the last results come out
    begin
      int target;
      target = hist.size();
      while (n_out < target) @(posedge clk);
    end
    done = 1'b1;
  end

endmodule
