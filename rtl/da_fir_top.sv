// da_fir_top: pipelined programmable FIR filter in multi-bit distributed-arithmetic
// (DA) form, y_n = sum_{i<N} c_i * x_{n-i}.
//
// Each WX-bit input sample is cut into D = ceil(WX/P) digits of P bits, which travel
// one per cycle, most significant first, down a chain of N taps. Tap i ANDs its
// coefficient c_i with the bits of the digit it sees and adds the partial products to
// the carry-save pair coming from tap i+1 with a (P+2,2) compressor ((4,2) for P = 2),
// then registers the pair. The partial sums flow from tap N-1 towards tap 0, opposite
// to the digits, so the digit stream is delayed by D-1 cycles between neighbouring
// taps (plus the one register of the sum path, that is one sample period). The pair
// leaving tap 0 is the digit sum S_j = sum_i c_i * d_{n-i,j}; a vector merging adder
// turns it into a binary word and the final accumulator forms
// y_n = sum_j S_j * 2**(P*(D-1-j)).
//
// Structure and rate follow the document: bit-parallel input, P bits at a time, AND
// gates and compressors instead of Booth coding, one pipeline register pair per tap
// adder, D-1 digit delays per tap, one output every D cycles. Tap count, coefficient
// width, signed coefficients, the coefficient write port, reset and flag timing are
// this design's choices. Input samples are unsigned integers; coefficients are
// two's complement; y is the full-precision signed result.
//
// Interface and timing:
//   x_ready   high one cycle in D; x_in is sampled at the end of that cycle
//             (the first one right after reset). There is no back-pressure.
//   coef_we   writes coef_wdata to coefficient coef_addr at the clock edge; the new
//             value is used from the next cycle on by that tap.
//   y_valid   pulses once per sample period. y_out/y_valid are updated D+2 clock
//             edges after the edge that took x_n: the last digit of x_n reaches the
//             tap-0 register D edges after it was taken, then one edge each for the
//             merging adder and the accumulator. Since the sum path runs against
//             the digits, this latency does not depend on the number of taps.
module da_fir_top
  import da_fir_pkg::*;
#(
  parameter int unsigned N_TAPS = DEF_N_TAPS,
  parameter int unsigned WX     = DEF_WX,
  parameter int unsigned WC     = DEF_WC,
  parameter int unsigned P      = DEF_P,
  localparam int unsigned D     = num_digits(WX, P),
  localparam int unsigned LOGN  = (N_TAPS > 1) ? $clog2(N_TAPS) : 0,
  localparam int unsigned WS    = WC + P + LOGN,      // tap-chain word length
  localparam int unsigned WY    = WC + D * P + LOGN,  // output word length
  localparam int unsigned AW    = (N_TAPS > 1) ? $clog2(N_TAPS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // coefficient programming
  input  logic                 coef_we,
  input  logic [AW-1:0]        coef_addr,
  input  logic signed [WC-1:0] coef_wdata,
  // sample input
  input  logic [WX-1:0]        x_in,
  output logic                 x_ready,
  // filter output
  output logic signed [WY-1:0] y_out,
  output logic                 y_valid
);

  // ---------------------------------------------------------------- coefficients
  logic signed [WC-1:0] coef [N_TAPS];

  coef_bank #(.N(N_TAPS), .WC(WC), .AW(AW)) u_coef (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (coef_we),
    .addr (coef_addr),
    .wdata(coef_wdata),
    .coef (coef)
  );

  // ---------------------------------------------------------------- preprocessing
  logic [P-1:0] digit;
  logic         dig_first, dig_last, dig_valid;

  digit_serializer #(.WX(WX), .P(P)) u_pre (
    .clk        (clk),
    .rst_n      (rst_n),
    .x_in       (x_in),
    .x_ready    (x_ready),
    .digit      (digit),
    .digit_first(dig_first),
    .digit_last (dig_last),
    .digit_valid(dig_valid)
  );

  // ---------------------------------------------------------------- digit delays
  logic [P-1:0] tap_digit [N_TAPS];
  assign tap_digit[0] = digit;

  for (genvar i = 1; i < N_TAPS; i++) begin : g_delay
    digit_delay_line #(.P(P), .L(D - 1)) u_dl (
      .clk  (clk),
      .rst_n(rst_n),
      .din  (tap_digit[i-1]),
      .dout (tap_digit[i])
    );
  end

  // ---------------------------------------------------------------- tap adders
  // sum_v[i]/car_v[i] is the registered carry-save pair leaving tap i;
  // index N_TAPS is the all-zero pair entering the last tap.
  logic [WS-1:0] sum_v [N_TAPS+1];
  logic [WS-1:0] car_v [N_TAPS+1];
  assign sum_v[N_TAPS] = '0;
  assign car_v[N_TAPS] = '0;

  for (genvar i = 0; i < N_TAPS; i++) begin : g_tap
    da_tap #(.WC(WC), .P(P), .W(WS)) u_tap (
      .clk  (clk),
      .rst_n(rst_n),
      .coef (coef[i]),
      .digit(tap_digit[i]),
      .s_in (sum_v[i+1]),
      .c_in (car_v[i+1]),
      .s_out(sum_v[i]),
      .c_out(car_v[i])
    );
  end

  // ---------------------------------------------------------------- final VMA
  logic signed [WS-1:0] digit_sum;

  vector_merge_adder #(.W(WS)) u_vma (
    .clk  (clk),
    .rst_n(rst_n),
    .s_in (sum_v[0]),
    .c_in (car_v[0]),
    .q    (digit_sum)
  );

  // Digit flags follow the digit through the tap-0 register and the VMA register.
  typedef struct packed {
    logic valid;
    logic first;
    logic last;
  } digit_tag_t;

  digit_tag_t tag_q [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_q[0] <= '0;
      tag_q[1] <= '0;
    end else begin
      tag_q[0] <= '{valid: dig_valid, first: dig_first, last: dig_last};
      tag_q[1] <= tag_q[0];
    end
  end

  // ---------------------------------------------------------------- accumulator
  da_accumulator #(.WS(WS), .P(P), .WY(WY)) u_acc (
    .clk     (clk),
    .rst_n   (rst_n),
    .s       (digit_sum),
    .in_valid(tag_q[1].valid),
    .first   (tag_q[1].first),
    .last    (tag_q[1].last),
    .y       (y_out),
    .y_valid (y_valid)
  );

  // One result per sample period: two results are never closer than D cycles.
  if (D > 1) begin : g_rate_check
    assert property (@(posedge clk) y_valid |=> !y_valid)
      else $error("y_valid asserted on consecutive cycles");
  end

endmodule
