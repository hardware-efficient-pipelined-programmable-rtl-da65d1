// digit_serializer: the preprocessing unit of the filter. It turns bit-parallel input
// samples into a digit-serial stream, P bits per cycle.
//
// A WX-bit unsigned sample is taken every D = ceil(WX/P) cycles and issued as D digits
// of P bits, most significant digit first (the weight order of the DA sum: digit j of
// a sample carries weight 2**(P*(D-1-j)) in integer terms). When WX is not a multiple
// of P the sample is zero-extended at the top. A free-running digit counter sets the
// rate; there is no back-pressure, the filter takes one sample per D cycles.
//
// Timing: x_ready is high in the cycle in which x_in is sampled (one cycle in D,
// the first one right after reset). The digits of that sample appear on digit in the
// D following cycles, with digit_first on the first and digit_last on the last, and
// digit_valid high from the first digit of the first sample on. Before the first
// sample the digit output is zero.
//
// The unit follows the document's preprocessing stage (bit-parallel to digit-serial);
// the counter, the digit order and the flag outputs are this design's choices.
module digit_serializer #(
  parameter int unsigned WX = 8,
  parameter int unsigned P  = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [WX-1:0] x_in,
  output logic          x_ready,
  output logic [P-1:0]  digit,
  output logic          digit_first,
  output logic          digit_last,
  output logic          digit_valid
);

  localparam int unsigned D  = (WX + P - 1) / P;   // digits per sample
  localparam int unsigned WP = D * P;              // padded sample width
  localparam int unsigned CW = (D > 1) ? $clog2(D) : 1;

  logic [CW-1:0] cnt;      // position in the sample period, 0 = load cycle
  logic [WP-1:0] shreg;    // digits still to be issued, next one at the top
  logic [CW-1:0] phase;    // index of the digit now on the output

  assign x_ready = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      shreg       <= '0;
      phase       <= CW'(D - 1);
      digit_valid <= 1'b0;
    end else begin
      cnt   <= (cnt == CW'(D - 1)) ? '0 : cnt + 1'b1;
      phase <= cnt;
      if (x_ready) begin
        shreg       <= WP'(x_in);
        digit_valid <= 1'b1;
      end else begin
        shreg <= shreg << P;
      end
    end
  end

  assign digit       = shreg[WP-1 -: P];
  assign digit_first = (phase == '0);
  assign digit_last  = (phase == CW'(D - 1));

endmodule
