// da_accumulator: the final accumulator, the outer sum of the multi-bit DA form
//   y = sum over digits j of S_j * 2**(P*(D-1-j)),
// where S_j = sum_i c_i * d_{n-i,j} is the merged tap-chain result for digit j.
//
// The digit sums arrive most significant digit first, one per cycle, with first and
// last flags. On the first digit the accumulator loads S_j; on every later digit it
// shifts its content left by P bits and adds S_j. On the last digit the complete
// result is copied to y and y_valid pulses for one cycle. Shifting the accumulator
// left (integer form) keeps every bit of the product; the document writes the same
// sum with fractional weights 2**(-P*j). Flags are ignored while in_valid is low.
//
// Timing: y and y_valid are registered, one cycle after the last digit's S_j.
module da_accumulator #(
  parameter int unsigned WS = 13,  // width of one digit sum
  parameter int unsigned P  = 2,
  parameter int unsigned WY = 21   // width of the result
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [WS-1:0] s,
  input  logic                 in_valid,
  input  logic                 first,
  input  logic                 last,
  output logic signed [WY-1:0] y,
  output logic                 y_valid
);

  logic signed [WY-1:0] acc;
  logic signed [WY-1:0] acc_nxt;

  always_comb begin
    if (first) acc_nxt = WY'(s);
    else       acc_nxt = (acc <<< P) + WY'(s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (in_valid) begin
        acc <= acc_nxt;
        if (last) begin
          y       <= acc_nxt;
          y_valid <= 1'b1;
        end
      end
    end
  end

endmodule
