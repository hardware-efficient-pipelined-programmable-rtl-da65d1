// digit_delay_line: the input sample delay between two neighbouring taps.
//
// A shift register of L stages, each holding one P-bit digit. Because the partial
// sums run through the taps in the direction opposite to the digits, and every tap
// adds one register to the sum path, the digit stream must be delayed by D - 1
// cycles per tap (D = digits per sample) for each tap to see the same digit position
// of the sample one period older than its neighbour. The top instantiates this with
// L = D - 1, as in the document's count of (N-1)(WX/P - 1) digit delays. L = 0
// gives a plain wire. Registers reset to zero, so the filter starts from an all-zero
// history.
module digit_delay_line #(
  parameter int unsigned P = 2,
  parameter int unsigned L = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [P-1:0] din,
  output logic [P-1:0] dout
);

  if (L == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [P-1:0] stage [L];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < L; i++) stage[i] <= '0;
      end else begin
        stage[0] <= din;
        for (int i = 1; i < L; i++) stage[i] <= stage[i-1];
      end
    end
    assign dout = stage[L-1];
  end

endmodule
