// vector_merge_adder: the final vector merging adder (VMA) of the tap chain.
//
// The tap adders keep their result in carry-save form (a sum and a carry vector).
// This adder merges the two into one W-bit two's-complement word and registers it,
// one pipeline stage of one cycle. The document names the VMA; a plain registered
// adder is this design's choice for its insides.
module vector_merge_adder #(
  parameter int unsigned W = 13
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [W-1:0]        s_in,
  input  logic [W-1:0]        c_in,
  output logic signed [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= s_in + c_in;
  end

endmodule
