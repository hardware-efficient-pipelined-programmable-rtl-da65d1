// compressor_4_2: a row of (4,2) compressors, W bits wide.
//
// Reduces four W-bit operands to a sum and a carry vector with a + b + c + d ==
// sum + carry (modulo 2**W). Each bit position is two cascaded full adders: the
// first adds a, b and c and sends its carry sideways to the next bit position
// (the horizontal carry), the second adds the first one's sum, d and the horizontal
// carry coming from the bit below. The horizontal carry therefore never ripples
// further than one position, so the row has a constant delay of about three XOR
// gates whatever W is. The carry output is already shifted to its weight (bit 0 is
// zero). Purely combinational.
module compressor_4_2 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] s1;     // sum of the first full adder
  logic [W-1:0] cout;   // horizontal carry produced at each position
  logic [W-1:0] cin;    // horizontal carry arriving from the position below
  logic [W-1:0] c2;     // carry of the second full adder, before the shift

  always_comb begin
    s1    = a ^ b ^ c;
    cout  = (a & b) | (a & c) | (b & c);
    cin   = {cout[W-2:0], 1'b0};
    sum   = s1 ^ d ^ cin;
    c2    = (s1 & d) | (s1 & cin) | (d & cin);
    carry = {c2[W-2:0], 1'b0};
  end

endmodule
