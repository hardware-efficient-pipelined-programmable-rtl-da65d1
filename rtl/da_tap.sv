// da_tap: one tap adder of the multi-bit DA filter (the dotted block of the
// architecture).
//
// The tap multiplies its coefficient by the P-bit input digit it currently sees,
// without a multiplier: P rows of AND gates form the partial products
// coef * digit[k] * 2**k, and a (P+2,2) compressor adds them to the sum and carry
// vectors arriving from the previous tap. The resulting pair is registered, so each
// tap is one pipeline stage and no carry ever propagates along a word inside the tap
// chain. For P = 2 the compressor is a single row of (4,2) compressors.
//
// Word length: all vectors are W = WC + P + clog2(N) bits, enough for the signed sum
// of N coefficient-times-digit products. The coefficient is sign-extended to W bits
// before the AND gates, and the carry-save pair is kept modulo 2**W; the merged
// result is exact because the true sum fits in W signed bits. (The document uses
// the sign-extension scheme of an earlier Booth DA design, which it does not
// describe; full-width sign extension is this design's replacement.)
//
// Timing: s_out/c_out are s_in + c_in + coef*digit, registered at the clock edge.
module da_tap #(
  parameter int unsigned WC = 8,
  parameter int unsigned P  = 2,
  parameter int unsigned W  = 13
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [WC-1:0] coef,
  input  logic [P-1:0]         digit,
  input  logic [W-1:0]         s_in,
  input  logic [W-1:0]         c_in,
  output logic [W-1:0]         s_out,
  output logic [W-1:0]         c_out
);

  logic [W-1:0] coef_ext;
  logic [W-1:0] ops [P+2];
  logic [W-1:0] s_nxt, c_nxt;

  assign coef_ext = W'(coef);   // sign extension (coef is signed)

  // AND-gate partial products, one per digit bit.
  for (genvar k = 0; k < P; k++) begin : g_pp
    assign ops[k] = (coef_ext & {W{digit[k]}}) << k;
  end
  assign ops[P]   = s_in;
  assign ops[P+1] = c_in;

  pq_compressor #(.W(W), .M(P + 2)) u_comp (
    .ops  (ops),
    .sum  (s_nxt),
    .carry(c_nxt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_out <= '0;
      c_out <= '0;
    end else begin
      s_out <= s_nxt;
      c_out <= c_nxt;
    end
  end

endmodule
