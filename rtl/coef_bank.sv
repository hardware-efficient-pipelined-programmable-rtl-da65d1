// coef_bank: run-time programmable coefficient storage, one WC-bit two's-complement
// coefficient per tap.
//
// The filter is programmable: coefficients may be rewritten while it runs. The
// document counts N x WC storage bits for the multi-bit DA filter (no precomputed
// multiples of the coefficients are needed, unlike a Booth design); how they are
// written is not given. This design uses a single write port: when we is high at a
// clock edge, coefficient addr takes wdata. All coefficients are read in parallel on
// coef, each tap wired to its own. Registers reset to zero. A write to an address of
// N or above is ignored.
module coef_bank #(
  parameter int unsigned N  = 8,
  parameter int unsigned WC = 8,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [AW-1:0]        addr,
  input  logic signed [WC-1:0] wdata,
  output logic signed [WC-1:0] coef [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) coef[i] <= '0;
    end else if (we) begin
      for (int i = 0; i < N; i++) begin
        if (AW'(i) == addr) coef[i] <= wdata;
      end
    end
  end

endmodule
