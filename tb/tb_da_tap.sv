// tb_da_tap: one tap adder at 2 bits at a time and one at 4 bits at a time. Random
// signed coefficients, digits and incoming carry-save pairs; one clock edge later
// the registered pair must add up to s_in + c_in + coef * digit (mod 2**W).
// Also checks the reset value.
module tb_da_tap;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int W2 = 13;   // 8-bit coefficient, P = 2, 8 taps
  localparam int W4 = 20;   // 12-bit coefficient, P = 4, 16 taps

  logic signed [7:0]  c2;  logic [1:0] d2;  logic [W2-1:0] si2, ci2, so2, co2;
  logic signed [11:0] c4;  logic [3:0] d4;  logic [W4-1:0] si4, ci4, so4, co4;

  da_tap #(.WC(8),  .P(2), .W(W2)) u2 (.clk, .rst_n, .coef(c2), .digit(d2),
    .s_in(si2), .c_in(ci2), .s_out(so2), .c_out(co2));
  da_tap #(.WC(12), .P(4), .W(W4)) u4 (.clk, .rst_n, .coef(c4), .digit(d4),
    .s_in(si4), .c_in(ci4), .s_out(so4), .c_out(co4));

  initial begin
    logic [W2-1:0] e2;
    logic [W4-1:0] e4;
    c2 = '0; d2 = '0; si2 = '0; ci2 = '0;
    c4 = '0; d4 = '0; si4 = '0; ci4 = '0;
    @(posedge clk); #1;
    checks++;
    if (so2 != 0 || co2 != 0 || so4 != 0 || co4 != 0) begin
      failures++; $display("ERROR: outputs not zero in reset");
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      c2 = 8'($urandom);  d2 = 2'($urandom); si2 = W2'($urandom); ci2 = W2'($urandom);
      c4 = 12'($urandom); d4 = 4'($urandom); si4 = W4'($urandom); ci4 = W4'($urandom);
      if (t < 4) begin c2 = -128; d2 = 2'd3; c4 = -2048; d4 = 4'hf; end
      e2 = si2 + ci2 + W2'(32'(c2) * 32'(d2));
      e4 = si4 + ci4 + W4'(32'(c4) * 32'(d4));
      @(posedge clk); #1;
      checks++;
      if (W2'(so2 + co2) != e2) begin
        failures++; $display("ERROR: P=2 coef %0d digit %0d: %h expected %h", c2, d2, W2'(so2 + co2), e2);
      end
      checks++;
      if (W4'(so4 + co4) != e4) begin
        failures++; $display("ERROR: P=4 coef %0d digit %0d: %h expected %h", c4, d4, W4'(so4 + co4), e4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
