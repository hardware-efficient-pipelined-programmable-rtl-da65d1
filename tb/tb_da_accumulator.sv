// tb_da_accumulator: feeds groups of D = 4 signed digit sums (most significant
// first) with first/last flags, P = 2, and checks that y = sum_j S_j * 4**(3-j)
// appears with y_valid exactly one edge after the last digit, that y_valid stays
// low otherwise, and that nothing is accumulated while in_valid is low.
module tb_da_accumulator;
  localparam int WS = 13, P = 2, WY = 21, D = 4;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic signed [WS-1:0] s;
  logic in_valid, first, last;
  logic signed [WY-1:0] y;
  logic y_valid;

  da_accumulator #(.WS(WS), .P(P), .WY(WY)) dut (.clk, .rst_n, .s, .in_valid, .first,
    .last, .y, .y_valid);

  initial begin
    longint e;
    s = '0; in_valid = 1'b0; first = 1'b0; last = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      // idle cycles with garbage flags must not disturb anything
      if (n % 7 == 3) begin
        in_valid = 1'b0; first = 1'b1; last = 1'b1; s = WS'($urandom);
        @(posedge clk); #1;
        checks++;
        if (y_valid) begin failures++; $display("ERROR: y_valid while idle"); end
      end
      e = 0;
      for (int j = 0; j < D; j++) begin
        s = WS'($urandom);
        if (n == 0) s = -(1 <<< (WS - 1));
        if (n == 1) s = (1 <<< (WS - 1)) - 1;
        in_valid = 1'b1; first = (j == 0); last = (j == D - 1);
        e = e * (1 << P) + longint'(s);
        @(posedge clk); #1;
        checks++;
        if (y_valid != (j == D - 1)) begin
          failures++; $display("ERROR: y_valid = %0d after digit %0d", y_valid, j);
        end
      end
      checks++;
      if (longint'(y) != e) begin failures++; $display("ERROR: y = %0d, expected %0d", y, e); end
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
