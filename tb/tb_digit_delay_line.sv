// tb_digit_delay_line: feeds random digits into delay lines of 3 stages and of
// 0 stages (a wire) and checks that each output equals the input of L cycles earlier,
// and zero for the first L cycles after reset.
module tb_digit_delay_line;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [1:0] din, d3, d0;
  digit_delay_line #(.P(2), .L(3)) u3 (.clk, .rst_n, .din, .dout(d3));
  digit_delay_line #(.P(2), .L(0)) u0 (.clk, .rst_n, .din, .dout(d0));

  logic [1:0] hist [$];

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      din = 2'($urandom);
      hist.push_back(din);
      #1;
      checks++;
      if (d0 != din) begin failures++; $display("ERROR: L=0 output %0d != %0d", d0, din); end
      checks++;
      if (d3 != ((t >= 3) ? hist[t-3] : 2'd0)) begin
        failures++;
        $display("ERROR: t=%0d L=3 output %0d", t, d3);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
