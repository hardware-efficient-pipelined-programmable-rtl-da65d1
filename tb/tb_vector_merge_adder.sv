// tb_vector_merge_adder: random sum and carry vectors; one edge later the output
// must be their sum modulo 2**W, read as a signed number. Also checks the reset value.
module tb_vector_merge_adder;
  localparam int W = 13;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [W-1:0] s_in, c_in;
  logic signed [W-1:0] q;
  vector_merge_adder #(.W(W)) dut (.clk, .rst_n, .s_in, .c_in, .q);

  initial begin
    logic signed [W-1:0] e;
    s_in = '0; c_in = '0;
    @(posedge clk); #1;
    checks++;
    if (q != 0) begin failures++; $display("ERROR: q not zero in reset"); end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      s_in = W'($urandom);
      c_in = W'($urandom);
      e = W'(int'(s_in) + int'(c_in));
      @(posedge clk); #1;
      checks++;
      if (q != e) begin failures++; $display("ERROR: %h + %h = %h, got %h", s_in, c_in, e, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
