// tb_compressor_4_2: random and corner-case test of the (4,2) compressor row.
// Checks sum + carry == a + b + c + d (mod 2**W), that the carry vector has a zero
// least significant bit, and that each output bit depends only on its own and the
// next lower positions (the horizontal carry goes one position only): flipping an
// input bit k must leave sum and carry below bit k unchanged.
module tb_compressor_4_2;
  localparam int W = 16;
  logic [W-1:0] a, b, c, d, sum, carry;
  logic [W-1:0] a2, sum2, carry2;
  int checks = 0, failures = 0;

  compressor_4_2 #(.W(W)) dut  (.a(a),  .b(b), .c(c), .d(d), .sum(sum),  .carry(carry));
  compressor_4_2 #(.W(W)) dut2 (.a(a2), .b(b), .c(c), .d(d), .sum(sum2), .carry(carry2));

  task automatic check_one();
    logic [W-1:0] expect_v;
    int k;
    #1;
    expect_v = a + b + c + d;
    checks++;
    if (W'(sum + carry) !== expect_v || carry[0] !== 1'b0) begin
      failures++;
      $display("ERROR: %h+%h+%h+%h: sum %h carry %h", a, b, c, d, sum, carry);
    end
    // locality of the horizontal carry
    k = $urandom_range(W - 1, 1);
    a2 = a ^ (W'(1) << k);
    #1;
    checks++;
    if (((sum ^ sum2) & ((W'(1) << k) - 1)) != 0 || ((carry ^ carry2) & ((W'(1) << k) - 1)) != 0) begin
      failures++;
      $display("ERROR: flipping a[%0d] changed lower output bits", k);
    end
  endtask

  initial begin
    a = '0; b = '0; c = '0; d = '0; a2 = '0;
    check_one();
    a = '1; b = '1; c = '1; d = '1; check_one();
    for (int i = 0; i < 2000; i++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom); d = W'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
