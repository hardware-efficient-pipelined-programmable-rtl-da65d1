// tb_pq_compressor: the multi-operand compressor at operand counts 3 to 12 (the tap
// adders of 1 to 10 bits at a time), with random operands. Checks that the sum and
// carry outputs add up to the sum of all operands modulo 2**W.
module tb_pq_compressor;
  localparam int W = 20;
  int checks = 0, failures = 0;

  logic [W-1:0] ops3 [3];  logic [W-1:0] s3, c3;
  logic [W-1:0] ops4 [4];  logic [W-1:0] s4, c4;
  logic [W-1:0] ops5 [5];  logic [W-1:0] s5, c5;
  logic [W-1:0] ops6 [6];  logic [W-1:0] s6, c6;
  logic [W-1:0] ops7 [7];  logic [W-1:0] s7, c7;
  logic [W-1:0] ops12 [12]; logic [W-1:0] s12, c12;

  pq_compressor #(.W(W), .M(3))  u3  (.ops(ops3),  .sum(s3),  .carry(c3));
  pq_compressor #(.W(W), .M(4))  u4  (.ops(ops4),  .sum(s4),  .carry(c4));
  pq_compressor #(.W(W), .M(5))  u5  (.ops(ops5),  .sum(s5),  .carry(c5));
  pq_compressor #(.W(W), .M(6))  u6  (.ops(ops6),  .sum(s6),  .carry(c6));
  pq_compressor #(.W(W), .M(7))  u7  (.ops(ops7),  .sum(s7),  .carry(c7));
  pq_compressor #(.W(W), .M(12)) u12 (.ops(ops12), .sum(s12), .carry(c12));

  task automatic cmp(int m, logic [W-1:0] got_s, logic [W-1:0] got_c, logic [W-1:0] expect_v);
    checks++;
    if (W'(got_s + got_c) !== expect_v) begin
      failures++;
      $display("ERROR: M=%0d sum %h + carry %h != %h", m, got_s, got_c, expect_v);
    end
  endtask

  initial begin
    for (int it = 0; it < 1000; it++) begin
      logic [W-1:0] e3, e4, e5, e6, e7, e12;
      e3 = 0; e4 = 0; e5 = 0; e6 = 0; e7 = 0; e12 = 0;
      for (int k = 0; k < 12; k++) begin
        logic [W-1:0] v;
        v = (it < 2) ? {W{it[0]}} : W'($urandom);
        if (k < 3) begin ops3[k] = v; e3 += v; end
        if (k < 4) begin ops4[k] = v; e4 += v; end
        if (k < 5) begin ops5[k] = v; e5 += v; end
        if (k < 6) begin ops6[k] = v; e6 += v; end
        if (k < 7) begin ops7[k] = v; e7 += v; end
        ops12[k] = v; e12 += v;
      end
      #1;
      cmp(3, s3, c3, e3);
      cmp(4, s4, c4, e4);
      cmp(5, s5, c5, e5);
      cmp(6, s6, c6, e6);
      cmp(7, s7, c7, e7);
      cmp(12, s12, c12, e12);
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
