// tb_digit_serializer: checks the preprocessing unit at 8 bits / 2 bits at a time
// (4 digits per sample) and at 7 bits / 3 bits at a time (3 digits, the sample is
// zero-extended to 9 bits). For each sample it checks that x_ready comes exactly
// once every D cycles, that the D following digits are the sample's digits most
// significant first, and the first/last/valid flags.
module tb_digit_serializer;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // configuration A: WX = 8, P = 2
  logic [7:0] xa;  logic ra;  logic [1:0] da;  logic fa, la, va;
  digit_serializer #(.WX(8), .P(2)) ua (.clk, .rst_n, .x_in(xa), .x_ready(ra),
    .digit(da), .digit_first(fa), .digit_last(la), .digit_valid(va));
  // configuration B: WX = 7, P = 3
  logic [6:0] xb;  logic rb;  logic [2:0] db;  logic fb, lb, vb;
  digit_serializer #(.WX(7), .P(3)) ub (.clk, .rst_n, .x_in(xb), .x_ready(rb),
    .digit(db), .digit_first(fb), .digit_last(lb), .digit_valid(vb));

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("ERROR: %s = %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    logic [7:0] sa;
    logic [8:0] sb;
    xa = '0; xb = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    expect_eq("A valid before first sample", int'(va), 0);
    // A runs on its own: 30 samples
    for (int n = 0; n < 30; n++) begin
      sa = 8'($urandom);
      expect_eq("A x_ready at sample start", int'(ra), 1);
      xa = sa;
      @(posedge clk); #1;
      for (int j = 0; j < 4; j++) begin
        expect_eq("A digit", int'(da), int'(sa[7 - 2*j -: 2]));
        expect_eq("A first", int'(fa), int'(j == 0));
        expect_eq("A last",  int'(la), int'(j == 3));
        expect_eq("A valid", int'(va), 1);
        if (j < 3) expect_eq("A x_ready inside period", int'(ra), 0);
        if (j < 3) begin @(posedge clk); #1; end
      end
    end
  end

  initial begin
    logic [8:0] sb;
    @(posedge rst_n); #0;
    for (int n = 0; n < 30; n++) begin
      sb = {2'b00, 7'($urandom)};
      expect_eq("B x_ready at sample start", int'(rb), 1);
      xb = sb[6:0];
      @(posedge clk); #1;
      for (int j = 0; j < 3; j++) begin
        expect_eq("B digit", int'(db), int'(sb[8 - 3*j -: 3]));
        expect_eq("B first", int'(fb), int'(j == 0));
        expect_eq("B last",  int'(lb), int'(j == 2));
        if (j < 2) expect_eq("B x_ready inside period", int'(rb), 0);
        if (j < 2) begin @(posedge clk); #1; end
      end
    end
    repeat (100) @(posedge clk);
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
