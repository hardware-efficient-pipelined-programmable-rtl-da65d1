// tb_coef_bank: random writes to an 8-entry bank of 8-bit coefficients, including
// cycles without a write; after every cycle all eight outputs are compared with a
// model. Also checks that everything reads zero after reset.
module tb_coef_bank;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic              we;
  logic [2:0]        addr;
  logic signed [7:0] wdata;
  logic signed [7:0] coef [8];
  logic signed [7:0] model [8];

  coef_bank #(.N(8), .WC(8)) dut (.clk, .rst_n, .we, .addr, .wdata, .coef);

  task automatic compare();
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (coef[i] !== model[i]) begin
        failures++;
        $display("ERROR: coef[%0d] = %0d, expected %0d", i, coef[i], model[i]);
      end
    end
  endtask

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    for (int i = 0; i < 8; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare();
    for (int t = 0; t < 300; t++) begin
      we    = ($urandom_range(3, 0) != 0);
      addr  = 3'($urandom);
      wdata = 8'($urandom);
      @(posedge clk);
      if (we) model[addr] = wdata;
      #1 compare();
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
