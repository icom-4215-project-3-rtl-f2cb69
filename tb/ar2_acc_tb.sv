// ar2_acc_tb -- self-checking test of the accumulator.
//
// Random load requests and data; after each rising edge A must hold the
// last loaded value, or 0 after reset.
module ar2_acc_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst, ld;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;

  ar2_acc dut (.clk(clk), .rst(rst), .ld(ld), .d(d), .q(q));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ld = 1'b0; d = '0; model = '0;
    @(posedge clk);
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      rst = ($urandom % 100 == 0);
      ld  = 1'($urandom);
      d   = 8'($urandom);
      @(posedge clk);
      if (rst) model = '0;
      else if (ld) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL acc=%02h want %02h", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
