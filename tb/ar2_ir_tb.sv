// ar2_ir_tb -- self-checking test of the 16-bit instruction register.
//
// Loads random bytes into the high and low halves, separately and
// together, and checks after each rising edge that only the selected half
// changed and that reset clears the register.
module ar2_ir_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst, ld_hi, ld_lo;
  logic [7:0]  d;
  logic [15:0] q, model;
  int checks = 0, failures = 0;

  ar2_ir dut (.clk(clk), .rst(rst), .ld_hi(ld_hi), .ld_lo(ld_lo), .d(d), .q(q));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ld_hi = 1'b0; ld_lo = 1'b0; d = '0; model = '0;
    @(posedge clk);
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      rst   = ($urandom % 100 == 0);
      ld_hi = 1'($urandom);
      ld_lo = 1'($urandom);
      d     = 8'($urandom);
      @(posedge clk);
      if (rst) model = '0;
      else begin
        if (ld_hi) model = {d, model[7:0]};
        if (ld_lo) model = {model[15:8], d};
      end
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL ir=%04h want %04h", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
