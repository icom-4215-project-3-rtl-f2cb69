// ar2_mult_tb -- exhaustive self-checking test of the 4 x 4 bit multiplier.
//
// Applies all 256 operand pairs and compares the 8-bit product with the
// integer product. Combinational; the clock only paces stimulus and the
// watchdog.
module ar2_mult_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  ar2_mult dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        @(posedge clk);
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d * %0d = %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
