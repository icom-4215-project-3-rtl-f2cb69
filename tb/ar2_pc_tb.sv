// ar2_pc_tb -- self-checking test of the program counter.
//
// Drives random increment/load/reset requests on the falling edge and,
// after each rising edge, compares PC with a model kept here: reset gives
// 0, load gives d, increment adds one modulo 256 (including the wrap from
// 255 to 0), and load wins over increment.
module ar2_pc_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst, inc, ld;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0, wraps = 0;

  ar2_pc dut (.clk(clk), .rst(rst), .inc(inc), .ld(ld), .d(d), .q(q));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; inc = 1'b0; ld = 1'b0; d = '0; model = '0;
    @(posedge clk);
    for (int k = 0; k < 6000; k++) begin
      @(negedge clk);
      rst = ($urandom % 200 == 0);
      ld  = ($urandom % 8 == 0);
      inc = ($urandom % 4 != 0);
      d   = (k % 500 == 0) ? 8'hfd : 8'($urandom);
      @(posedge clk);
      if (rst)      model = '0;
      else if (ld)  model = d;
      else if (inc) begin
        if (model == 8'hff) wraps++;
        model = 8'((int'(model) + 1) % 256);
      end
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL pc=%02h want %02h (rst=%0b ld=%0b inc=%0b)", q, model, rst, ld, inc);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap-around exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
