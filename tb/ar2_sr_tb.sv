// ar2_sr_tb -- self-checking test of the ZCNO status register.
//
// Random per-flag write enables and values; after each rising edge every
// enabled flag must take its new value and every other flag keep its old
// one. Reset clears all four flags.
module ar2_sr_tb;
  import risc_ar2_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst;
  flags_t we, d, q;
  logic [3:0] model;
  int checks = 0, failures = 0;

  ar2_sr dut (.clk(clk), .rst(rst), .we(we), .d(d), .q(q));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = '0; d = '0; model = '0;
    @(posedge clk);
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      rst = ($urandom % 100 == 0);
      we  = 4'($urandom);
      d   = 4'($urandom);
      @(posedge clk);
      if (rst) model = '0;
      else for (int i = 0; i < 4; i++) if (we[i]) model[i] = d[i];
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL sr=%04b want %04b (we=%04b d=%04b)", q, model, we, d);
      end
    end
    // ZCNO order: Z is the most significant bit.
    checks++;
    if ($bits(flags_t) != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
