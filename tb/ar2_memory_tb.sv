// ar2_memory_tb -- self-checking test of the 256 x 8 memory.
//
// Fills all 256 locations with a pattern computed here, reads each one back
// combinationally, then mixes random writes and reads against a shadow
// array, checking that a write lands only at its own address.
module ar2_memory_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       we;
  logic [7:0] addr, wdata, rdata;
  logic [7:0] shadow [256];
  int checks = 0, failures = 0;

  ar2_memory dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_at(input logic [7:0] ad);
    addr = ad; we = 1'b0;
    #1;
    checks++;
    if (rdata !== shadow[ad]) begin
      failures++;
      $display("FAIL [%02h] = %02h, want %02h", ad, rdata, shadow[ad]);
    end
  endtask

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1'b1; addr = 8'(i); wdata = 8'((i * 37 + 11) % 256);
      shadow[i] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < 256; i++) check_at(8'(i));
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      if ($urandom % 2 == 0) begin
        we = 1'b1; addr = 8'($urandom); wdata = 8'($urandom);
        @(posedge clk);
        shadow[addr] = wdata;
        #1 we = 1'b0;
      end else begin
        check_at(8'($urandom));
      end
    end
    for (int i = 0; i < 256; i++) check_at(8'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
