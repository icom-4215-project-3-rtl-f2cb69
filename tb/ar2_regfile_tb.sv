// ar2_regfile_tb -- self-checking test of the eight-register file.
//
// Checks that reset clears all registers, then performs random writes and
// reads against a shadow array kept here: a write becomes visible after the
// clock edge, reads are combinational, and a register not written keeps its
// value.
module ar2_regfile_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst, we;
  logic [2:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  logic [7:0] shadow [8];
  int checks = 0, failures = 0;

  ar2_regfile dut (.clk(clk), .rst(rst), .we(we), .waddr(waddr), .wdata(wdata),
                   .raddr(raddr), .rdata(rdata));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input logic [2:0] r);
    raddr = r;
    #1;
    checks++;
    if (rdata !== shadow[r]) begin
      failures++;
      $display("FAIL R%0d = %02h, want %02h", r, rdata, shadow[r]);
    end
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    @(posedge clk); @(posedge clk);
    #1 rst = 1'b0;
    foreach (shadow[i]) shadow[i] = '0;
    for (int i = 0; i < 8; i++) check_read(3'(i));
    for (int k = 0; k < 5000; k++) begin
      we    = 1'($urandom);
      waddr = 3'($urandom);
      wdata = 8'($urandom);
      check_read(3'($urandom));   // before the edge: old value
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      check_read(waddr);
    end
    we = 1'b0;
    for (int i = 0; i < 8; i++) check_read(3'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
