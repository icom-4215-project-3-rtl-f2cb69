// ar2_alu_tb -- self-checking test of the RISC AR2 ALU.
//
// Applies every operation with random operands and carry (and all 256
// divisor/dividend nibble pairs for DIV) and compares result, carry and
// overflow with values computed here from integer arithmetic. The ALU is
// combinational; a clock only paces the stimulus and drives the watchdog.
module ar2_alu_tb;
  import risc_ar2_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  alu_op_e    op;
  logic [7:0] a, b, y;
  logic       cin, cout, ovf;
  int checks = 0, failures = 0;

  ar2_alu dut (.op(op), .a(a), .b(b), .cin(cin), .y(y), .cout(cout), .ovf(ovf));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input logic [7:0] ey, input logic ec, input logic eo);
    checks++;
    if (y !== ey || cout !== ec || ovf !== eo) begin
      failures++;
      $display("FAIL op=%s a=%02h b=%02h cin=%0b: y=%02h c=%0b o=%0b, want y=%02h c=%0b o=%0b",
               op.name(), a, b, cin, y, cout, ovf, ey, ec, eo);
    end
  endtask

  initial begin
    int sa, sb, s;
    int unsigned u;
    logic [7:0] ey;
    logic ec, eo;
    for (int k = 0; k < 3000; k++) begin
      @(posedge clk);
      a   = 8'($urandom);
      b   = 8'($urandom);
      cin = 1'($urandom);
      if (k < 16) begin
        a = (k[0]) ? 8'h80 : (k[1] ? 8'h00 : 8'h7f);
        b = (k[2]) ? 8'h80 : (k[3] ? 8'hff : 8'h01);
      end
      for (int o = 0; o <= 9; o++) begin
        op = alu_op_e'(o);
        #1;
        ec = 1'b0; eo = 1'b0;
        case (op)
          ALU_AND: ey = a & b;
          ALU_OR:  ey = a | b;
          ALU_XOR: ey = a ^ b;
          ALU_ADDC: begin
            u  = int'(a) + int'(b) + int'(cin);
            ey = u[7:0]; ec = (u > 255);
            sa = $signed(a); sb = $signed(b); s = sa + sb + int'(cin);
            eo = (s > 127) || (s < -128);
          end
          ALU_DIV: begin
            if (b[3:0] == 0) begin ey = 8'h0f; eo = 1'b1; end
            else ey = 8'(int'(a[3:0]) / int'(b[3:0]));
          end
          ALU_NEG: begin
            s = 0 - int'($signed(a)); ey = 8'(256 - int'(a)); ec = (a != 0);
            eo = (s > 127);
          end
          ALU_RLC: begin ey = 8'((int'(a) * 2) % 256 + int'(cin)); ec = (a >= 128); end
          ALU_RRC: begin ey = 8'(int'(a) / 2 + (cin ? 128 : 0)); ec = a[0]; end
          ALU_DEC: begin
            ey = 8'((int'(a) + 255) % 256); ec = (a == 0);
            s = int'($signed(a)) - 1; eo = (s < -128);
          end
          default: ey = b;
        endcase
        expect_out(ey, ec, eo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
