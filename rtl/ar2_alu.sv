// ar2_alu -- arithmetic/logic unit of the RISC AR2.
//
// Purely combinational. Operand a is the accumulator, operand b the source
// bus (register f, memory data or the immediate), cin the carry flag. The
// operations are those of the instruction set: AND, OR, XOR, add with
// carry, 4-bit divide, two's complement, rotate left/right through carry,
// decrement, plus PASSB, which forwards b for the load instructions.
// cout and ovf feed the C and O flags; Z and N are formed from the result
// bus outside the ALU.
//
// Taken from the instruction set: the operations and the rotate rules.
// This design's choices: NEG is two's complement (0 - a), as the mnemonic
// and the "two's complement" description say; DIV leaves the 4-bit
// quotient of a[3:0] / b[3:0] in y[3:0] with y[7:4] = 0, computed by a
// four-step restoring divider, and a zero divisor gives quotient 1111 and
// ovf = 1; the carry/overflow rules of DEC and NEG are described at the
// case items below.
module ar2_alu
  import risc_ar2_pkg::*;
#(
  parameter int unsigned DATA_W = AR2_DATA_W,
  parameter int unsigned DIV_W  = AR2_MUL_W
) (
  input  alu_op_e           op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic              cin,
  output logic [DATA_W-1:0] y,
  output logic              cout,
  output logic              ovf
);

  // Restoring division of a[DIV_W-1:0] by b[DIV_W-1:0].
  logic [DIV_W-1:0] quot;
  logic [DIV_W:0]   rem;
  always_comb begin
    rem = '0;
    for (int i = DIV_W - 1; i >= 0; i--) begin
      rem = {rem[DIV_W-1:0], a[i]};
      if (rem >= {1'b0, b[DIV_W-1:0]}) begin
        rem     = rem - {1'b0, b[DIV_W-1:0]};
        quot[i] = 1'b1;
      end else begin
        quot[i] = 1'b0;
      end
    end
  end

  logic [DATA_W:0] sum;
  assign sum = {1'b0, a} + {1'b0, b} + {{DATA_W{1'b0}}, cin};

  always_comb begin
    y    = '0;
    cout = 1'b0;
    ovf  = 1'b0;
    unique case (op)
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_ADDC: begin
        y    = sum[DATA_W-1:0];
        cout = sum[DATA_W];
        ovf  = (a[DATA_W-1] == b[DATA_W-1]) && (y[DATA_W-1] != a[DATA_W-1]);
      end
      ALU_DIV: begin
        y   = {{(DATA_W-DIV_W){1'b0}}, quot};
        ovf = (b[DIV_W-1:0] == '0);
      end
      ALU_NEG: begin
        // 0 - a: borrow whenever a is non-zero, overflow for the most
        // negative value.
        y    = -a;
        cout = (a != '0);
        ovf  = (a == {1'b1, {(DATA_W-1){1'b0}}});
      end
      ALU_RLC: begin
        y    = {a[DATA_W-2:0], cin};
        cout = a[DATA_W-1];
      end
      ALU_RRC: begin
        y    = {cin, a[DATA_W-1:1]};
        cout = a[0];
      end
      ALU_DEC: begin
        // a - 1: borrow when a was 0, overflow when a was the most
        // negative value.
        y    = a - 1'b1;
        cout = (a == '0);
        ovf  = (a == {1'b1, {(DATA_W-1){1'b0}}});
      end
      ALU_PASSB: y = b;
      default: y = '0;
    endcase
  end

endmodule
