// ar2_mult -- the 4-bit hardware multiplier of the RISC AR2.
//
// Combinational unsigned MUL_W x MUL_W multiplier with a 2*MUL_W-bit
// product (4 x 4 -> 8 bits by default, as the processor features list).
// It is built as a shift-and-add array: partial product i is a gated by
// b[i] and shifted left by i, and the partial products are summed. The
// result is valid in the same cycle; MUL rf writes it to the accumulator.
// Treating the operands as unsigned is this design's choice.
module ar2_mult #(
  parameter int unsigned MUL_W = 4
) (
  input  logic [MUL_W-1:0]   a,
  input  logic [MUL_W-1:0]   b,
  output logic [2*MUL_W-1:0] p
);

  always_comb begin
    p = '0;
    for (int i = 0; i < MUL_W; i++) begin
      if (b[i]) p = p + ({{MUL_W{1'b0}}, a} << i);
    end
  end

endmodule
