// ar2_pc -- program counter of the RISC AR2.
//
// An ADDR_W-bit register (8 bits). On the rising edge: reset clears it,
// ld loads d (R7, for a taken branch), inc adds one (after each instruction
// byte is fetched), modulo 2**ADDR_W. ld wins over inc. The reset value 0,
// the wrap-around and the priority are this design's choices.
module ar2_pc #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              inc,
  input  logic              ld,
  input  logic [ADDR_W-1:0] d,
  output logic [ADDR_W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)      q <= '0;
    else if (ld)  q <= d;
    else if (inc) q <= q + 1'b1;
  end

endmodule
