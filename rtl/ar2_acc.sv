// ar2_acc -- the accumulator A of the RISC AR2.
//
// A DATA_W-bit (8-bit) register loaded from the result bus on the rising
// edge when ld is high, holding its value otherwise. A is the implicit
// first operand of every ALU and multiplier instruction and the data source
// of both store instructions. Synchronous reset to 0 is this design's
// choice.
module ar2_acc #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ld,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ld) q <= d;
  end

endmodule
