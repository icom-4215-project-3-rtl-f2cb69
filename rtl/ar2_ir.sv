// ar2_ir -- 16-bit instruction register of the RISC AR2.
//
// Instructions are 16 bits wide but the memory is 8 bits wide, so the IR is
// filled in two cycles: ld_hi writes d into the upper byte, ld_lo into the
// lower byte, on the rising edge. Instructions are stored big endian, so
// the controller fetches the byte at the lower address into IR[15:8] first.
// Fields: IR[15:11] opcode, IR[10:8] register f, IR[7:0] immediate or
// direct address. Reset clears it (this design's choice).
module ar2_ir #(
  parameter int unsigned IR_W = 16,
  localparam int unsigned BW  = IR_W / 2
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            ld_hi,
  input  logic            ld_lo,
  input  logic [BW-1:0]   d,
  output logic [IR_W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst) begin
      q <= '0;
    end else begin
      if (ld_hi) q[IR_W-1:BW] <= d;
      if (ld_lo) q[BW-1:0]    <= d;
    end
  end

endmodule
