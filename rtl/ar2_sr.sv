// ar2_sr -- the 4-bit status register SR (ZCNO) of the RISC AR2.
//
// Each flag (Z zero, C carry, N negative, O overflow) has its own write
// enable, so an instruction can update some flags and keep the others; on
// the rising edge every flag whose enable is set takes the new value. Which
// instruction writes which flag is decided by the control unit. Synchronous
// reset clears all flags (this design's choice).
module ar2_sr
  import risc_ar2_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  flags_t we,
  input  flags_t d,
  output flags_t q
);

  always_ff @(posedge clk) begin
    if (rst) begin
      q <= '0;
    end else begin
      if (we.z) q.z <= d.z;
      if (we.c) q.c <= d.c;
      if (we.n) q.n <= d.n;
      if (we.o) q.o <= d.o;
    end
  end

endmodule
