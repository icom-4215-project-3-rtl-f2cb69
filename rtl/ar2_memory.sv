// ar2_memory -- the 256 x 8 internal memory of the RISC AR2.
//
// 2**ADDR_W locations of DATA_W bits (256 bytes by default). It holds the
// program, two bytes per instruction with the high byte at the lower
// address, and the data of LDA addr / STA addr. One port: the read is
// combinational (rdata follows addr in the same cycle) and the write takes
// place on the rising clock edge when we is high. The asynchronous read is
// this design's choice; it lets every memory access fit in one controller
// state. The array has no reset; it is loaded before the processor runs.
module ar2_memory #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
