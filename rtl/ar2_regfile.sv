// ar2_regfile -- general purpose registers R0..R7 of the RISC AR2.
//
// NREGS registers of DATA_W bits (eight 8-bit registers by default). One
// combinational read port (raddr -> rdata in the same cycle) and one write
// port written on the rising clock edge when we is high. A synchronous,
// active-high reset clears every register; the port count and the reset
// are this design's choices, as the instruction set never reads two
// registers at once.
module ar2_regfile #(
  parameter int unsigned NREGS  = 8,
  parameter int unsigned DATA_W = 8,
  localparam int unsigned AW    = $clog2(NREGS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata = regs[raddr];

endmodule
