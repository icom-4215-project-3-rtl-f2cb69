// risc_ar2 -- the RISC AR2 processor.
//
// An 8-bit accumulator machine with 16-bit instructions, a 256-byte memory
// shared by program and data, eight general purpose registers, a 4-bit
// status register (ZCNO), an ALU and a 4 x 4 bit multiplier, sequenced by
// the control unit ar2_control. Every instruction takes three clock
// cycles (fetch high byte, fetch low byte, execute); after STOP the
// processor stays halted until reset.
//
// Datapath (two buses):
//   source bus  = R[f] (or R7 for a branch) | memory data | IR[7:0]
//   ALU         : A op source bus, carry in = C
//   result bus  = ALU result | A[3:0] * R[f][3:0]
//   A          <- result bus;   R[f] <- A;   memory[addr] <- A
//   PC         <- source bus (R7) on a taken branch
//   memory address = PC during fetch, IR[7:0] for LDA/STA addr
//   Z = (result bus == 0), N = result bus[7], C and O from the ALU (0 for MUL)
//
// Program loading (this design's choice): while rst is high the memory
// belongs to the load port (load_we, load_addr, load_data; load_rdata reads
// back combinationally), and the processor starts at address 0 on the first
// clock edge after rst falls. The processor state is brought out for
// observation; retire is high in the last cycle of each instruction. The
// two external I/O pins of the processor are not modelled: nothing defines
// how instructions reach them.
module risc_ar2
  import risc_ar2_pkg::*;
#(
  parameter int unsigned ADDR_W = AR2_ADDR_W,
  parameter int unsigned DATA_W = AR2_DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [DATA_W-1:0] load_data,
  output logic [DATA_W-1:0] load_rdata,
  output logic              halted,
  output logic              retire,
  output state_e            state,
  output logic [ADDR_W-1:0] pc,
  output logic [15:0]       ir,
  output logic [DATA_W-1:0] acc,
  output flags_t            flags
);

  ctrl_t  ctrl;

  logic [DATA_W-1:0] rf_rdata, mem_rdata, src_bus, res_bus, alu_y;
  logic [2*AR2_MUL_W-1:0] mul_p;
  logic              alu_c, alu_o;
  logic [AR2_REG_AW-1:0] rf_raddr;
  logic [ADDR_W-1:0] cpu_maddr, mem_addr;
  logic              mem_we;
  logic [DATA_W-1:0] mem_wdata;
  flags_t            flags_d;

  ar2_control u_control (
    .clk   (clk),
    .rst   (rst),
    .opcode(ir[15:11]),
    .flags (flags),
    .ctrl  (ctrl),
    .state (state),
    .halted(halted)
  );

  assign retire = ctrl.retire;

  ar2_pc #(.ADDR_W(ADDR_W)) u_pc (
    .clk(clk), .rst(rst), .inc(ctrl.pc_inc), .ld(ctrl.pc_ld),
    .d(src_bus[ADDR_W-1:0]), .q(pc)
  );

  ar2_ir #(.IR_W(AR2_IR_W)) u_ir (
    .clk(clk), .rst(rst), .ld_hi(ctrl.ir_ld_hi), .ld_lo(ctrl.ir_ld_lo),
    .d(mem_rdata), .q(ir)
  );

  // Memory port: the load port while in reset, the processor otherwise.
  assign cpu_maddr = (ctrl.maddr_sel == MADDR_IR) ? ir[ADDR_W-1:0] : pc;
  assign mem_addr  = rst ? load_addr : cpu_maddr;
  assign mem_we    = rst ? load_we   : ctrl.mem_we;
  assign mem_wdata = rst ? load_data : acc;
  assign load_rdata = mem_rdata;

  ar2_memory #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_memory (
    .clk(clk), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  assign rf_raddr = ctrl.rf_sel_r7 ? AR2_REG_AW'(AR2_NREGS - 1) : ir[10:8];

  ar2_regfile #(.NREGS(AR2_NREGS), .DATA_W(DATA_W)) u_regfile (
    .clk(clk), .rst(rst), .we(ctrl.rf_we), .waddr(ir[10:8]), .wdata(acc),
    .raddr(rf_raddr), .rdata(rf_rdata)
  );

  // Source bus (bus 1).
  always_comb begin
    unique case (ctrl.src_sel)
      SRC_MEM: src_bus = mem_rdata;
      SRC_IMM: src_bus = ir[DATA_W-1:0];
      default: src_bus = rf_rdata;
    endcase
  end

  ar2_alu #(.DATA_W(DATA_W), .DIV_W(AR2_MUL_W)) u_alu (
    .op(ctrl.alu_op), .a(acc), .b(src_bus), .cin(flags.c),
    .y(alu_y), .cout(alu_c), .ovf(alu_o)
  );

  ar2_mult #(.MUL_W(AR2_MUL_W)) u_mult (
    .a(acc[AR2_MUL_W-1:0]), .b(src_bus[AR2_MUL_W-1:0]), .p(mul_p)
  );

  // Result bus (bus 2).
  assign res_bus = (ctrl.res_sel == RES_MULT) ? DATA_W'(mul_p) : alu_y;

  ar2_acc #(.DATA_W(DATA_W)) u_acc (
    .clk(clk), .rst(rst), .ld(ctrl.acc_ld), .d(res_bus), .q(acc)
  );

  assign flags_d.z = (res_bus == '0);
  assign flags_d.n = res_bus[DATA_W-1];
  assign flags_d.c = (ctrl.res_sel == RES_MULT) ? 1'b0 : alu_c;
  assign flags_d.o = (ctrl.res_sel == RES_MULT) ? 1'b0 : alu_o;

  ar2_sr u_sr (
    .clk(clk), .rst(rst), .we(ctrl.sr_we), .d(flags_d), .q(flags)
  );

endmodule
