// ar2_control -- the control unit of the RISC AR2.
//
// A four-state machine that sequences every instruction through three
// clock cycles and drives all control lines of the datapath as one ctrl_t
// word:
//   FETCH_HI  memory[PC] -> IR[15:8], PC <- PC + 1
//   FETCH_LO  memory[PC] -> IR[7:0],  PC <- PC + 1
//   EXEC      decode IR[15:11] and perform the instruction (retire = 1)
//   HALT      entered after STOP; nothing changes until reset
// The control lines are a function of the state, the opcode and, for the
// conditional branches, of the status flags (a Moore/Mealy mix: in EXEC the
// outputs depend on IR and SR, which are stable throughout that cycle).
//
// The datapath it steers has two buses. The source bus carries the second
// operand (register f, memory data or the immediate byte IR[7:0]) into the
// ALU and into the PC; the result bus carries the ALU or multiplier result
// into A. Stores write A to the register file or to memory.
//
// From the instruction set: the opcodes and what each instruction does;
// "If Z=1, PC <- r7" and the like for the branches; STOP ends execution.
// This design's own choices: the three-cycle sequence, the two-bus
// organisation, the register field in IR[10:8], which flags each
// instruction writes (AND/OR/XOR and loads into A: Z,N; ADDC, MUL, DIV,
// NEG, DEC: Z,C,N,O; RLC, RRC: Z,C,N; all others: none), unused opcodes
// acting as NOP, and the synchronous active-high reset into FETCH_HI.
module ar2_control
  import risc_ar2_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic [4:0]   opcode,
  input  flags_t       flags,
  output ctrl_t        ctrl,
  output state_e       state,
  output logic         halted
);

  localparam flags_t F_ZN   = 4'b1010;
  localparam flags_t F_ZCN  = 4'b1110;
  localparam flags_t F_ALL  = 4'b1111;

  state_e  state_n;
  opcode_e opc;
  assign opc = opcode_e'(opcode);

  always_ff @(posedge clk) begin
    if (rst) state <= ST_FETCH_HI;
    else     state <= state_n;
  end

  assign halted = (state == ST_HALT);

  always_comb begin
    ctrl      = '0;
    ctrl.maddr_sel = MADDR_PC;
    ctrl.src_sel   = SRC_REG;
    ctrl.alu_op    = ALU_PASSB;
    ctrl.res_sel   = RES_ALU;
    state_n   = state;
    unique case (state)
      ST_FETCH_HI: begin
        ctrl.ir_ld_hi = 1'b1;
        ctrl.pc_inc   = 1'b1;
        state_n       = ST_FETCH_LO;
      end
      ST_FETCH_LO: begin
        ctrl.ir_ld_lo = 1'b1;
        ctrl.pc_inc   = 1'b1;
        state_n       = ST_EXEC;
      end
      ST_EXEC: begin
        ctrl.retire = 1'b1;
        state_n     = ST_FETCH_HI;
        case (opc)
          OP_AND, OP_OR, OP_XOR: begin
            ctrl.alu_op = (opc == OP_AND) ? ALU_AND :
                          (opc == OP_OR)  ? ALU_OR  : ALU_XOR;
            ctrl.acc_ld = 1'b1;
            ctrl.sr_we  = F_ZN;
          end
          OP_ADDC: begin
            ctrl.alu_op = ALU_ADDC;
            ctrl.acc_ld = 1'b1;
            ctrl.sr_we  = F_ALL;
          end
          OP_MUL: begin
            ctrl.res_sel = RES_MULT;
            ctrl.acc_ld  = 1'b1;
            ctrl.sr_we   = F_ALL;
          end
          OP_DIV: begin
            ctrl.alu_op = ALU_DIV;
            ctrl.acc_ld = 1'b1;
            ctrl.sr_we  = F_ALL;
          end
          OP_NEG, OP_DEC: begin
            ctrl.alu_op = (opc == OP_NEG) ? ALU_NEG : ALU_DEC;
            ctrl.acc_ld = 1'b1;
            ctrl.sr_we  = F_ALL;
          end
          OP_RLC, OP_RRC: begin
            ctrl.alu_op = (opc == OP_RLC) ? ALU_RLC : ALU_RRC;
            ctrl.acc_ld = 1'b1;
            ctrl.sr_we  = F_ZCN;
          end
          OP_LDAR: begin
            ctrl.acc_ld = 1'b1;
            ctrl.sr_we  = F_ZN;
          end
          OP_STAR: ctrl.rf_we = 1'b1;
          OP_LDAM: begin
            ctrl.maddr_sel = MADDR_IR;
            ctrl.src_sel   = SRC_MEM;
            ctrl.acc_ld    = 1'b1;
            ctrl.sr_we     = F_ZN;
          end
          OP_STAM: begin
            ctrl.maddr_sel = MADDR_IR;
            ctrl.mem_we    = 1'b1;
          end
          OP_LDI: begin
            ctrl.src_sel = SRC_IMM;
            ctrl.acc_ld  = 1'b1;
            ctrl.sr_we   = F_ZN;
          end
          OP_BRZ, OP_BRC, OP_BRN, OP_BRO: begin
            ctrl.rf_sel_r7 = 1'b1;
            ctrl.pc_ld     = (opc == OP_BRZ) ? flags.z :
                             (opc == OP_BRC) ? flags.c :
                             (opc == OP_BRN) ? flags.n : flags.o;
          end
          OP_STOP: state_n = ST_HALT;
          default: ;  // NOP and unused opcodes
        endcase
      end
      ST_HALT: state_n = ST_HALT;
      default: state_n = ST_FETCH_HI;
    endcase
  end

endmodule
