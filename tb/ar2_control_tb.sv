// ar2_control_tb -- self-checking test of the RISC AR2 control unit.
//
// For each of the 32 opcode values and each of the 16 status-flag
// combinations the test resets the controller and follows one instruction:
// it checks the fetch control lines in FETCH_HI and FETCH_LO, the control
// word of EXEC against an expectation table written out here from the
// instruction set, that every instruction takes exactly three cycles, and
// that STOP enters a HALT state that asserts no control line and is left
// only by reset.
module ar2_control_tb;
  import risc_ar2_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst;
  logic [4:0] opcode;
  flags_t     flags;
  ctrl_t      ctrl;
  state_e     state;
  logic       halted;
  int checks = 0, failures = 0;

  ar2_control dut (.clk(clk), .rst(rst), .opcode(opcode), .flags(flags),
                   .ctrl(ctrl), .state(state), .halted(halted));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL opcode=%05b flags=%04b: %s (ctrl=%h state=%s)", opcode, flags, what, ctrl, state.name());
    end
  endtask

  // Expected EXEC control word, one row per instruction of the table.
  function automatic ctrl_t expected_exec(input logic [4:0] opc, input flags_t f);
    ctrl_t c = '0;
    c.retire = 1'b1; c.alu_op = ALU_PASSB; c.src_sel = SRC_REG;
    c.res_sel = RES_ALU; c.maddr_sel = MADDR_PC;
    case (opc)
      5'b00000: begin c.alu_op = ALU_AND;  c.acc_ld = 1; c.sr_we = 4'b1010; end
      5'b00001: begin c.alu_op = ALU_OR;   c.acc_ld = 1; c.sr_we = 4'b1010; end
      5'b00010: begin c.alu_op = ALU_XOR;  c.acc_ld = 1; c.sr_we = 4'b1010; end
      5'b00011: begin c.alu_op = ALU_ADDC; c.acc_ld = 1; c.sr_we = 4'b1111; end
      5'b00100: begin c.res_sel = RES_MULT; c.acc_ld = 1; c.sr_we = 4'b1111; end
      5'b00101: begin c.alu_op = ALU_DIV;  c.acc_ld = 1; c.sr_we = 4'b1111; end
      5'b00110: begin c.alu_op = ALU_NEG;  c.acc_ld = 1; c.sr_we = 4'b1111; end
      5'b00111: begin c.alu_op = ALU_RLC;  c.acc_ld = 1; c.sr_we = 4'b1110; end
      5'b01000: begin c.alu_op = ALU_RRC;  c.acc_ld = 1; c.sr_we = 4'b1110; end
      5'b01001: begin c.alu_op = ALU_DEC;  c.acc_ld = 1; c.sr_we = 4'b1111; end
      5'b01010: begin c.acc_ld = 1; c.sr_we = 4'b1010; end
      5'b01011: c.rf_we = 1;
      5'b01100: begin c.maddr_sel = MADDR_IR; c.src_sel = SRC_MEM; c.acc_ld = 1; c.sr_we = 4'b1010; end
      5'b01101: begin c.maddr_sel = MADDR_IR; c.mem_we = 1; end
      5'b01110: begin c.src_sel = SRC_IMM; c.acc_ld = 1; c.sr_we = 4'b1010; end
      5'b10000: begin c.rf_sel_r7 = 1; c.pc_ld = f.z; end
      5'b10001: begin c.rf_sel_r7 = 1; c.pc_ld = f.c; end
      5'b10010: begin c.rf_sel_r7 = 1; c.pc_ld = f.n; end
      5'b10011: begin c.rf_sel_r7 = 1; c.pc_ld = f.o; end
      default: ;
    endcase
    return c;
  endfunction

  initial begin
    ctrl_t e;
    int halts = 0, taken = 0;
    rst = 1'b1; opcode = '0; flags = '0;
    for (int o = 0; o < 32; o++) begin
      for (int f = 0; f < 16; f++) begin
        @(negedge clk);
        rst = 1'b1; opcode = 5'(o); flags = 4'(f);
        @(negedge clk);
        rst = 1'b0;
        check("FETCH_HI state", state == ST_FETCH_HI && !halted);
        check("FETCH_HI lines", ctrl.ir_ld_hi && !ctrl.ir_ld_lo && ctrl.pc_inc && !ctrl.pc_ld &&
              ctrl.maddr_sel == MADDR_PC && !ctrl.mem_we && !ctrl.rf_we && !ctrl.acc_ld &&
              ctrl.sr_we == '0 && !ctrl.retire);
        @(negedge clk);
        check("FETCH_LO state", state == ST_FETCH_LO);
        check("FETCH_LO lines", !ctrl.ir_ld_hi && ctrl.ir_ld_lo && ctrl.pc_inc && !ctrl.pc_ld &&
              ctrl.maddr_sel == MADDR_PC && !ctrl.mem_we && !ctrl.rf_we && !ctrl.acc_ld &&
              ctrl.sr_we == '0 && !ctrl.retire);
        @(negedge clk);
        check("EXEC state", state == ST_EXEC);
        e = expected_exec(5'(o), flags);
        check("EXEC lines", ctrl == e);
        if (ctrl.pc_ld) taken++;
        @(negedge clk);
        if (o == 31) begin
          halts++;
          check("HALT state", state == ST_HALT && halted);
          repeat (3) begin
            check("HALT lines", ctrl.sr_we == '0 && !ctrl.acc_ld && !ctrl.pc_inc && !ctrl.pc_ld &&
                  !ctrl.mem_we && !ctrl.rf_we && !ctrl.ir_ld_hi && !ctrl.ir_ld_lo && !ctrl.retire);
            @(negedge clk);
          end
          check("still halted", halted);
        end else begin
          check("back to FETCH_HI after 3 cycles", state == ST_FETCH_HI && !halted);
        end
      end
    end
    check("STOP reached", halts > 0);
    check("branch taken", taken == 4 * 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
