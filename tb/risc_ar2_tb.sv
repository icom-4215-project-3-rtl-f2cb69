// risc_ar2_tb -- end-to-end test of the RISC AR2 processor.
//
// The processor runs against an instruction-set model kept in this file:
// at every retiring instruction the model executes the same instruction
// from its own copy of memory, and after the clock edge PC, IR, A, the ZCNO
// flags, all eight registers and the halt state must agree. At the end of
// each program the whole memory is read back through the load port and
// compared. Every instruction must retire exactly three cycles after the
// previous one.
//
// Phase 1 is a hand-written program that uses all 20 instructions, with
// taken and not-taken branches, carries, overflows and a division by zero;
// its final state is also checked against values worked out by hand.
// Phase 2 runs NPROG random programs of up to NSTEP instructions each,
// including self-modifying stores, PC wrap-around and misaligned branch
// targets. Each mechanism (every opcode, taken and not-taken branch, carry
// out, overflow, divide by zero, memory store, halt, PC wrap) is counted
// and must occur at least once. The processor is used at its default size.
module risc_ar2_tb;
  import risc_ar2_pkg::*;

  localparam int NPROG = 200;
  localparam int NSTEP = 400;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst, load_we, halted, retire;
  logic [7:0]  load_addr, load_data, load_rdata, pc, acc;
  logic [15:0] ir;
  flags_t      flags;
  state_e      state;

  risc_ar2 dut (
    .clk(clk), .rst(rst), .load_we(load_we), .load_addr(load_addr),
    .load_data(load_data), .load_rdata(load_rdata), .halted(halted),
    .retire(retire), .state(state), .pc(pc), .ir(ir), .acc(acc), .flags(flags)
  );

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- instruction-set model ----------------
  logic [7:0] m_mem [256];
  logic [7:0] m_reg [8];
  logic [7:0] m_pc, m_a;
  logic       m_z, m_c, m_n, m_o, m_halt;
  logic [15:0] m_ir;

  // Mechanism counters.
  int n_op [32];
  int n_taken, n_not_taken, n_carry, n_ovf, n_div0, n_store, n_halt, n_wrap;

  function automatic logic [15:0] enc(input logic [4:0] op, input int f, input int imm);
    return {op, 3'(f), 8'(imm)};
  endfunction

  task automatic model_reset();
    foreach (m_reg[i]) m_reg[i] = '0;
    m_pc = 0; m_a = 0; m_z = 0; m_c = 0; m_n = 0; m_o = 0; m_halt = 0; m_ir = 0;
  endtask

  task automatic zn(input logic [7:0] v);
    m_z = (v == 0); m_n = v[7];
  endtask

  task automatic model_step();
    logic [4:0] op;
    logic [2:0] f;
    logic [7:0] imm, r;
    int t, sa, sr;
    m_ir = {m_mem[m_pc], m_mem[8'(m_pc + 1)]};
    if (int'(m_pc) + 2 > 255) n_wrap++;
    m_pc = 8'(m_pc + 2);
    op = m_ir[15:11]; f = m_ir[10:8]; imm = m_ir[7:0]; r = m_reg[f];
    n_op[op]++;
    case (op)
      5'b00000: begin m_a = m_a & r; zn(m_a); end
      5'b00001: begin m_a = m_a | r; zn(m_a); end
      5'b00010: begin m_a = m_a ^ r; zn(m_a); end
      5'b00011: begin
        t  = int'(m_a) + int'(r) + int'(m_c);
        sa = int'($signed(m_a)) + int'($signed(r)) + int'(m_c);
        m_a = 8'(t); m_c = (t >= 256); m_o = (sa > 127 || sa < -128); zn(m_a);
        if (m_c) n_carry++;
        if (m_o) n_ovf++;
      end
      5'b00100: begin m_a = 8'(int'(m_a[3:0]) * int'(r[3:0])); m_c = 0; m_o = 0; zn(m_a); end
      5'b00101: begin
        if (r[3:0] == 0) begin m_a = 8'h0f; m_o = 1; n_div0++; end
        else begin m_a = 8'(int'(m_a[3:0]) / int'(r[3:0])); m_o = 0; end
        m_c = 0; zn(m_a);
      end
      5'b00110: begin
        m_c = (m_a != 0); m_o = (m_a == 8'h80); m_a = 8'(0 - int'(m_a)); zn(m_a);
        if (m_o) n_ovf++;
      end
      5'b00111: begin t = m_a[7]; m_a = {m_a[6:0], m_c}; m_c = t[0]; zn(m_a); end
      5'b01000: begin t = m_a[0]; m_a = {m_c, m_a[7:1]}; m_c = t[0]; zn(m_a); end
      5'b01001: begin
        m_c = (m_a == 0); m_o = (m_a == 8'h80); m_a = 8'(int'(m_a) + 255); zn(m_a);
        if (m_o) n_ovf++;
      end
      5'b01010: begin m_a = r; zn(m_a); end
      5'b01011: m_reg[f] = m_a;
      5'b01100: begin m_a = m_mem[imm]; zn(m_a); end
      5'b01101: begin m_mem[imm] = m_a; n_store++; end
      5'b01110: begin m_a = imm; zn(m_a); end
      5'b10000, 5'b10001, 5'b10010, 5'b10011: begin
        logic cond;
        cond = (op == 5'b10000) ? m_z : (op == 5'b10001) ? m_c :
               (op == 5'b10010) ? m_n : m_o;
        if (cond) begin m_pc = m_reg[7]; n_taken++; end
        else n_not_taken++;
      end
      5'b11111: begin m_halt = 1; n_halt++; end
      default: ;
    endcase
  endtask

  // ---------------- program loading and lockstep run ----------------
  task automatic load_program();
    rst = 1'b1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      load_we = 1'b1; load_addr = 8'(i); load_data = m_mem[i];
    end
    @(negedge clk);
    load_we = 1'b0;
    model_reset();
  endtask

  task automatic compare_memory(input string tag);
    int bad = 0;
    rst = 1'b1; load_we = 1'b0;
    for (int i = 0; i < 256; i++) begin
      load_addr = 8'(i);
      #1;
      if (load_rdata !== m_mem[i]) bad++;
    end
    check($sformatf("%s memory image (%0d bytes differ)", tag, bad), bad == 0);
  endtask

  // Runs until the model halts or nstep instructions have retired.
  task automatic run(input int nstep, output int retired);
    longint last;
    retired = 0;
    @(negedge clk);
    rst = 1'b0;
    // The cycle in which reset is released is the first fetch cycle.
    last = cycles - 1;
    while (retired < nstep && !m_halt) begin
      @(negedge clk);
      if (retire) begin
        check("instruction takes 3 cycles", cycles - last == 3);
        last = cycles;
        check($sformatf("IR %04h, model %04h", ir, {m_mem[8'(m_pc)], m_mem[8'(m_pc + 1)]}),
              ir == {m_mem[8'(m_pc)], m_mem[8'(m_pc + 1)]});
        model_step();
        retired++;
        @(posedge clk);
        #1;
        check($sformatf("PC %02h, model %02h", pc, m_pc), pc == m_pc || m_halt);
        check($sformatf("A %02h, model %02h", acc, m_a), acc == m_a);
        check($sformatf("ZCNO %04b, model %04b", flags, {m_z, m_c, m_n, m_o}),
              flags == {m_z, m_c, m_n, m_o});
        for (int i = 0; i < 8; i++)
          check($sformatf("R%0d", i), dut.u_regfile.regs[i] == m_reg[i]);
        check("halt state", halted == m_halt);
      end
    end
    if (m_halt) begin
      repeat (5) @(negedge clk);
      check("stays halted", halted && !retire);
    end
  endtask

  initial begin
    logic [15:0] p [58];
    int retired;
    rst = 1'b1; load_we = 1'b0; load_addr = '0; load_data = '0;
    foreach (n_op[i]) n_op[i] = 0;
    n_taken = 0; n_not_taken = 0; n_carry = 0; n_ovf = 0; n_div0 = 0;
    n_store = 0; n_halt = 0; n_wrap = 0;

    // ---- phase 1: directed program, instruction i at address 2*i ----
    p[0]  = enc(OP_LDI, 0, 5);     p[1]  = enc(OP_STAR, 1, 0);
    p[2]  = enc(OP_LDI, 0, 3);     p[3]  = enc(OP_MUL, 1, 0);     // A = 15
    p[4]  = enc(OP_STAR, 2, 0);    p[5]  = enc(OP_LDI, 0, 14);
    p[6]  = enc(OP_DIV, 1, 0);     p[7]  = enc(OP_STAR, 3, 0);    // R3 = 2
    p[8]  = enc(OP_LDI, 0, 0);     p[9]  = enc(OP_STAR, 4, 0);    // R4 = 0
    p[10] = enc(OP_LDI, 0, 32);    p[11] = enc(OP_STAR, 7, 0);    // R7 = @p[16]
    p[12] = enc(OP_LDI, 0, 7);     p[13] = enc(OP_DIV, 4, 0);     // divide by zero
    p[14] = enc(OP_BRO, 0, 0);     p[15] = enc(OP_LDI, 0, 8'hee); // skipped
    p[16] = enc(OP_BRZ, 0, 0);     p[17] = enc(OP_LDI, 0, 8'hff); // BRZ not taken
    p[18] = enc(OP_ADDC, 1, 0);    p[19] = enc(OP_ADDC, 4, 0);    // 04 C=1, then 05
    p[20] = enc(OP_LDI, 0, 8'h7f); p[21] = enc(OP_ADDC, 1, 0);    // 84, O=1
    p[22] = enc(OP_LDI, 0, 8'h3c); p[23] = enc(OP_STAM, 0, 8'hf0);
    p[24] = enc(OP_LDI, 0, 8'h55); p[25] = enc(OP_XOR, 2, 0);     // 5A
    p[26] = enc(OP_AND, 2, 0);     p[27] = enc(OP_OR, 1, 0);      // 0A, 0F
    p[28] = enc(OP_NEG, 0, 0);     p[29] = enc(OP_RLC, 0, 0);     // F1, E3
    p[30] = enc(OP_RRC, 0, 0);     p[31] = enc(OP_DEC, 0, 0);     // F1, F0
    p[32] = enc(OP_LDAM, 0, 8'hf0); p[33] = enc(OP_LDAR, 3, 0);   // 3C, 02
    p[34] = enc(OP_NOP, 0, 0);
    p[35] = enc(OP_LDI, 0, 82);    p[36] = enc(OP_STAR, 7, 0);    // R7 = @p[41]
    p[37] = enc(OP_LDI, 0, 1);     p[38] = enc(OP_DEC, 0, 0);     // Z=1
    p[39] = enc(OP_BRZ, 0, 0);     p[40] = enc(OP_STOP, 0, 0);    // skipped
    p[41] = enc(OP_BRC, 0, 0);                                    // not taken
    p[42] = enc(OP_LDI, 0, 96);    p[43] = enc(OP_STAR, 7, 0);    // R7 = @p[48]
    p[44] = enc(OP_LDI, 0, 8'h80); p[45] = enc(OP_BRN, 0, 0);     // taken
    p[46] = enc(OP_STOP, 0, 0);    p[47] = enc(OP_NOP, 0, 0);     // skipped
    p[48] = enc(OP_NEG, 0, 0);                                    // 80, C=1 O=1
    p[49] = enc(OP_LDI, 0, 108);   p[50] = enc(OP_STAR, 7, 0);    // R7 = @p[54]
    p[51] = enc(OP_LDI, 0, 0);     p[52] = enc(OP_BRC, 0, 0);     // taken
    p[53] = enc(OP_STOP, 0, 0);
    p[54] = enc(OP_BRN, 0, 0);     p[55] = enc(OP_LDAR, 2, 0);    // not taken; 0F
    p[56] = enc(OP_STAM, 0, 8'hf1); p[57] = enc(OP_STOP, 0, 0);
    foreach (m_mem[i]) m_mem[i] = 8'hc0;   // NOP filler
    foreach (p[i]) begin m_mem[2*i] = p[i][15:8]; m_mem[2*i+1] = p[i][7:0]; end
    load_program();
    run(1000, retired);
    check("directed: halted", halted);
    check($sformatf("directed: %0d instructions retired, 53 expected", retired), retired == 53);
    check("directed: A = 0F", acc == 8'h0f);
    check("directed: R2 = 0F, R3 = 02, R4 = 00",
          dut.u_regfile.regs[2] == 8'h0f && dut.u_regfile.regs[3] == 8'h02 &&
          dut.u_regfile.regs[4] == 8'h00);
    check("directed: R7 = 6C", dut.u_regfile.regs[7] == 8'd108);
    compare_memory("directed");
    check("directed: [F0] = 3C, [F1] = 0F", m_mem[8'hf0] == 8'h3c && m_mem[8'hf1] == 8'h0f);

    // ---- phase 2: random programs ----
    for (int k = 0; k < NPROG; k++) begin
      for (int i = 0; i < 256; i += 2) begin
        int pick;
        logic [4:0] op;
        pick = $urandom % 100;
        if (pick < 1)       op = OP_STOP;
        else if (pick < 3)  op = 5'($urandom);          // any value, unused ones too
        else if (pick < 15) op = opcode_e'(5'b10000 + ($urandom % 4)); // branches
        else                op = 5'($urandom % 15);     // 00000..01110
        m_mem[i]   = {op, 3'($urandom)};
        m_mem[i+1] = 8'($urandom);
      end
      load_program();
      run(NSTEP, retired);
      compare_memory($sformatf("random program %0d", k));
    end

    // ---- every mechanism must have happened ----
    begin
      logic [4:0] used [20] = '{5'b00000, 5'b00001, 5'b00010, 5'b00011, 5'b00100,
                                5'b00101, 5'b00110, 5'b00111, 5'b01000, 5'b01001,
                                5'b01010, 5'b01011, 5'b01100, 5'b01101, 5'b01110,
                                5'b10000, 5'b10001, 5'b10010, 5'b10011, 5'b11000};
      foreach (used[i]) check($sformatf("opcode %05b executed", used[i]), n_op[used[i]] > 0);
    end
    check("STOP executed", n_op[31] > 0 && n_halt > 0);
    check("branch taken", n_taken > 0);
    check("branch not taken", n_not_taken > 0);
    check("carry out", n_carry > 0);
    check("overflow", n_ovf > 0);
    check("divide by zero", n_div0 > 0);
    check("store to memory", n_store > 0);
    check("PC wrap-around", n_wrap > 0);
    $display("mechanisms: taken=%0d not_taken=%0d carry=%0d overflow=%0d div0=%0d store=%0d halt=%0d wrap=%0d",
             n_taken, n_not_taken, n_carry, n_ovf, n_div0, n_store, n_halt, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
