// Self-checking test of the ACARM7 core. A small ARM program, encoded by the
// helper functions below, runs from a word memory with random wait states.
// It exercises data processing with immediate and register shifts, flags
// and conditional execution, forwarding, all multiply forms, word / byte /
// halfword / signed loads and stores, block transfers with write-back, swap,
// branch and link, SWI, an undefined instruction and an IRQ. The program
// stores its results to memory; the test compares them with values worked
// out by hand, and checks the length of each multiplication in cycles
// (2 to 7 by the multiplier size) and that each mechanism happened.
module tb_acarm7_core;
  import acarm7_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, irq = 1'b0, fiq = 1'b0;
  logic        bus_req, bus_write, bus_ready;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  size_e       bus_size;
  logic        retire, fwd_used, exc_taken;
  logic [2:0]  ex_state;

  acarm7_core dut (.clk, .rst_n, .irq, .fiq, .bus_req, .bus_addr, .bus_write, .bus_size,
                   .bus_wdata, .bus_rdata, .bus_ready, .retire, .ex_state_o(ex_state),
                   .fwd_used, .exc_taken);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ memory
  logic [31:0] mem [4096];
  logic        wait_en = 1'b0;
  always_ff @(posedge clk) bus_ready <= !wait_en || ($urandom_range(3) != 0);
  assign bus_rdata = mem[bus_addr[13:2]];
  always_ff @(posedge clk) if (bus_req && bus_ready && bus_write) begin
    unique case (bus_size)
      SZ_BYTE: mem[bus_addr[13:2]][8*bus_addr[1:0] +: 8] <= bus_wdata[8*bus_addr[1:0] +: 8];
      SZ_HALF: mem[bus_addr[13:2]][16*bus_addr[1] +: 16] <= bus_wdata[16*bus_addr[1] +: 16];
      default: mem[bus_addr[13:2]] <= bus_wdata;
    endcase
  end

  // ---------------------------------------------------------- assembler
  localparam logic [3:0] AL = 4'hE, EQ = 4'h0, NE = 4'h1, GE = 4'hA, LT = 4'hB;
  int pcw = 0;   // word address of the next instruction
  function automatic logic [31:0] dpi(aluop_e op, bit s, int rn, int rd, int rot, int imm8);
    return {AL, 3'b001, op, s, 4'(rn), 4'(rd), 4'(rot), 8'(imm8)};
  endfunction
  function automatic logic [31:0] dpr(aluop_e op, bit s, int rn, int rd, int rm, int sh = 0, int amt = 0);
    return {AL, 3'b000, op, s, 4'(rn), 4'(rd), 5'(amt), 2'(sh), 1'b0, 4'(rm)};
  endfunction
  function automatic logic [31:0] dprs(aluop_e op, bit s, int rn, int rd, int rm, int sh, int rs);
    return {AL, 3'b000, op, s, 4'(rn), 4'(rd), 4'(rs), 1'b0, 2'(sh), 1'b1, 4'(rm)};
  endfunction
  function automatic logic [31:0] cnd(logic [3:0] c, logic [31:0] i);
    return {c, i[27:0]};
  endfunction
  function automatic logic [31:0] ldst(bit l, bit b, int rn, int rd, int off, bit p = 1, bit u = 1, bit w = 0);
    return {AL, 3'b010, p, u, b, w, l, 4'(rn), 4'(rd), 12'(off)};
  endfunction
  function automatic logic [31:0] ldsth(bit l, bit s, bit h, int rn, int rd, int off);
    return {AL, 3'b000, 1'b1, 1'b1, 1'b1, 1'b0, l, 4'(rn), 4'(rd), 4'(off >> 4), 1'b1, s, h, 1'b1, 4'(off)};
  endfunction
  function automatic logic [31:0] ldm(bit l, bit p, bit u, bit w, int rn, logic [15:0] list, bit s = 0);
    return {AL, 3'b100, p, u, s, w, l, 4'(rn), list};
  endfunction
  function automatic logic [31:0] mul(bit a, bit s, int rd, int rn, int rs, int rm);
    return {AL, 6'b000000, a, s, 4'(rd), 4'(rn), 4'(rs), 4'b1001, 4'(rm)};
  endfunction
  function automatic logic [31:0] mull(bit sg, bit a, int hi, int lo, int rs, int rm);
    return {AL, 5'b00001, sg, a, 1'b0, 4'(hi), 4'(lo), 4'(rs), 4'b1001, 4'(rm)};
  endfunction
  function automatic logic [31:0] swp(bit b, int rn, int rd, int rm);
    return {AL, 5'b00010, b, 2'b00, 4'(rn), 4'(rd), 4'b0000, 4'b1001, 4'(rm)};
  endfunction
  function automatic logic [31:0] br(logic [3:0] c, bit l, int from_w, int to_w);
    return {c, 3'b101, l, 24'(to_w - from_w - 2)};
  endfunction
  function automatic logic [31:0] msr_c(int rm);       // MSR CPSR_c, Rm
    return {AL, 5'b00010, 1'b0, 2'b10, 4'b0001, 4'b1111, 8'd0, 4'(rm)};
  endfunction
  function automatic logic [31:0] mrs(bit r, int rd);
    return {AL, 5'b00010, r, 6'b001111, 4'(rd), 12'd0};
  endfunction
  task automatic emit(logic [31:0] i);
    mem[pcw] = i;
    pcw++;
  endtask

  // Result area at byte 0x1000 (word 0x400); r10 points to it.
  localparam int RES = 32'h400;
  int slot = 0;
  task automatic store_res(int r);   // STR r, [r10, #4*slot]
    emit(ldst(0, 0, 10, r, 4 * slot));
    slot++;
  endtask

  int und_w, swi_w, irq_w, sub_w, skip_w;

  initial begin
    for (int i = 0; i < 4096; i++) mem[i] = 32'd0;
    // vectors
    pcw = 0;  emit(br(AL, 0, 0, 16));        // reset -> 0x40
    // handlers at 0x200 (word 0x80)
    und_w = 32'h80; swi_w = 32'h88; irq_w = 32'h90; sub_w = 32'hA0;
    pcw = 1;  emit(br(AL, 0, 1, und_w));
    pcw = 2;  emit(br(AL, 0, 2, swi_w));
    pcw = 6;  emit(br(AL, 0, 6, irq_w));
    // undefined handler: r12 = 0x55, return to next instruction
    pcw = und_w; emit(dpi(OP_MOV, 0, 0, 12, 0, 8'h55)); emit(dpr(OP_MOV, 1, 0, 15, 14));
    // SWI handler: r11 = 0x77 (in SVC bank r11 is shared), return
    pcw = swi_w; emit(dpi(OP_MOV, 0, 0, 11, 0, 8'h77)); emit(dpr(OP_MOV, 1, 0, 15, 14));
    // IRQ handler: r9 = 0x99, acknowledge by a store to 0x2000, return
    pcw = irq_w; emit(dpi(OP_MOV, 0, 0, 9, 0, 8'h99));
                 emit(dpi(OP_MOV, 0, 0, 8, 10, 8'h02));       // r8 = 0x2000 (IRQ bank shares r8)
                 emit(ldst(0, 0, 8, 9, 0));
                 emit(dpi(OP_SUB, 1, 14, 15, 0, 4));          // SUBS pc, lr, #4
    // subroutine: r7 = r7 + 3, return
    pcw = sub_w; emit(dpi(OP_ADD, 0, 7, 7, 0, 3)); emit(dpr(OP_MOV, 0, 0, 15, 14));

    // main program at 0x40
    pcw = 16;
    emit(dpi(OP_MOV, 0, 0, 10, 10, 1));        // r10 = 0x1000
    emit(dpi(OP_MOV, 0, 0, 0, 0, 5));          // r0 = 5
    emit(dpi(OP_MOV, 0, 0, 1, 0, 7));          // r1 = 7
    emit(dpr(OP_ADD, 0, 0, 2, 1));             // r2 = 12
    emit(dpr(OP_ADD, 0, 2, 3, 2, 0, 3));       // r3 = r2 + (r2 << 3) = 108 (forwarded)
    store_res(2); store_res(3);                // 0, 1
    emit(dpi(OP_RSB, 0, 0, 4, 0, 100));        // r4 = 95
    store_res(4);                              // 2
    emit(dprs(OP_MOV, 0, 0, 5, 1, 0, 0));      // r5 = 7 << 5 = 224
    emit(dprs(OP_MOV, 0, 0, 6, 4, 2, 0));      // r6 = 95 asr 5 = 2
    store_res(5); store_res(6);                // 3, 4
    emit(dpr(OP_CMP, 1, 0, 0, 1));             // 5 - 7: LT
    emit(cnd(LT, dpi(OP_MOV, 0, 0, 7, 0, 1)));
    emit(cnd(GE, dpi(OP_MOV, 0, 0, 7, 0, 2))); // r7 = 1
    store_res(7);                              // 5
    emit(dpi(OP_MVN, 0, 0, 8, 0, 0));          // r8 = 0xFFFFFFFF
    emit(dpi(OP_ADD, 1, 8, 9, 0, 1));          // r9 = 0, C = 1, Z = 1
    emit(dpi(OP_ADC, 0, 0, 9, 0, 0));          // r9 = 5 + 0 + 1 = 6
    emit(cnd(EQ, dpi(OP_ADD, 0, 9, 9, 0, 16)));// EQ (Z still 1): r9 = 22
    store_res(9);                              // 6
    emit(mul(0, 0, 11, 0, 1, 0));              // r11 = 5 * 7 = 35  (2 cycles)
    store_res(11);                             // 7
    emit(mull(0, 0, 12, 11, 8, 8));            // UMULL 0xFFFFFFFF^2 (6 cycles)
    store_res(11); store_res(12);              // 8, 9
    emit(mull(1, 0, 12, 11, 8, 8));            // SMULL -1 * -1 = 1  (3 cycles)
    store_res(11); store_res(12);              // 10, 11
    emit(mul(1, 0, 11, 4, 1, 0));              // MLA r11 = 5*7 + 95 = 130 (3 cycles)
    store_res(11);                             // 12
    emit(dpr(OP_MOV, 0, 0, 12, 0));            // r12 = 5
    emit(mull(0, 1, 12, 11, 8, 8));            // UMLAL {r12,r11} += 0xFFFFFFFE_00000001 (7 cycles)
    store_res(11); store_res(12);              // 13, 14
    // byte / halfword transfers
    emit(dpi(OP_MOV, 0, 0, 2, 0, 8'hF0));      // r2 = 0xF0
    emit(ldst(0, 1, 10, 2, 4 * 40 + 1));       // STRB r2 -> byte 1 of slot 40
    emit(ldsth(0, 0, 1, 10, 2, 4 * 41 + 2));   // STRH r2 -> upper half of slot 41
    emit(ldst(1, 1, 10, 3, 4 * 40 + 1));       // LDRB r3 = 0xF0
    emit(ldsth(1, 1, 0, 10, 4, 4 * 40 + 1));   // LDRSB r4 = 0xFFFFFFF0
    emit(ldsth(1, 0, 1, 10, 5, 4 * 41 + 2));   // LDRH r5 = 0x00F0
    emit(dpr(OP_ADD, 0, 3, 6, 4));             // r6 = r3 + r4 = 0xE0 (load forwarded)
    store_res(3); store_res(4); store_res(5); store_res(6);   // 15..18
    // block transfers: r11 = 0x1100, STMIA r11!, {r0,r1,r2}; LDMDB r11!, {r4,r5,r6}
    emit(dpi(OP_ADD, 0, 10, 11, 0, 8'hFF));    // r11 = 0x10FF
    emit(dpi(OP_ADD, 0, 11, 11, 0, 1));        // r11 = 0x1100
    emit(ldm(0, 0, 1, 1, 11, 16'h0007));       // STMIA r11!, {r0-r2}
    emit(ldm(1, 1, 0, 1, 11, 16'h0070));       // LDMDB r11!, {r4-r6}
    store_res(4); store_res(5); store_res(6); store_res(11);  // 19..22
    // swap: slot 42 holds 0x1234 (preset), SWP r3, r0, [r12] with r12 = &slot42
    emit(dpi(OP_ADD, 0, 10, 12, 0, 4 * 42));
    emit(swp(0, 12, 3, 0));
    store_res(3);                              // 23
    // branch and link
    emit(dpi(OP_MOV, 0, 0, 7, 0, 10));
    emit(br(AL, 1, pcw, sub_w));               // BL sub: r7 = 13
    store_res(7);                              // 24
    // branch over a store
    skip_w = pcw + 3;
    emit(br(AL, 0, pcw, skip_w));
    emit(dpi(OP_MOV, 0, 0, 7, 0, 8'hEE));      // skipped
    emit(dpi(OP_MOV, 0, 0, 7, 0, 8'hEF));      // skipped
    store_res(7);                              // 25: still 13
    // SWI and undefined instruction
    emit({AL, 4'b1111, 24'h000001});
    store_res(11);                             // 26: 0x77
    emit({AL, 4'b1110, 24'h000010});           // coprocessor data op -> undefined
    store_res(12);                             // 27: 0x55
    // enable IRQ (stay in SVC mode), then spin a few instructions
    emit(dpi(OP_MOV, 0, 0, 1, 0, 8'h13));      // r1 = SVC mode, I = F = 0
    emit(msr_c(1));
    for (int k = 0; k < 12; k++) emit(dpi(OP_ADD, 0, 0, 0, 0, 0));
    store_res(9);                              // 28: 0x99 from the IRQ handler
    emit(mrs(0, 2));
    store_res(2);                              // 29: CPSR = Z,C set, SVC mode
    // done marker: store to 0x3000
    emit(dpi(OP_MOV, 0, 0, 8, 10, 3));
    emit(ldst(0, 0, 8, 0, 0));
    emit(br(AL, 0, pcw, pcw));                 // spin

    mem[RES + 42] = 32'h0000_1234;
  end

  // IRQ source: raised after the MSR enables it, cleared by the handler store.
  int cyc = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (bus_req && bus_ready && bus_write && bus_addr == 32'h2000) irq <= 1'b0;
  end

  // mechanism counters and multiply lengths
  int mul_runs[$];
  int run = 0, n_fwd = 0, n_exc = 0, n_shift = 0, n_lsm = 0, n_swp = 0, n_wait = 0;
  always_ff @(posedge clk) if (rst_n) begin
    if (bus_req && !bus_ready) n_wait <= n_wait + 1;
    else begin
      if (ex_state == 3'd5) run <= run + 1;
      else if (run != 0) begin mul_runs.push_back(run); run <= 0; end
      if (fwd_used) n_fwd <= n_fwd + 1;
      if (exc_taken) n_exc <= n_exc + 1;
      if (ex_state == 3'd1) n_shift <= n_shift + 1;
      if (ex_state == 3'd4) n_lsm <= n_lsm + 1;
      if (ex_state == 3'd3) n_swp <= n_swp + 1;
    end
  end

  logic done = 1'b0;
  always_ff @(posedge clk) if (bus_req && bus_ready && bus_write && bus_addr == 32'h3000) done <= 1'b1;

  initial begin
    int exp_runs[5] = '{1, 5, 2, 2, 6};
    logic [31:0] exp [30];
    exp = '{32'd12, 32'd108, 32'd95, 32'd224, 32'd2, 32'd1, 32'd22, 32'd35,
            32'h0000_0001, 32'hFFFF_FFFE, 32'd1, 32'd0, 32'd130,
            32'h0000_0083, 32'h0000_0003,       // UMLAL: {5,130} + {FFFFFFFE,00000001}
            32'hF0, 32'hFFFF_FFF0, 32'hF0, 32'hE0,
            32'd0, 32'd0, 32'd0, 32'h1100,
            32'h1234, 32'd13, 32'd13, 32'h77, 32'h55, 32'h99, 32'h6000_0013};
    // LDMDB after STMIA of {5,7,0xF0}: r4..r6 = 5, 7, 0xF0
    exp[19] = 32'd5; exp[20] = 32'd7; exp[21] = 32'hF0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait_en = 1'b1;
    // raise IRQ once the MSR has executed
    wait (dut.u_rf.cpsr.i == 1'b0);
    repeat (4) @(posedge clk);
    irq = 1'b1;
    wait (done);
    repeat (2) @(posedge clk);
    for (int i = 0; i < 30; i++) check($sformatf("result slot %0d", i), mem[RES + i], exp[i]);
    check("swap wrote memory", mem[RES + 42], 32'd5);
    check("STRB lane", mem[RES + 40], 32'h0000_F000);
    check("STRH lane", mem[RES + 41], 32'h00F0_0000);
    check("STMIA word 0", mem[32'h1100 / 4], 32'd5);
    check("STMIA word 2", mem[32'h1108 / 4], 32'hF0);
    check("multiplications seen", mul_runs.size(), 5);
    for (int i = 0; i < 5 && i < mul_runs.size(); i++)
      check($sformatf("multiply %0d cycles", i), mul_runs[i] + 1, exp_runs[i] + 1);
    check("forwarding used", n_fwd > 0, 1);
    check("exceptions taken (IRQ)", n_exc, 1);
    check("shift sub-FSM used", n_shift > 0, 1);
    check("block transfer used", n_lsm > 0, 1);
    check("swap write state used", n_swp, 1);
    check("wait states seen", n_wait > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
