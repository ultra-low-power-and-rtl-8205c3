// Test of the instruction decoder on hand-encoded ARM instructions of every
// class, checking the class and the fields the execute stage uses.
module tb_decoder;
  import acarm7_pkg::*;
  logic [31:0] instr;
  dec_t d;
  int checks = 0, failures = 0;
  decoder dut (.instr, .d);
  task automatic t(logic [31:0] i, iclass_e cls, string w);
    instr = i; #1;
    checks++;
    if (d.cls !== cls) begin failures++; $display("FAIL %s: class %0d exp %0d", w, d.cls, cls); end
  endtask
  task automatic f(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", w, got, exp); end
  endtask
  initial begin
    t(32'hE0812003, IC_DP, "ADD r2,r1,r3");        f("rd", d.rd, 2); f("rn", d.rn, 1); f("rm", d.rm, 3); f("op", d.op, OP_ADD); f("imm", d.imm, 0);
    t(32'hE3A0A001, IC_DP, "MOV r10,#1");           f("imm", d.imm, 1); f("imm12", d.imm12, 32'h001);
    t(32'hE1A05011, IC_DP, "MOV r5,r1,LSL r0");     f("reg_shift", d.reg_shift, 1); f("rs", d.rs, 0);
    t(32'h11500001, IC_DP, "CMPNE r0,r1");          f("cond", d.cond, 1); f("s", d.s, 1);
    t(32'hE0020091, IC_MUL, "MUL r2,r1,r0");        f("acc", d.mul_acc, 0); f("long", d.mul_long, 0); f("rd", d.rd, 2);
    t(32'hE0A32190, IC_MUL, "UMLAL r2,r3,r0,r1");   f("long", d.mul_long, 1); f("acc", d.mul_acc, 1); f("signed", d.mul_signed, 0); f("hi", d.rd, 3); f("lo", d.rn, 2);
    t(32'hE0C32190, IC_MUL, "SMULL");               f("signed", d.mul_signed, 1);
    t(32'hE1023091, IC_SWP, "SWP r3,r1,[r2]");
    t(32'hE12FFF1E, IC_BX, "BX lr");
    t(32'hE10F0000, IC_MRS, "MRS r0,CPSR");         f("spsr", d.s, 0);
    t(32'hE169F001, IC_MSR, "MSR SPSR_fc,r1");      f("spsr", d.s, 1); f("mask", d.msr_mask, 4'b1001);
    t(32'hE321F013, IC_MSR, "MSR CPSR_c,#0x13");    f("imm", d.imm, 1);
    t(32'hE5912004, IC_LDRSTR, "LDR r2,[r1,#4]");   f("l", d.l, 1); f("p", d.p, 1); f("imm", d.imm, 1);
    t(32'hE7C12003, IC_LDRSTR, "STRB r2,[r1,r3]");  f("b", d.b, 1); f("imm", d.imm, 0);
    t(32'hE1D120F6, IC_LDRH, "LDRSH r2,[r1,#6]");   f("sign", d.h_sign, 1); f("half", d.h_half, 1); f("imm12", d.imm12, 6);
    t(32'hE8BD8010, IC_LDMSTM, "LDMIA sp!,{r4,pc}"); f("list", d.reglist, 32'h8010); f("w", d.w, 1);
    t(32'hEB000010, IC_B, "BL");                    f("link", d.link, 1); f("off", d.boff, 32'h10);
    t(32'hEF000001, IC_SWI, "SWI");
    t(32'hEE000010, IC_UND, "MCR (coprocessor)");
    t(32'hE7F000F0, IC_UND, "undefined");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
