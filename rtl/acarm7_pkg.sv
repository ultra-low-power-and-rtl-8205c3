// Shared types and constants of the ACARM7 core: processor modes, the
// compressed program status word, shift types, data processing opcodes,
// the decoded-instruction record that the decoder hands to the execute
// stage, and the mapping of architectural registers onto the 30 physical
// banked registers. The mode encodings, opcodes, condition codes and vector
// addresses are those of the ARMv4 instruction set; the physical register
// numbering and the record layout are this design's own.
package acarm7_pkg;

  typedef enum logic [4:0] {
    MODE_USR = 5'b10000,
    MODE_FIQ = 5'b10001,
    MODE_IRQ = 5'b10010,
    MODE_SVC = 5'b10011,
    MODE_ABT = 5'b10111,
    MODE_UND = 5'b11011,
    MODE_SYS = 5'b11111
  } mode_e;

  // Status register kept in 12 bits: the unused bits of the 32-bit PSR are
  // not stored (they read as zero).
  typedef struct packed {
    logic n, z, c, v;
    logic i, f, t;
    logic [4:0] m;
  } psr_t;

  function automatic logic [31:0] psr_to_word(psr_t p);
    return {p.n, p.z, p.c, p.v, 20'd0, p.i, p.f, p.t, p.m};
  endfunction

  function automatic psr_t word_to_psr(logic [31:0] w);
    psr_t p;
    p.n = w[31]; p.z = w[30]; p.c = w[29]; p.v = w[28];
    p.i = w[7];  p.f = w[6];  p.t = w[5];  p.m = w[4:0];
    return p;
  endfunction

  typedef enum logic [1:0] {SH_LSL = 2'd0, SH_LSR = 2'd1, SH_ASR = 2'd2, SH_ROR = 2'd3} shift_e;

  typedef enum logic [3:0] {
    OP_AND = 4'h0, OP_EOR = 4'h1, OP_SUB = 4'h2, OP_RSB = 4'h3,
    OP_ADD = 4'h4, OP_ADC = 4'h5, OP_SBC = 4'h6, OP_RSC = 4'h7,
    OP_TST = 4'h8, OP_TEQ = 4'h9, OP_CMP = 4'hA, OP_CMN = 4'hB,
    OP_ORR = 4'hC, OP_MOV = 4'hD, OP_BIC = 4'hE, OP_MVN = 4'hF
  } aluop_e;

  // Instruction classes the control logic dispatches on.
  typedef enum logic [3:0] {
    IC_DP,      // data processing
    IC_MRS,     // PSR to register
    IC_MSR,     // register/immediate to PSR
    IC_MUL,     // MUL, MLA, UMULL, UMLAL, SMULL, SMLAL
    IC_SWP,     // SWP, SWPB
    IC_BX,      // branch to register
    IC_LDRSTR,  // word/byte single transfer
    IC_LDRH,    // halfword and signed single transfer
    IC_LDMSTM,  // block transfer
    IC_B,       // B, BL
    IC_SWI,     // software interrupt
    IC_UND      // undefined and coprocessor encodings
  } iclass_e;

  typedef struct packed {
    iclass_e     cls;
    logic [3:0]  cond;
    aluop_e      op;
    logic        s;          // set flags / PSR transfer to SPSR (MRS, MSR) / user bank (LDM/STM)
    logic        imm;        // operand 2 (or offset) is an immediate
    logic [3:0]  rn, rd, rs, rm;
    logic [11:0] imm12;      // raw operand-2 / offset field
    logic        reg_shift;  // shift amount taken from Rs
    logic        p, u, b, w, l;  // transfer flags (pre, up, byte, writeback, load)
    logic        h_half, h_sign; // halfword transfer: H and S bits
    logic        mul_acc, mul_long, mul_signed;
    logic [15:0] reglist;
    logic [23:0] boff;       // branch offset
    logic        link;
    logic [3:0]  msr_mask;   // MSR field mask (f s x c)
  } dec_t;

  // Exception vectors (ARMv4 Table 2.1 of the architecture).
  localparam logic [31:0] VEC_RESET = 32'h00, VEC_UND = 32'h04, VEC_SWI = 32'h08,
                          VEC_PABT  = 32'h0C, VEC_DABT = 32'h10, VEC_IRQ = 32'h18,
                          VEC_FIQ   = 32'h1C;

  // Physical register numbering: 0..14 user/system r0..r14, 15..21 FIQ
  // r8..r14, 22/23 SVC r13/r14, 24/25 ABT, 26/27 IRQ, 28/29 UND. r15 (the PC)
  // lives in the address register, which makes 31 registers in all.
  localparam int NPHYS = 30;
  function automatic logic [4:0] phys_reg(logic [4:0] mode, logic [3:0] r);
    logic [4:0] p;
    p = {1'b0, r};
    if (mode == MODE_FIQ && r >= 4'd8 && r <= 4'd14) p = 5'd15 + 5'(r - 4'd8);
    else if (r == 4'd13 || r == 4'd14) begin
      unique case (mode)
        MODE_SVC: p = 5'd22 + 5'(r - 4'd13);
        MODE_ABT: p = 5'd24 + 5'(r - 4'd13);
        MODE_IRQ: p = 5'd26 + 5'(r - 4'd13);
        MODE_UND: p = 5'd28 + 5'(r - 4'd13);
        default:  p = {1'b0, r};
      endcase
    end
    return p;
  endfunction

  // SPSR slot of a mode: 0 FIQ, 1 IRQ, 2 SVC, 3 ABT, 4 UND, 7 none.
  function automatic logic [2:0] spsr_slot(logic [4:0] mode);
    unique case (mode)
      MODE_FIQ: return 3'd0;
      MODE_IRQ: return 3'd1;
      MODE_SVC: return 3'd2;
      MODE_ABT: return 3'd3;
      MODE_UND: return 3'd4;
      default:  return 3'd7;
    endcase
  endfunction

  // ARM condition field check.
  function automatic logic cond_pass(logic [3:0] cond, psr_t f);
    unique case (cond)
      4'h0: return f.z;
      4'h1: return !f.z;
      4'h2: return f.c;
      4'h3: return !f.c;
      4'h4: return f.n;
      4'h5: return !f.n;
      4'h6: return f.v;
      4'h7: return !f.v;
      4'h8: return f.c && !f.z;
      4'h9: return !f.c || f.z;
      4'hA: return f.n == f.v;
      4'hB: return f.n != f.v;
      4'hC: return !f.z && (f.n == f.v);
      4'hD: return f.z || (f.n != f.v);
      4'hE: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // Memory transfer size on the core bus.
  typedef enum logic [1:0] {SZ_BYTE = 2'd0, SZ_HALF = 2'd1, SZ_WORD = 2'd2} size_e;

endpackage
