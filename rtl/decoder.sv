// Instruction decoder of the decode stage. It splits a 32-bit ARMv4
// instruction into the record dec_t of acarm7_pkg: the instruction class the
// control logic dispatches on, and the register numbers, immediates and
// option bits the execute stage needs. Thumb and coprocessor instructions
// are not implemented, so coprocessor encodings and the undefined space
// decode as IC_UND and trap. The encodings are those of the ARMv4
// instruction set; the record layout is this design's own. Combinational.
module decoder
  import acarm7_pkg::*;
(
  input  logic [31:0] instr,
  output dec_t        d
);
  always_comb begin
    d = '0;
    d.cond     = instr[31:28];
    d.op       = aluop_e'(instr[24:21]);
    d.s        = instr[20];
    d.rn       = instr[19:16];
    d.rd       = instr[15:12];
    d.rs       = instr[11:8];
    d.rm       = instr[3:0];
    d.imm12    = instr[11:0];
    d.p        = instr[24];
    d.u        = instr[23];
    d.b        = instr[22];
    d.w        = instr[21];
    d.l        = instr[20];
    d.reglist  = instr[15:0];
    d.boff     = instr[23:0];
    d.link     = instr[24];
    d.msr_mask = instr[19:16];
    d.cls      = IC_UND;

    unique casez (instr[27:25])
      3'b000: begin
        if (instr[7:4] == 4'b1001) begin
          if (instr[27:22] == 6'b000000) begin
            d.cls = IC_MUL;
            d.rd = instr[19:16]; d.rn = instr[15:12];
            d.mul_acc = instr[21]; d.mul_signed = 1'b1;
          end else if (instr[27:23] == 5'b00001) begin
            d.cls = IC_MUL;
            d.rd = instr[19:16]; d.rn = instr[15:12];  // RdHi, RdLo
            d.mul_long = 1'b1; d.mul_signed = instr[22]; d.mul_acc = instr[21];
          end else if (instr[27:23] == 5'b00010 && instr[21:20] == 2'b00) begin
            d.cls = IC_SWP;
          end
        end else if (instr[7] && instr[4]) begin
          d.cls = IC_LDRH;
          d.imm = instr[22];
          d.imm12 = {4'd0, instr[11:8], instr[3:0]};
          d.h_sign = instr[6];
          d.h_half = instr[5];
        end else if (instr[27:4] == 24'h12FFF1) begin
          d.cls = IC_BX;
        end else if (instr[24:23] == 2'b10 && !instr[20]) begin
          d.cls = instr[21] ? IC_MSR : IC_MRS;
          d.s = instr[22];  // 1: SPSR
        end else begin
          d.cls = IC_DP;
          d.reg_shift = instr[4];
        end
      end
      3'b001: begin
        d.imm = 1'b1;
        if (instr[24:23] == 2'b10 && !instr[20]) begin
          if (instr[21]) begin d.cls = IC_MSR; d.s = instr[22]; end
        end else d.cls = IC_DP;
      end
      3'b010: begin d.cls = IC_LDRSTR; d.imm = 1'b1; end
      3'b011: if (!instr[4]) d.cls = IC_LDRSTR;
      3'b100: d.cls = IC_LDMSTM;
      3'b101: d.cls = IC_B;
      3'b111: if (instr[24]) d.cls = IC_SWI;
      default: ;
    endcase
  end
endmodule
