// ACARM7 core: a 32-bit processor executing the ARMv4 instruction set
// without Thumb and without coprocessor instructions, in a three-stage
// fetch / decode / execute pipeline with a single memory port.
//
// Fetch reads the instruction at the address register (the PC) into the
// IF/ID register; decode turns it into a dec_t record; execute runs the
// control logic. The control logic is one main state (ST_MAIN), in which
// every single-cycle instruction completes, plus the sub-FSMs of the
// document: load/store (address cycle in ST_MAIN, then ST_LS_DATA, ST_SWP_W
// for a swap and ST_LSM for block transfers), shift (ST_MAIN reads the shift
// register Rs, ST_SHIFT executes), multiply (ST_MUL, sequenced by mul_fsm)
// and branch (the target is computed and loaded in one state, ST_BR2 then
// refills the pipeline). Any write to r15 goes through the branch sub-FSM.
//
// Registers are read in the execute stage through two read ports. Results
// are written to the register file one cycle later from a write-back
// register; the forwarding unit hands that pending value to the next
// instruction. r15 reads as the instruction address + 8 (+12 in the second
// cycle of a register-shift operation and as store data).
//
// Exceptions: reset, undefined instruction (including coprocessor
// encodings), SWI, IRQ and FIQ, entered with the ARM rules (banked r14 and
// SPSR, mode change, I/F masking, vector). IRQ and FIQ are taken between
// instructions. There is no abort input: the bus of this system reports no
// errors.
//
// The combinational part of execute is three always_comb blocks in one
// direction: operand selection, then sequencing and bus control, then
// write-back of registers, PSRs and PC; none reads a later block's output.
//
// Bus: bus_req/addr/write/size/wdata are valid during a cycle, and the
// access completes in the first cycle in which bus_ready is high; the whole
// core holds while a requested access is not ready. bus_size is the
// transfer size; write data is already copied to all byte lanes.
//
// Timing (zero wait states): data processing 1 cycle, register-specified
// shift 2, LDR 2 (the loaded value is forwarded to the next instruction),
// STR 2, LDM/STM 1 + registers, SWP 3, MUL 2 to 7, taken branch 3.
// The stage structure, the FSM split and the multiply schedule follow the
// document; register reads in the execute stage, the write-back register
// and the exact cycle of each step are this design's own choices.
module acarm7_core
  import acarm7_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        irq,
  input  logic        fiq,
  output logic        bus_req,
  output logic [31:0] bus_addr,
  output logic        bus_write,
  output size_e       bus_size,
  output logic [31:0] bus_wdata,
  input  logic [31:0] bus_rdata,
  input  logic        bus_ready,
  // observation of the control logic (for tests and the wrapper)
  output logic        retire,       // an instruction finished this cycle
  output logic [2:0]  ex_state_o,
  output logic        fwd_used,     // forwarding unit bypassed a read
  output logic        exc_taken     // an exception entry started
);
  typedef enum logic [2:0] {
    ST_MAIN, ST_SHIFT, ST_LS_DATA, ST_SWP_W, ST_LSM, ST_MUL, ST_BR2
  } exst_e;

  typedef enum logic [1:0] {EK_NONE, EK_IRQ, EK_FIQ} ekind_e;

  // ---------------------------------------------------------------- state
  logic        d_valid;
  logic [31:0] d_instr, d_pc;
  dec_t        d_dec;

  logic        e_valid;
  dec_t        e;
  logic [31:0] e_pc;
  ekind_e      e_kind;
  exst_e       e_st;

  logic [7:0]  rs_q;
  logic [31:0] dar;            // data address
  logic [31:0] swap_q;
  logic [15:0] lsm_list;
  logic [31:0] lsm_wb;
  logic        lsm_usr;
  logic [31:0] mcand_q, mplier_q;
  logic [39:0] prod_q;
  logic [63:0] acc_q;

  logic        wb_valid;
  logic [4:0]  wb_addr;
  logic [31:0] wb_data;

  // ------------------------------------------------------------ datapath
  psr_t        cpsr, spsr_cur, cpsr_n, spsr_n;
  logic        cpsr_we, spsr_we;
  logic [2:0]  spsr_wslot;
  logic [4:0]  ra_p, rb_p;
  logic [31:0] ra_rf, rb_rf, ra_fw, rb_fw;
  logic        fwd_a, fwd_b;
  logic [3:0]  ra_r, rb_r;
  logic [4:0]  rd_mode;
  logic [31:0] r15_val, opa, opb;

  logic        w_en;
  logic [3:0]  w_reg;
  logic [4:0]  w_mode;
  logic [31:0] w_data;

  logic [31:0] sh_din, sh_out;
  logic [7:0]  sh_amt;
  shift_e      sh_type;
  logic        sh_immf, sh_cout;

  aluop_e      alu_op;
  logic [31:0] alu_a, alu_res;
  logic        alu_mul, alu_n, alu_z, alu_c, alu_v;
  logic [63:0] alu_prod, alu_res64;

  logic        mul_en, mul_bsigned;
  logic [31:0] mul_a;
  logic [7:0]  mul_b;
  logic [39:0] mul_p;
  logic [2:0]  mstate;
  logic [1:0]  mslice, mnb;
  logic        mlast, mdone, mstart;

  size_e       ls_size;
  logic        ls_sign;
  logic [31:0] ld_data, st_data_reg, st_data_bus;

  logic        pc_ld;
  logic [1:0]  pc_sel;
  logic [31:0] pc, pc_inc, pc_alu, pc_lsm, pc_vec;

  logic        adv, flush, ex_done, ex_bus, take_exc, d_take, fetch;
  exst_e       e_st_n;
  logic        cond_ok;

  regfile u_rf (
    .clk, .rst_n,
    .ra_addr(ra_p), .ra_data(ra_rf), .rb_addr(rb_p), .rb_data(rb_rf),
    .we(wb_valid), .waddr(wb_addr), .wdata(wb_data),
    .cpsr(cpsr), .cpsr_we(cpsr_we && adv), .cpsr_wdata(cpsr_n),
    .spsr_rslot(spsr_slot(cpsr.m)), .spsr_rdata(spsr_cur),
    .spsr_we(spsr_we && adv), .spsr_wslot(spsr_wslot), .spsr_wdata(spsr_n)
  );

  forwarding_unit #(.AW(5)) u_fwd (
    .ra_addr(ra_p), .ra_rf(ra_rf), .rb_addr(rb_p), .rb_rf(rb_rf),
    .wb_valid(wb_valid), .wb_addr(wb_addr), .wb_data(wb_data),
    .ra_data(ra_fw), .rb_data(rb_fw), .fwd_a(fwd_a), .fwd_b(fwd_b)
  );

  decoder u_dec (.instr(d_instr), .d(d_dec));

  barrel_shifter u_bs (
    .din(sh_din), .amount(sh_amt), .stype(sh_type), .imm_form(sh_immf),
    .cin(cpsr.c), .dout(sh_out), .cout(sh_cout)
  );

  alu u_alu (
    .op(alu_op), .a(alu_a), .b(sh_out), .c_in(cpsr.c), .v_in(cpsr.v), .sh_cout(sh_cout),
    .mul(alu_mul), .acc(acc_q), .prod(alu_prod),
    .res(alu_res), .res64(alu_res64), .n(alu_n), .z(alu_z), .c(alu_c), .v(alu_v)
  );

  ling_mul_32x8 u_mul (
    .en(mul_en), .a(mul_a), .b(mul_b), .a_signed(e.mul_signed), .b_signed(mul_bsigned), .p(mul_p)
  );

  mul_fsm u_mfsm (
    .clk, .rst_n, .en(adv), .start(mstart), .acc(e.mul_acc), .long_res(e.mul_long),
    .signed_op(e.mul_signed), .mplier(opb), .state(mstate), .slice(mslice),
    .last_slice(mlast), .nbytes_m1(mnb), .done(mdone)
  );

  rw_data_sel u_rwsel (
    .size(ls_size), .addr_lo(dar[1:0]), .sign(ls_sign), .mem_rdata(bus_rdata),
    .rdata(ld_data), .reg_wdata(st_data_reg), .mem_wdata(st_data_bus)
  );

  addr_reg u_ar (
    .clk, .rst_n, .ld(pc_ld && adv), .sel(pc_sel), .alu_in(pc_alu), .lsm_in(pc_lsm),
    .vec_in(pc_vec), .pc(pc), .pc_inc(pc_inc)
  );

  assign adv = !bus_req || bus_ready;

  // Number of registers in a block transfer.
  function automatic logic [4:0] popcnt16(logic [15:0] v);
    logic [4:0] c;
    c = '0;
    for (int i = 0; i < 16; i++) c += 5'(v[i]);
    return c;
  endfunction

  function automatic logic [3:0] lowest16(logic [15:0] v);
    logic [3:0] r;
    r = '0;
    for (int i = 15; i >= 0; i--) if (v[i]) r = 4'(i);
    return r;
  endfunction

  // Apply an MSR field mask to a PSR.
  function automatic psr_t msr_apply(psr_t old, logic [31:0] val, logic [3:0] mask, logic priv);
    psr_t p;
    p = old;
    if (mask[3]) begin p.n = val[31]; p.z = val[30]; p.c = val[29]; p.v = val[28]; end
    if (mask[0] && priv) begin p.i = val[7]; p.f = val[6]; p.m = val[4:0]; end
    return p;
  endfunction

  // ------------------------------------------ register read port selection
  // Which architectural registers the two read ports address in this
  // execute cycle, in which mode bank, and what r15 reads as.
  always_comb begin
    ra_r    = e.rn;
    rb_r    = e.rm;
    rd_mode = cpsr.m;
    r15_val = e_pc + 32'd8;
    unique case (e_st)
      ST_MAIN: begin
        if (e.cls == IC_DP && e.reg_shift) ra_r = e.rs;
        if (e.cls == IC_MUL) begin ra_r = e.rm; rb_r = e.rs; end
      end
      ST_SHIFT:   r15_val = e_pc + 32'd12;
      ST_LS_DATA: begin ra_r = e.rd; r15_val = e_pc + 32'd12; end
      ST_LSM: begin
        ra_r = lowest16(lsm_list); r15_val = e_pc + 32'd12;
        if (lsm_usr) rd_mode = MODE_USR;
      end
      ST_MUL: rb_r = e.rd;
      default: ;
    endcase
    ra_p = phys_reg(rd_mode, ra_r);
    rb_p = phys_reg(rd_mode, rb_r);
    opa  = (ra_r == 4'd15) ? r15_val : ra_fw;
    opb  = (rb_r == 4'd15) ? r15_val : rb_fw;
  end

  // --------------------------------------------------- execute control
  logic [4:0]  lsm_cnt;
  logic [31:0] lsm_base_lo, lsm_wb_n;
  logic [3:0]  lsm_r;
  logic [15:0] lsm_rest;
  logic        is_test;
  logic [63:0] prod_ext;
  logic [4:0]  exc_mode;
  logic [31:0] exc_ret;

  // The execute stage is described by three combinational blocks that feed
  // each other in one direction only: operand selection (inputs of the
  // shifter, ALU, multiplier and load/store data path) -> sequencing and bus
  // control (next sub-FSM state, completion, flush, fetch) -> write-back
  // (register file, PSRs, address register). None of them reads a value
  // produced by a later one, so there is no combinational feedback.
  logic dp_fin, exc_entry;

  assign cond_ok   = cond_pass(e.cond, cpsr);
  assign is_test   = (e.op inside {OP_TST, OP_TEQ, OP_CMP, OP_CMN});
  assign prod_ext  = e.mul_signed ? {{24{prod_q[39]}}, prod_q} : {24'd0, prod_q};
  assign exc_entry = e_valid && e_st == ST_MAIN &&
                     (e_kind != EK_NONE || (cond_ok && (e.cls == IC_SWI || e.cls == IC_UND)));
  assign mstart    = e_valid && e_st == ST_MAIN && e_kind == EK_NONE && cond_ok &&
                     e.cls == IC_MUL;
  // a data-processing instruction completes in MAIN, or in SHIFT after the
  // shift sub-FSM has read Rs
  assign dp_fin    = e_valid && e.cls == IC_DP && e_kind == EK_NONE && cond_ok &&
                     ((e_st == ST_MAIN && !e.reg_shift) || e_st == ST_SHIFT);

  // ------------------------------------------------ operand selection
  always_comb begin
    sh_din   = opb;
    sh_amt   = {3'b000, e.imm12[11:7]};
    sh_type  = shift_e'(e.imm12[6:5]);
    sh_immf  = 1'b1;
    alu_op   = e.op;
    alu_a    = opa;
    alu_mul  = 1'b0;
    alu_prod = '0;
    mul_en   = 1'b0;
    mul_a    = '0;
    mul_b    = '0;
    mul_bsigned = 1'b0;
    ls_size  = SZ_WORD;
    ls_sign  = 1'b0;
    st_data_reg = opa;

    // transfer size of single transfers
    if (e.cls == IC_LDRH) begin
      ls_size = e.h_half ? SZ_HALF : SZ_BYTE;
      ls_sign = e.h_sign;
    end else if (e.cls == IC_SWP || e.cls == IC_LDRSTR) begin
      ls_size = e.b ? SZ_BYTE : SZ_WORD;
    end

    if (e_valid) begin
      unique case (e_st)
        ST_MAIN: if (!exc_entry && cond_ok) begin
          unique case (e.cls)
            IC_DP: if (!e.reg_shift && e.imm) begin
              sh_din = {24'd0, e.imm12[7:0]}; sh_amt = {3'b000, e.imm12[11:8], 1'b0};
              sh_type = SH_ROR; sh_immf = 1'b0;
            end
            IC_MSR: begin
              if (e.imm) begin
                sh_din = {24'd0, e.imm12[7:0]}; sh_amt = {3'b000, e.imm12[11:8], 1'b0};
                sh_type = SH_ROR; sh_immf = 1'b0;
              end else begin
                sh_din = opb; sh_amt = 8'd0; sh_immf = 1'b0;
              end
            end
            IC_BX: begin
              sh_din = opb; sh_amt = 8'd0; sh_immf = 1'b0; alu_op = OP_MOV;
            end
            IC_B: begin
              alu_a = r15_val; alu_op = OP_ADD;
              sh_din = {{6{e.boff[23]}}, e.boff, 2'b00}; sh_amt = 8'd0; sh_immf = 1'b0;
            end
            IC_LDRSTR, IC_LDRH: begin
              // address cycle: Rn +/- offset
              alu_op = e.u ? OP_ADD : OP_SUB;
              if (e.cls == IC_LDRH || e.imm) begin
                sh_din = (e.imm) ? {20'd0, e.imm12} : opb; sh_amt = 8'd0; sh_immf = 1'b0;
              end
            end
            IC_MUL: begin
              // C0 of the multiplication sub-FSM: first partial product
              mul_en = 1'b1; mul_a = opa; mul_b = opb[7:0];
              mul_bsigned = e.mul_signed && (mnb == 2'd0);
            end
            default: ;
          endcase
        end
        ST_SHIFT: begin
          sh_amt = rs_q; sh_immf = 1'b0;
        end
        ST_SWP_W: st_data_reg = opb;
        ST_MUL: if (mstate != 3'd2 && mstate != 3'd7) begin
          // A1..A4: add the previous partial product, form the next one
          alu_mul = 1'b1;
          alu_prod = prod_ext << (8 * (mstate - 3'd3));
          mul_en = !mlast; mul_a = mcand_q; mul_b = mplier_q[8*mslice +: 8];
          mul_bsigned = e.mul_signed && (mslice == mnb);
        end
        default: ;
      endcase
    end
  end

  // ------------------------------------------ sequencing and bus control
  always_comb begin
    e_st_n    = e_st;
    ex_done   = 1'b0;
    ex_bus    = 1'b0;
    flush     = 1'b0;
    bus_req   = 1'b0;
    bus_addr  = pc;
    bus_write = 1'b0;
    bus_size  = SZ_WORD;
    bus_wdata = st_data_bus;
    lsm_cnt   = popcnt16(e.reglist);
    lsm_r     = lowest16(lsm_list);
    lsm_rest  = lsm_list;
    lsm_rest[lsm_r] = 1'b0;

    if (e_valid) begin
      unique case (e_st)
        ST_MAIN: begin
          if (exc_entry) begin
            flush = 1'b1; e_st_n = ST_BR2;
          end else if (!cond_ok) begin
            ex_done = 1'b1;
          end else begin
            unique case (e.cls)
              IC_DP:   if (e.reg_shift) e_st_n = ST_SHIFT;   // shift sub-FSM
              IC_BX, IC_B: begin flush = 1'b1; e_st_n = ST_BR2; end
              IC_LDRSTR, IC_LDRH, IC_SWP: e_st_n = ST_LS_DATA;
              IC_LDMSTM: if (lsm_cnt == 5'd0) ex_done = 1'b1;
                         else e_st_n = ST_LSM;
              IC_MUL:  e_st_n = ST_MUL;
              default: ex_done = 1'b1;
            endcase
          end
        end

        ST_SHIFT: ;   // completes through dp_fin below

        ST_LS_DATA: begin
          ex_bus = 1'b1;
          bus_req = 1'b1; bus_addr = dar; bus_size = ls_size;
          bus_write = (e.cls != IC_SWP) && !e.l;
          if (e.cls == IC_SWP) e_st_n = ST_SWP_W;
          else if (e.l && e.rd == 4'd15) begin flush = 1'b1; e_st_n = ST_BR2; end
          else ex_done = 1'b1;
        end

        ST_SWP_W: begin
          ex_bus = 1'b1;
          bus_req = 1'b1; bus_addr = dar; bus_size = ls_size; bus_write = 1'b1;
          ex_done = 1'b1;
        end

        ST_LSM: begin
          ex_bus = 1'b1;
          bus_req = 1'b1; bus_addr = dar; bus_size = SZ_WORD; bus_write = !e.l;
          if (lsm_rest == 16'd0) begin
            if (e.l && lsm_r == 4'd15) begin flush = 1'b1; e_st_n = ST_BR2; end
            else ex_done = 1'b1;
          end
        end

        ST_MUL: if (mdone) ex_done = 1'b1;

        ST_BR2: ex_done = 1'b1;   // refill: the fetch stage reads the target

        default: ex_done = 1'b1;
      endcase
    end

    if (dp_fin) begin
      if (!is_test && e.rd == 4'd15) begin flush = 1'b1; e_st_n = ST_BR2; end
      else ex_done = 1'b1;
    end

    // ----------------------------------------------------- pipeline flow
    take_exc = (!e_valid || ex_done) && !flush &&
               ((fiq && !cpsr.f) || (irq && !cpsr.i));
    d_take   = (!e_valid || ex_done) && !take_exc;
    fetch    = !ex_bus && !flush && (!d_valid || d_take);
    if (fetch) begin
      bus_req = 1'b1; bus_addr = pc; bus_write = 1'b0; bus_size = SZ_WORD;
    end
  end

  // ------------------------------------- write-back, PSRs, address register
  always_comb begin
    w_en     = 1'b0;
    w_reg    = e.rd;
    w_mode   = cpsr.m;
    w_data   = alu_res;
    cpsr_we  = 1'b0;
    cpsr_n   = cpsr;
    spsr_we  = 1'b0;
    spsr_wslot = spsr_slot(cpsr.m);
    spsr_n   = cpsr;
    pc_ld    = 1'b0;
    pc_sel   = 2'd0;
    pc_alu   = alu_res;
    pc_lsm   = ld_data;
    pc_vec   = VEC_RESET;
    exc_mode = MODE_SVC;
    exc_ret  = e_pc + 32'd4;
    lsm_base_lo = '0;
    lsm_wb_n = '0;

    if (e_valid) begin
      unique case (e_st)
        ST_MAIN: begin
          if (exc_entry) begin
            // ---- exception entry
            unique case (e_kind)
              EK_IRQ: begin exc_mode = MODE_IRQ; pc_vec = VEC_IRQ; end
              EK_FIQ: begin exc_mode = MODE_FIQ; pc_vec = VEC_FIQ; end
              default: begin
                if (e.cls == IC_SWI) begin exc_mode = MODE_SVC; pc_vec = VEC_SWI; end
                else                 begin exc_mode = MODE_UND; pc_vec = VEC_UND; end
              end
            endcase
            w_en = 1'b1; w_reg = 4'd14; w_mode = exc_mode; w_data = exc_ret;
            spsr_we = 1'b1; spsr_wslot = spsr_slot(exc_mode); spsr_n = cpsr;
            cpsr_we = 1'b1; cpsr_n.m = exc_mode; cpsr_n.i = 1'b1;
            if (e_kind == EK_FIQ) cpsr_n.f = 1'b1;
            pc_ld = 1'b1; pc_sel = 2'd3;
          end else if (cond_ok) begin
            unique case (e.cls)
              IC_MRS: begin
                w_en = 1'b1; w_data = psr_to_word(e.s ? spsr_cur : cpsr);
              end
              IC_MSR: begin
                if (e.s) begin
                  spsr_we = (spsr_slot(cpsr.m) != 3'd7);
                  spsr_n  = msr_apply(spsr_cur, sh_out, e.msr_mask, 1'b1);
                end else begin
                  cpsr_we = 1'b1;
                  cpsr_n  = msr_apply(cpsr, sh_out, e.msr_mask, cpsr.m != MODE_USR);
                end
              end
              IC_BX: begin pc_ld = 1'b1; pc_sel = 2'd1; end
              IC_B: begin
                pc_ld = 1'b1; pc_sel = 2'd1;
                if (e.link) begin w_en = 1'b1; w_reg = 4'd14; w_data = e_pc + 32'd4; end
              end
              IC_LDRSTR, IC_LDRH: begin
                // base write-back in the address cycle
                if (!e.p || e.w) begin w_en = 1'b1; w_reg = e.rn; w_data = alu_res; end
              end
              IC_LDMSTM: begin
                unique case ({e.p, e.u})
                  2'b01: lsm_base_lo = opa;                               // IA
                  2'b11: lsm_base_lo = opa + 32'd4;                       // IB
                  2'b00: lsm_base_lo = opa - {25'd0, lsm_cnt, 2'b00} + 32'd4;    // DA
                  default: lsm_base_lo = opa - {25'd0, lsm_cnt, 2'b00};          // DB
                endcase
                lsm_wb_n = e.u ? opa + {25'd0, lsm_cnt, 2'b00} : opa - {25'd0, lsm_cnt, 2'b00};
                if (e.w && e.l) begin w_en = 1'b1; w_reg = e.rn; w_data = lsm_wb_n; end
              end
              default: ;
            endcase
          end
        end

        ST_LS_DATA: if (e.cls != IC_SWP && e.l) begin
          if (e.rd == 4'd15) begin pc_ld = 1'b1; pc_sel = 2'd2; end
          else begin w_en = 1'b1; w_reg = e.rd; w_data = ld_data; end
        end

        ST_SWP_W: begin
          w_en = 1'b1; w_reg = e.rd; w_data = swap_q;
        end

        ST_LSM: begin
          if (e.l) begin
            w_en = (lsm_r != 4'd15); w_reg = lsm_r; w_data = bus_rdata;
            if (lsm_usr) w_mode = MODE_USR;
            if (lsm_r == 4'd15) begin
              pc_ld = 1'b1; pc_sel = 2'd2; pc_lsm = bus_rdata;
              if (e.s && spsr_slot(cpsr.m) != 3'd7) begin cpsr_we = 1'b1; cpsr_n = spsr_cur; end
            end
          end
          if (lsm_rest == 16'd0 && !e.l && e.w) begin
            w_en = 1'b1; w_reg = e.rn; w_mode = cpsr.m; w_data = lsm_wb;
          end
        end

        ST_MUL: begin
          if (mstate != 3'd2 && mstate != 3'd7) begin
            if (mlast) begin
              w_en = 1'b1; w_reg = e.mul_long ? e.rn : e.rd; w_data = alu_res64[31:0];
              if (e.s) begin
                cpsr_we = 1'b1;
                cpsr_n.n = e.mul_long ? alu_res64[63] : alu_res64[31];
                cpsr_n.z = e.mul_long ? (alu_res64 == 64'd0) : (alu_res64[31:0] == 32'd0);
              end
            end
          end else if (mstate == 3'd7) begin
            // HI: upper word of a long result
            w_en = 1'b1; w_reg = e.rd; w_data = acc_q[63:32];
          end
        end

        default: ;
      endcase
    end

    // common completion of a data-processing instruction
    if (dp_fin) begin
      if (e.s) begin
        cpsr_we = 1'b1;
        if (e.rd == 4'd15 && !is_test) begin
          if (spsr_slot(cpsr.m) != 3'd7) cpsr_n = spsr_cur;
        end else begin
          cpsr_n.n = alu_n; cpsr_n.z = alu_z; cpsr_n.c = alu_c; cpsr_n.v = alu_v;
        end
      end
      if (!is_test) begin
        if (e.rd == 4'd15) begin pc_ld = 1'b1; pc_sel = 2'd1; end
        else begin w_en = 1'b1; w_data = alu_res; end
      end
    end

    if (fetch) begin
      pc_ld = 1'b1; pc_sel = 2'd0;
    end
  end

  assign retire     = adv && e_valid && ex_done && e_kind == EK_NONE;
  assign ex_state_o = e_st;
  assign fwd_used   = fwd_a || fwd_b;
  assign exc_taken  = adv && take_exc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0; d_instr <= '0; d_pc <= '0;
      e_valid <= 1'b0; e <= '0; e_pc <= '0; e_kind <= EK_NONE; e_st <= ST_MAIN;
      rs_q <= '0; dar <= '0; swap_q <= '0; lsm_list <= '0; lsm_wb <= '0; lsm_usr <= 1'b0;
      mcand_q <= '0; mplier_q <= '0; prod_q <= '0; acc_q <= '0;
      wb_valid <= 1'b0; wb_addr <= '0; wb_data <= '0;
    end else if (adv) begin
      // write-back register
      wb_valid <= w_en;
      wb_addr  <= phys_reg(w_mode, w_reg);
      wb_data  <= w_data;

      // IF/ID register
      if (flush)        d_valid <= 1'b0;
      else if (fetch) begin
        d_valid <= 1'b1; d_instr <= bus_rdata; d_pc <= pc;
      end else if (d_take) d_valid <= 1'b0;

      // ID/EX register and execute state
      if (take_exc) begin
        e_valid <= 1'b1; e <= '0; e_kind <= fiq && !cpsr.f ? EK_FIQ : EK_IRQ;
        e_pc <= d_valid ? d_pc : pc; e_st <= ST_MAIN;
      end else if (d_take) begin
        e_valid <= d_valid && !flush; e <= d_dec; e_pc <= d_pc; e_kind <= EK_NONE;
        e_st <= ST_MAIN;
      end else begin
        e_st <= e_st_n;
      end

      // sub-FSM working registers
      if (e_valid) begin
        unique case (e_st)
          ST_MAIN: begin
            rs_q <= opa[7:0];
            dar  <= (e.cls == IC_SWP) ? opa : (e.p ? alu_res : opa);
            if (e.cls == IC_LDMSTM) begin
              dar <= lsm_base_lo; lsm_list <= e.reglist; lsm_wb <= lsm_wb_n;
              lsm_usr <= e.s && !(e.l && e.reglist[15]);
            end
            mcand_q <= opa; mplier_q <= opb; prod_q <= mul_p; acc_q <= '0;
          end
          ST_LS_DATA: swap_q <= ld_data;
          ST_LSM: begin lsm_list <= lsm_rest; dar <= dar + 32'd4; end
          ST_MUL: begin
            if (mstate == 3'd2)
              acc_q <= e.mul_long ? {opb, opa} : {32'd0, opa};
            else if (mstate != 3'd7) begin
              acc_q <= alu_res64;
              prod_q <= mul_p;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // A finishing instruction never also flushes the pipeline: every write
  // to r15 ends through the branch sub-FSM.
  a_done_noflush: assert property (@(posedge clk) disable iff (!rst_n) !(ex_done && flush && e_valid));
  // The multiply sub-FSM never runs while another class is executing.
  a_mul_only: assert property (@(posedge clk) disable iff (!rst_n)
                               (e_valid && e_st == ST_MUL) |-> e.cls == IC_MUL);
endmodule
