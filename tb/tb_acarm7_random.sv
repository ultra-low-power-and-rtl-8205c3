// Random-instruction test of the ACARM7 core against an instruction-set
// model written in this bench. Each round builds a program of random,
// conditionally executed data-processing, multiply and load/store
// instructions:
// - all sixteen ALU operations, with and without S;
// - immediate, immediate-shift and register-shift operands, the last with
//   random shift amounts from 0 to 255;
// - MUL, MLA, UMULL, UMLAL, SMULL and SMLAL on random 32-bit values;
// - LDR, STR, LDRB, STRB, LDRH, STRH, LDRSB and LDRSH at random aligned
//   offsets in a 256-byte scratch area that r13 points to, LDM/STM
//   (increment after or before) with random register lists, and SWP/SWPB
//   on the first scratch word.
// IRQ and FIQ requests arrive at random times, sometimes together; their
// handlers return at once, so they must leave no trace in the results.
// The operands obey the ARMv4 rules on register choice (no r15, and a
// multiply destination never equal to Rm). A round starts from random
// register values, which LDM loads, and random flags, which MSR sets. It
// ends by storing r0-r12 and the CPSR, and then a marker word. The core runs
// from a word memory with random wait states. The bench executes the same
// words in its model and compares the fourteen stored words and the
// scratch area.
//
// Checking the core with constrained random instruction streams against an
// instruction-set model is the core's original verification method; the
// generator and the model here are this bench's own. Choices of this bench:
// the round and program lengths, the register range
// r0-r12 (r13 is the data pointer), and multiplies without S, since ARMv4
// leaves the carry flag of a flag-setting multiply unpredictable.
module tb_acarm7_random;
  import acarm7_pkg::*;

  localparam int ROUNDS = 40;
  localparam int NINSTR = 60;

  logic clk = 1'b0, rst_n = 1'b0, irq = 1'b0, fiq = 1'b0;
  logic        bus_req, bus_write, bus_ready;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  size_e       bus_size;
  logic        retire, fwd_used, exc_taken;
  logic [2:0]  ex_state;

  acarm7_core dut (.clk, .rst_n, .irq, .fiq, .bus_req, .bus_addr, .bus_write,
                   .bus_size, .bus_wdata, .bus_rdata, .bus_ready, .retire,
                   .ex_state_o(ex_state), .fwd_used, .exc_taken);

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
  always_ff @(posedge clk) bus_ready <= ($urandom_range(3) != 0);
  assign bus_rdata = mem[bus_addr[13:2]];
  always_ff @(posedge clk) if (bus_req && bus_ready && bus_write) begin
    unique case (bus_size)
      SZ_BYTE: mem[bus_addr[13:2]][8*bus_addr[1:0] +: 8] <= bus_wdata[8*bus_addr[1:0] +: 8];
      SZ_HALF: mem[bus_addr[13:2]][16*bus_addr[1] +: 16] <= bus_wdata[16*bus_addr[1] +: 16];
      default: mem[bus_addr[13:2]] <= bus_wdata;
    endcase
  end

  // Memory layout (word addresses): program from 0, initial registers and
  // scratch area at 0x800 (byte 0x2000), results at 0xC00 (byte 0x3000); the marker is
  // copied from word 0xC10 to 0xC11.
  localparam int INIT_W = 32'h800, RES_W = 32'hC00, MARK_W = 32'hC11;
  localparam logic [31:0] MARK = 32'h600D_F00D;

  // ---------------------------------------------------------- assembler
  localparam logic [3:0] AL = 4'hE;
  int pcw;
  task automatic emit(logic [31:0] i);
    mem[pcw] = i;
    pcw++;
  endtask

  // ------------------------------------------------------ reference model
  logic [31:0] r [16];
  logic        fn, fz, fc, fv;
  logic [31:0] smem [64];   // model of the scratch area

  function automatic bit cond_pass(logic [3:0] c);
    unique case (c)
      4'h0: return fz;            4'h1: return !fz;
      4'h2: return fc;            4'h3: return !fc;
      4'h4: return fn;            4'h5: return !fn;
      4'h6: return fv;            4'h7: return !fv;
      4'h8: return fc && !fz;     4'h9: return !fc || fz;
      4'hA: return fn == fv;      4'hB: return fn != fv;
      4'hC: return !fz && (fn == fv);
      4'hD: return fz || (fn != fv);
      default: return 1'b1;
    endcase
  endfunction

  // shift of v by n (n already the effective amount, 0..255); returns {c, value}
  function automatic logic [32:0] shift(logic [1:0] t, logic [31:0] v, int n);
    logic [63:0] w;
    if (n == 0) return {fc, v};
    unique case (t)
      2'd0: if (n < 32) return {v[32-n], v << n};
            else if (n == 32) return {v[0], 32'd0};
            else return 33'd0;
      2'd1: if (n < 32) return {v[n-1], v >> n};
            else if (n == 32) return {v[31], 32'd0};
            else return 33'd0;
      2'd2: if (n < 32) return {v[n-1], 32'($signed(v) >>> n)};
            else return {v[31], {32{v[31]}}};
      default: begin
        n = n % 32;
        if (n == 0) return {v[31], v};
        w = {v, v} >> n;
        return {v[n-1], w[31:0]};
      end
    endcase
  endfunction

  function automatic logic [32:0] operand2(logic [31:0] i);
    int amt;
    if (i[25]) begin
      amt = 2 * int'(i[11:8]);
      if (amt == 0) return {fc, 24'd0, i[7:0]};
      return shift(2'd3, {24'd0, i[7:0]}, amt);
    end
    if (i[4]) return shift(i[6:5], r[i[3:0]], int'(r[i[11:8]][7:0]));
    amt = int'(i[11:7]);
    if (amt == 0) begin
      unique case (i[6:5])
        2'd0: return {fc, r[i[3:0]]};
        2'd1, 2'd2: return shift(i[6:5], r[i[3:0]], 32);
        default: return {r[i[3:0]][0], fc, r[i[3:0]][31:1]};   // RRX
      endcase
    end
    return shift(i[6:5], r[i[3:0]], amt);
  endfunction

  task automatic model_dp(logic [31:0] i);
    logic [32:0] op2c, sum;
    logic [31:0] a, b, res;
    logic        logical, write, sub;
    op2c = operand2(i);
    a = r[i[19:16]]; b = op2c[31:0];
    logical = 1'b0; write = 1'b1; sub = 1'b0;
    unique case (i[24:21])
      4'h0: begin res = a & b;  logical = 1; end
      4'h1: begin res = a ^ b;  logical = 1; end
      4'h2: begin sum = {1'b0, a} + {1'b0, ~b} + 33'd1;  sub = 1; end
      4'h3: begin sum = {1'b0, b} + {1'b0, ~a} + 33'd1;  sub = 1; end
      4'h4: sum = {1'b0, a} + {1'b0, b};
      4'h5: sum = {1'b0, a} + {1'b0, b} + 33'(fc);
      4'h6: begin sum = {1'b0, a} + {1'b0, ~b} + 33'(fc); sub = 1; end
      4'h7: begin sum = {1'b0, b} + {1'b0, ~a} + 33'(fc); sub = 1; end
      4'h8: begin res = a & b;  logical = 1; write = 0; end
      4'h9: begin res = a ^ b;  logical = 1; write = 0; end
      4'hA: begin sum = {1'b0, a} + {1'b0, ~b} + 33'd1; sub = 1; write = 0; end
      4'hB: begin sum = {1'b0, a} + {1'b0, b}; write = 0; end
      4'hC: begin res = a | b;  logical = 1; end
      4'hD: begin res = b;      logical = 1; end
      4'hE: begin res = a & ~b; logical = 1; end
      default: begin res = ~b;  logical = 1; end
    endcase
    if (!logical) res = sum[31:0];
    if (i[20]) begin
      fn = res[31]; fz = (res == 32'd0);
      if (logical) fc = op2c[32];
      else begin
        logic [31:0] x, y;
        fc = sum[32];
        // overflow from the operands as they entered the adder
        x = (i[24:21] == 4'h3 || i[24:21] == 4'h7) ? b : a;
        y = (i[24:21] == 4'h3 || i[24:21] == 4'h7) ? a : b;
        if (sub) fv = (x[31] != y[31]) && (res[31] != x[31]);
        else     fv = (x[31] == y[31]) && (res[31] != x[31]);
      end
    end
    if (write) r[i[15:12]] = res;
  endtask

  task automatic model_mul(logic [31:0] i);
    logic [63:0] p;
    if (i[23]) begin   // long
      if (i[22]) p = 64'($signed(r[i[3:0]]) * $signed(r[i[11:8]]));
      else       p = {32'd0, r[i[3:0]]} * {32'd0, r[i[11:8]]};
      if (i[21]) p = p + {r[i[19:16]], r[i[15:12]]};
      r[i[15:12]] = p[31:0];
      r[i[19:16]] = p[63:32];
    end else begin
      p = {32'd0, r[i[3:0]] * r[i[11:8]]};
      if (i[21]) p[31:0] = p[31:0] + r[i[15:12]];
      r[i[19:16]] = p[31:0];
    end
  endtask

  // loads and stores with base r13 (the scratch area) and a positive offset
  task automatic model_ls(logic [31:0] i);
    int off;
    logic [31:0] w;
    if (i[27:26] == 2'b01) begin   // word / byte
      off = int'(i[11:0]);
      w = smem[off / 4];
      if (i[20]) r[i[15:12]] = i[22] ? {24'd0, w[8*(off%4) +: 8]} : w;
      else if (i[22]) smem[off / 4][8*(off%4) +: 8] = r[i[15:12]][7:0];
      else smem[off / 4] = r[i[15:12]];
    end else begin                 // halfword / signed
      off = int'({i[11:8], i[3:0]});
      w = smem[off / 4];
      unique case ({i[20], i[6:5]})
        3'b001: smem[off / 4][8*(off%4) +: 16] = r[i[15:12]][15:0];
        3'b101: r[i[15:12]] = {16'd0, w[8*(off%4) +: 16]};
        3'b110: r[i[15:12]] = {{24{w[8*(off%4)+7]}}, w[8*(off%4) +: 8]};
        default: r[i[15:12]] = {{16{w[8*(off%4)+15]}}, w[8*(off%4) +: 16]};
      endcase
    end
  endtask

  task automatic model_lsm(logic [31:0] i);
    int w;
    w = i[24] ? 1 : 0;
    for (int k = 0; k < 13; k++)
      if (i[k]) begin
        if (i[20]) r[k] = smem[w];
        else smem[w] = r[k];
        w++;
      end
  endtask

  task automatic model_swp(logic [31:0] i);
    logic [31:0] t;
    t = smem[0];
    if (i[22]) begin
      smem[0][7:0] = r[i[3:0]][7:0];
      r[i[15:12]] = {24'd0, t[7:0]};
    end else begin
      smem[0] = r[i[3:0]];
      r[i[15:12]] = t;
    end
  endtask

  function automatic bit is_lsm(logic [31:0] i);
    return i[27:25] == 3'b100;
  endfunction
  function automatic bit is_swp(logic [31:0] i);
    return i[27:23] == 5'b00010 && i[21:20] == 2'b00 && i[11:4] == 8'h09;
  endfunction
  function automatic bit is_mul(logic [31:0] i);
    return i[27:24] == 4'b0000 && i[7:4] == 4'b1001;
  endfunction
  function automatic bit is_ls(logic [31:0] i);
    return i[27:26] == 2'b01 || (i[27:25] == 3'b000 && i[7] && i[4] && i[6:5] != 2'b00);
  endfunction

  task automatic model(logic [31:0] i);
    if (!cond_pass(i[31:28])) return;
    if (is_mul(i)) model_mul(i);
    else if (is_lsm(i)) model_lsm(i);
    else if (is_swp(i)) model_swp(i);
    else if (is_ls(i)) model_ls(i);
    else model_dp(i);
  endtask

  // ------------------------------------------------------ program builder
  function automatic int rreg();
    return $urandom_range(12);
  endfunction

  function automatic logic [31:0] rand_dp();
    logic [3:0] op, c, rn, rd, rm, rs, rot;
    logic [7:0] imm;
    logic [4:0] amt;
    logic [1:0] sh;
    logic s;
    int form;
    c = 4'($urandom_range(14));
    op = 4'($urandom_range(15));
    s = (op inside {4'h8, 4'h9, 4'hA, 4'hB}) ? 1'b1 : 1'($urandom_range(1));
    rn = 4'(rreg()); rd = 4'(rreg()); rm = 4'(rreg()); rs = 4'(rreg());
    rot = 4'($urandom_range(15)); imm = 8'($urandom); amt = 5'($urandom); sh = 2'($urandom);
    form = $urandom_range(2);
    unique case (form)
      0: return {c, 3'b001, op, s, rn, rd, rot, imm};
      1: return {c, 3'b000, op, s, rn, rd, amt, sh, 1'b0, rm};
      default: return {c, 3'b000, op, s, rn, rd, rs, 1'b0, sh, 1'b1, rm};
    endcase
  endfunction

  function automatic logic [31:0] rand_mul();
    logic [3:0] c;
    int rd, rn, rs, rm, hi, lo;
    logic a, u;
    c = 4'($urandom_range(14));
    a = 1'($urandom); u = 1'($urandom);
    rm = rreg(); rs = rreg(); rn = rreg();
    if ($urandom_range(1) != 0) begin
      do rd = rreg(); while (rd == rm);
      return {c, 6'b000000, a, 1'b0, 4'(rd), 4'(rn), 4'(rs), 4'b1001, 4'(rm)};
    end
    do hi = rreg(); while (hi == rm);
    do lo = rreg(); while (lo == rm || lo == hi);
    return {c, 5'b00001, u, a, 1'b0, 4'(hi), 4'(lo), 4'(rs), 4'b1001, 4'(rm)};
  endfunction

  function automatic logic [31:0] rand_ls();
    logic [3:0] c, rd;
    logic [7:0] off;
    logic l;
    int kind;
    c = 4'($urandom_range(14));
    rd = 4'(rreg());
    off = 8'($urandom);
    l = 1'($urandom);
    kind = $urandom_range(4);
    unique case (kind)
      3: begin                                                                       // LDMIA/IB, STMIA/IB
        logic [12:0] list;
        do list = 13'($urandom); while (list == '0);
        return {c, 3'b100, 1'($urandom), 1'b1, 1'b0, 1'b0, l, 4'd13, 3'b000, list};
      end
      4: begin                                                                       // SWP/SWPB
        logic [3:0] rm;
        rm = 4'(rreg());
        return {c, 5'b00010, 1'($urandom), 2'b00, 4'd13, rd, 4'b0000, 4'b1001, rm};
      end
      0: return {c, 3'b010, 1'b1, 1'b1, 1'b0, 1'b0, l, 4'd13, rd, 4'd0, off & 8'hFC};   // LDR/STR
      1: return {c, 3'b010, 1'b1, 1'b1, 1'b1, 1'b0, l, 4'd13, rd, 4'd0, off};           // LDRB/STRB
      default: begin                                                                 // halfword forms
        logic [1:0] sh;
        sh = l ? 2'($urandom_range(1, 3)) : 2'b01;
        if (sh != 2'b10) off[0] = 1'b0;
        return {c, 3'b000, 1'b1, 1'b1, 1'b1, 1'b0, l, 4'd13, rd, off[7:4], 1'b1, sh, 1'b1, off[3:0]};
      end
    endcase
  endfunction

  // ------------------------------------------------------------ rounds
  int n_dp = 0, n_mul = 0, n_ls = 0, n_lsm = 0, n_swp = 0, n_skip = 0, n_fwd = 0, n_regshift = 0;
  always @(posedge clk) if (rst_n && fwd_used) n_fwd++;

  // random interrupt requests, held until an exception is taken
  int n_exc = 0, n_both = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      irq <= 1'b0; fiq <= 1'b0;
    end else if (exc_taken) begin
      n_exc++;
      if (irq && fiq) n_both++;
      irq <= 1'b0; fiq <= 1'b0;
    end else begin
      if ($urandom_range(59) == 0) irq <= 1'b1;
      if ($urandom_range(79) == 0) fiq <= 1'b1;
    end
  end

  initial begin
    logic [31:0] i, cpsr_exp;
    logic [3:0]  nzcv;
    int cyc, pick;
    for (int rd = 0; rd < ROUNDS; rd++) begin
      rst_n = 1'b0;
      for (int k = 0; k < 4096; k++) mem[k] = 32'd0;
      for (int k = 0; k < 16; k++) r[k] = 32'd0;
      // initial registers and flags
      for (int k = 0; k < 64; k++) begin
        mem[INIT_W + k] = $urandom;
        smem[k] = mem[INIT_W + k];
        if (k < 13) r[k] = mem[INIT_W + k];
      end
      nzcv = 4'($urandom);
      {fn, fz, fc, fv} = nzcv;
      pcw = 0;
      emit({AL, 3'b101, 1'b0, 24'd6});                                         // B 0x20
      pcw = 6;
      emit({AL, 3'b001, OP_SUB, 1'b1, 4'd14, 4'd15, 4'd0, 8'd4});             // IRQ: SUBS pc, lr, #4
      emit({AL, 3'b001, OP_SUB, 1'b1, 4'd14, 4'd15, 4'd0, 8'd4});             // FIQ: SUBS pc, lr, #4
      emit({AL, 5'b00110, 1'b0, 2'b10, 4'b0001, 4'b1111, 4'd0, 8'h13});       // MSR CPSR_c, #0x13
      emit({AL, 3'b001, OP_MOV, 1'b0, 4'd0, 4'd13, 4'd10, 8'h02});           // r13 = 0x2000
      emit({AL, 3'b100, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 4'd13, 16'h1FFF});      // LDMIA r13, {r0-r12}
      emit({AL, 5'b00110, 1'b0, 2'b10, 4'b1000, 4'b1111, 4'd4, nzcv, 4'd0});  // MSR CPSR_f, #nzcv<<28
      for (int k = 0; k < NINSTR; k++) begin
        pick = $urandom_range(5);
        unique case (pick)
          0:       i = rand_mul();
          1:       i = rand_ls();
          default: i = rand_dp();
        endcase
        if (!cond_pass(i[31:28])) n_skip++;
        else if (is_mul(i)) n_mul++;
        else if (is_lsm(i)) n_lsm++;
        else if (is_swp(i)) n_swp++;
        else if (is_ls(i)) n_ls++;
        else begin
          n_dp++;
          if (i[25] == 1'b0 && i[4]) n_regshift++;
        end
        model(i);
        emit(i);
      end
      emit({AL, 3'b001, OP_MOV, 1'b0, 4'd0, 4'd13, 4'd10, 8'h03});           // r13 = 0x3000
      emit({AL, 3'b100, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 4'd13, 16'h1FFF});      // STMIA r13, {r0-r12}
      emit({AL, 5'b00010, 1'b0, 6'b001111, 4'd0, 12'd0});                     // MRS r0, CPSR
      emit({AL, 3'b010, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 4'd13, 4'd0, 12'd52});  // STR r0, [r13, #52]
      // copy the marker word from 0x3040 to 0x3044 last
      emit({AL, 3'b010, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1, 4'd13, 4'd1, 12'd64});  // LDR r1, [r13, #64]
      emit({AL, 3'b010, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 4'd13, 4'd1, 12'd68});  // STR r1, [r13, #68]
      emit({AL, 3'b101, 1'b0, 24'hFFFFFE});                                    // B .
      mem[MARK_W - 1] = MARK;
      repeat (3) @(negedge clk);
      rst_n = 1'b1;
      cyc = 0;
      while (mem[MARK_W] != MARK && cyc < 20000) begin
        @(posedge clk);
        cyc++;
      end
      check($sformatf("round %0d finished", rd), mem[MARK_W], MARK);
      for (int k = 0; k < 13; k++) check($sformatf("round %0d r%0d", rd, k), mem[RES_W + k], r[k]);
      cpsr_exp = {fn, fz, fc, fv, 20'd0, 8'h13};
      check($sformatf("round %0d cpsr", rd), mem[RES_W + 13], cpsr_exp);
      for (int k = 0; k < 64; k++) check($sformatf("round %0d scratch word %0d", rd, k), mem[INIT_W + k], smem[k]);
    end
    // each kind of instruction must have happened
    checks++; if (n_dp == 0)       begin failures++; $display("FAIL no data processing"); end
    checks++; if (n_regshift == 0) begin failures++; $display("FAIL no register shift"); end
    checks++; if (n_mul == 0)      begin failures++; $display("FAIL no multiply"); end
    checks++; if (n_ls == 0)       begin failures++; $display("FAIL no load or store"); end
    checks++; if (n_skip == 0)     begin failures++; $display("FAIL no failed condition"); end
    checks++; if (n_lsm == 0)      begin failures++; $display("FAIL no block transfer"); end
    checks++; if (n_swp == 0)      begin failures++; $display("FAIL no swap"); end
    checks++; if (n_exc == 0)      begin failures++; $display("FAIL no interrupt"); end
    checks++; if (n_both == 0)     begin failures++; $display("FAIL no simultaneous IRQ and FIQ"); end
    checks++; if (n_fwd == 0)      begin failures++; $display("FAIL no forwarding"); end
    $display("executed: dp=%0d (register shift %0d) mul=%0d load/store=%0d ldm/stm=%0d swp=%0d skipped=%0d forwarded=%0d interrupts=%0d (both %0d)",
             n_dp, n_regshift, n_mul, n_ls, n_lsm, n_swp, n_skip, n_fwd, n_exc, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (ROUNDS * 20000 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
