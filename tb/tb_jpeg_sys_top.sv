// End-to-end test of the JPEG decoder system logic at its default size:
// two 2 MB ZBT SRAM models on the pins, and the test bench in the role of
// the host processor as the only AHB master.
//
// Bank 0 gets a colour-conversion task (the last stage of a JPEG decoder):
// 64 pixels of Y, Cb, Cr bytes are turned into packed 0x00RRGGBB words with
// fixed-point multiplies, arithmetic shifts and clamping. The Cr plane is
// written with byte transfers. While the core runs, the push-button
// interrupt is raised once; the handler counts it in a banked register and
// the program stores the count. Bank 1 gets a dequantisation task: signed
// halfword coefficients times byte quantisers, plus a signed 64-bit sum of
// all products (SMLAL) stored with STM.
//
// Host sequence: fill both banks over AHB, read some words back, START0,
// access bank 1 (free) and bank 0 (owned by the core: the access must
// wait), poll FINISH, check results against a model in the test bench,
// then START1 and the same for bank 1. The test counts every mechanism it
// means to cover (each interface FSM state, host waits while the core owns
// a bank, host byte writes, core ZBT reads and writes in both banks,
// forwarding, multiply cycles, interrupt entry) and a mechanism that never
// happened is a failure.
module tb_jpeg_sys_top;
  import acarm7_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] HADDR = '0, HWDATA = '0, HRDATA;
  logic [1:0]  HTRANS = 2'b00, HRESP;
  logic        HWRITE = 1'b0, HREADY;
  logic [2:0]  HSIZE = 3'd2;
  logic        hsel_apb, ext_irq = 1'b0, finish;
  logic [2:0]  if_state;
  logic [18:0] z0_addr, z1_addr;
  logic        z0_cen_n, z1_cen_n, z0_wen_n, z1_wen_n, z0_oe, z1_oe;
  logic [3:0]  z0_ben_n, z1_ben_n;
  logic [31:0] z0_dqo, z1_dqo, z0_dqi, z1_dqi;

  jpeg_sys_top dut (
    .HCLK(clk), .HRESETn(rst_n), .HADDR, .HTRANS, .HWRITE, .HSIZE, .HWDATA,
    .HRDATA, .HREADY, .HRESP, .hsel_apb, .hrdata_apb(32'hA0B0_C0D0), .hreadyout_apb(1'b1),
    .ext_irq, .finish, .if_state,
    .zbt0_addr(z0_addr), .zbt1_addr(z1_addr), .zbt0_cen_n(z0_cen_n), .zbt1_cen_n(z1_cen_n),
    .zbt0_wen_n(z0_wen_n), .zbt1_wen_n(z1_wen_n), .zbt0_ben_n(z0_ben_n), .zbt1_ben_n(z1_ben_n),
    .zbt0_dq_o(z0_dqo), .zbt1_dq_o(z1_dqo), .zbt0_dq_oe(z0_oe), .zbt1_dq_oe(z1_oe),
    .zbt0_dq_i(z0_dqi), .zbt1_dq_i(z1_dqi)
  );

  zbt_sram_model u_z0 (.clk, .addr(z0_addr), .cen_n(z0_cen_n), .wen_n(z0_wen_n),
                       .ben_n(z0_ben_n), .dq_o(z0_dqo), .dq_oe(z0_oe), .dq_i(z0_dqi));
  zbt_sram_model u_z1 (.clk, .addr(z1_addr), .cen_n(z1_cen_n), .wen_n(z1_wen_n),
                       .ben_n(z1_ben_n), .dq_o(z1_dqo), .dq_oe(z1_oe), .dq_i(z1_dqi));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask
  task automatic check_seen(string what, int n);
    checks++;
    if (n <= 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  // ------------------------------------------------------ AHB master BFM
  // Each task starts at a falling edge with the bus free and returns at a
  // falling edge where the data phase completes on the next rising edge.
  localparam logic [31:0] ZBT0 = 32'h0000_0000, ZBT1 = 32'h0020_0000,
                          CSR = 32'h0040_0000, APB = 32'h0060_0000;
  int host_wait = 0, host_bytes = 0;

  task automatic ahb(bit wr, logic [31:0] a, logic [31:0] wd, int size, output logic [31:0] rd);
    HADDR = a; HTRANS = 2'b10; HWRITE = wr; HSIZE = 3'(size);
    @(negedge clk);
    HTRANS = 2'b00;
    if (wr) HWDATA = wd;
    while (!HREADY) begin
      host_wait++;
      @(negedge clk);
    end
    rd = HRDATA;
    check("HRESP OKAY", 32'(HRESP), 32'd0);
    @(negedge clk);
  endtask
  task automatic wr32(logic [31:0] a, logic [31:0] d);
    logic [31:0] x;
    ahb(1, a, d, 2, x);
  endtask
  task automatic wr8(logic [31:0] a, logic [7:0] d);
    logic [31:0] x;
    ahb(1, a, {4{d}} & (32'hFF << (8 * a[1:0])), 0, x);
    host_bytes++;
  endtask
  task automatic rd32(logic [31:0] a, output logic [31:0] d);
    ahb(0, a, 32'd0, 2, d);
  endtask

  // ---------------------------------------------------------- assembler
  localparam logic [3:0] AL = 4'hE, NE = 4'h1, LT = 4'hB, GT = 4'hC;
  logic [31:0] prog [256];
  int pcw = 0;
  function automatic logic [31:0] dpi(aluop_e op, bit s, int rn, int rd, int rot, int imm8);
    return {AL, 3'b001, op, s, 4'(rn), 4'(rd), 4'(rot), 8'(imm8)};
  endfunction
  function automatic logic [31:0] dpr(aluop_e op, bit s, int rn, int rd, int rm, int sh = 0, int amt = 0);
    return {AL, 3'b000, op, s, 4'(rn), 4'(rd), 5'(amt), 2'(sh), 1'b0, 4'(rm)};
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
  function automatic logic [31:0] ldm(bit l, bit p, bit u, bit w, int rn, logic [15:0] list);
    return {AL, 3'b100, p, u, 1'b0, w, l, 4'(rn), list};
  endfunction
  function automatic logic [31:0] mul(bit a, bit s, int rd, int rn, int rs, int rm);
    return {AL, 6'b000000, a, s, 4'(rd), 4'(rn), 4'(rs), 4'b1001, 4'(rm)};
  endfunction
  function automatic logic [31:0] mull(bit sg, bit a, int hi, int lo, int rs, int rm);
    return {AL, 5'b00001, sg, a, 1'b0, 4'(hi), 4'(lo), 4'(rs), 4'b1001, 4'(rm)};
  endfunction
  function automatic logic [31:0] br(logic [3:0] c, bit l, int from_w, int to_w);
    return {c, 3'b101, l, 24'(to_w - from_w - 2)};
  endfunction
  function automatic logic [31:0] msr_c(int rm);
    return {AL, 5'b00010, 1'b0, 2'b10, 4'b0001, 4'b1111, 8'd0, 4'(rm)};
  endfunction
  function automatic logic [31:0] mrs(int rd);
    return {AL, 5'b00010, 1'b0, 6'b001111, 4'(rd), 12'd0};
  endfunction
  task automatic emit(logic [31:0] i);
    prog[pcw] = i;
    pcw++;
  endtask
  task automatic clamp(int r);     // r = min(max(r, 0), 255)
    emit(dpi(OP_CMP, 1, r, 0, 0, 0));
    emit(cnd(LT, dpi(OP_MOV, 0, 0, r, 0, 0)));
    emit(dpi(OP_CMP, 1, r, 0, 0, 255));
    emit(cnd(GT, dpi(OP_MOV, 0, 0, r, 0, 255)));
  endtask
  task automatic finish_seq();     // signal the end of the task, then wait
    emit(dpi(OP_MOV, 0, 0, 0, 1, 2));          // r0 = 0x8000_0000
    emit(ldst(0, 0, 0, 0, 8));                 // STR r0, [r0, #8]: FINISH
    emit(br(AL, 0, pcw, pcw));
  endtask

  // Bank 0: colour conversion. Y at 0x1000, Cb at 0x1040, Cr at 0x1080,
  // RGB words from 0x1100, interrupt count at 0x1200.
  task automatic build_prog0(output int n);
    int loop_w;
    for (int i = 0; i < 256; i++) prog[i] = 32'd0;
    pcw = 0; emit(br(AL, 0, 0, 16));
    pcw = 6;                                    // IRQ vector
    emit(dpi(OP_ADD, 0, 13, 13, 0, 1));         // r13_irq counts interrupts
    emit(dpi(OP_SUB, 1, 14, 15, 0, 4));         // SUBS pc, lr, #4
    pcw = 16;
    emit(mrs(4)); emit(dpi(OP_BIC, 0, 4, 4, 0, 8'h80)); emit(msr_c(4));   // enable IRQ
    emit(dpi(OP_MOV, 0, 0, 0, 10, 1));          // r0 = 0x1000
    emit(dpi(OP_MOV, 0, 0, 1, 0, 64));          // r1 = 64
    emit(dpi(OP_MOV, 0, 0, 2, 12, 8'h11));      // r2 = 0x1100
    emit(dpi(OP_MOV, 0, 0, 8, 0, 8'h67)); emit(dpi(OP_ORR, 0, 8, 8, 12, 1));   // 359
    emit(dpi(OP_MOV, 0, 0, 9, 0, 88));
    emit(dpi(OP_MOV, 0, 0, 10, 0, 183));
    emit(dpi(OP_MOV, 0, 0, 11, 0, 8'hC6)); emit(dpi(OP_ORR, 0, 11, 11, 12, 1)); // 454
    loop_w = pcw;
    emit(ldst(1, 1, 0, 4, 0));                  // Y
    emit(ldst(1, 1, 0, 5, 8'h40));              // Cb
    emit(ldst(1, 1, 0, 6, 8'h80));              // Cr
    emit(dpi(OP_SUB, 0, 5, 5, 0, 128));
    emit(dpi(OP_SUB, 0, 6, 6, 0, 128));
    emit(mul(0, 0, 7, 0, 8, 6));                // 359 Cr
    emit(dpr(OP_ADD, 0, 4, 7, 7, 2, 8));        // R = Y + (. asr 8)
    clamp(7);
    emit(dpr(OP_MOV, 0, 0, 12, 7, 0, 16));
    emit(mul(0, 0, 7, 0, 9, 5));                // 88 Cb
    emit(mul(1, 0, 7, 7, 10, 6));               // + 183 Cr
    emit(dpr(OP_SUB, 0, 4, 7, 7, 2, 8));        // G = Y - (. asr 8)
    clamp(7);
    emit(dpr(OP_ORR, 0, 12, 12, 7, 0, 8));
    emit(mul(0, 0, 7, 0, 11, 5));               // 454 Cb
    emit(dpr(OP_ADD, 0, 4, 7, 7, 2, 8));        // B
    clamp(7);
    emit(dpr(OP_ORR, 0, 12, 12, 7));
    emit(ldst(0, 0, 2, 12, 4, 0, 1, 0));        // STR r12, [r2], #4
    emit(dpi(OP_ADD, 0, 0, 0, 0, 1));
    emit(dpi(OP_SUB, 1, 1, 1, 0, 1));
    emit(br(NE, 0, pcw, loop_w));
    // read the banked IRQ counter from IRQ mode and store it
    emit(mrs(4));
    emit(dpi(OP_BIC, 0, 4, 5, 0, 8'h1F)); emit(dpi(OP_ORR, 0, 5, 5, 0, 8'h12));
    emit(msr_c(5)); emit(dpr(OP_MOV, 0, 0, 6, 13)); emit(msr_c(4));
    emit(ldst(0, 0, 2, 6, 0));
    finish_seq();
    n = pcw;
  endtask

  // Bank 1: dequantisation. Coefficients (signed halfwords) at 0x1000,
  // quantisers (bytes) at 0x1080, products from 0x1100, 64-bit sum at 0x1200.
  task automatic build_prog1(output int n);
    int loop_w;
    for (int i = 0; i < 256; i++) prog[i] = 32'd0;
    pcw = 0; emit(br(AL, 0, 0, 16));
    pcw = 16;
    emit(dpi(OP_MOV, 0, 0, 0, 10, 1));          // r0 = 0x1000
    emit(dpi(OP_MOV, 0, 0, 3, 13, 8'h42));      // r3 = 0x1080
    emit(dpi(OP_MOV, 0, 0, 2, 12, 8'h11));      // r2 = 0x1100
    emit(dpi(OP_MOV, 0, 0, 1, 0, 64));
    emit(dpi(OP_MOV, 0, 0, 8, 0, 0));
    emit(dpi(OP_MOV, 0, 0, 9, 0, 0));
    loop_w = pcw;
    emit(ldsth(1, 1, 1, 0, 4, 0));              // LDRSH r4, [r0]
    emit(ldst(1, 1, 3, 5, 0));                  // LDRB r5, [r3]
    emit(dpi(OP_ADD, 0, 0, 0, 0, 2));
    emit(dpi(OP_ADD, 0, 3, 3, 0, 1));
    emit(mul(0, 0, 6, 0, 5, 4));                // r6 = r4 * r5
    emit(ldst(0, 0, 2, 6, 4, 0, 1, 0));         // STR r6, [r2], #4
    emit(mull(1, 1, 9, 8, 5, 4));               // SMLAL r8, r9, r4, r5
    emit(dpi(OP_SUB, 1, 1, 1, 0, 1));
    emit(br(NE, 0, pcw, loop_w));
    emit(ldm(0, 0, 1, 0, 2, 16'h0300));         // STMIA r2, {r8, r9}
    finish_seq();
    n = pcw;
  endtask

  // ------------------------------------------------------- mechanisms
  int st_seen [8];
  int core_fwd = 0, core_mul = 0, core_exc = 0;
  int z0_core_rd = 0, z0_core_wr = 0, z1_core_rd = 0, z1_core_wr = 0;
  always @(posedge clk) if (rst_n) begin
    st_seen[if_state]++;
    if (dut.u_wrap.u_if.u_core.fwd_used) core_fwd++;
    if (dut.u_wrap.u_if.u_core.ex_state_o == 3'd5) core_mul++;
    if (dut.u_wrap.u_if.u_core.exc_taken) core_exc++;
    if (dut.u_wrap.run0 && !z0_cen_n) begin if (z0_wen_n) z0_core_rd++; else z0_core_wr++; end
    if (dut.u_wrap.run1 && !z1_cen_n) begin if (z1_wen_n) z1_core_rd++; else z1_core_wr++; end
  end
  // the push button is released once the core has taken the interrupt
  always @(posedge clk) if (dut.u_wrap.u_if.u_core.exc_taken) ext_irq <= 1'b0;

  // ------------------------------------------------------------ test
  logic [7:0]  yy [64], cb [64], cr [64], qq [64];
  logic [15:0] cf [64];

  function automatic logic [7:0] clamp8(int v);
    return (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
  endfunction

  task automatic wait_finish(int limit);
    logic [31:0] f;
    int n;
    n = 0;
    do begin
      rd32(CSR + 32'h08, f);
      n++;
    end while (f[0] == 1'b0 && n < limit);
    check("FINISH set", f, 32'd1);
  endtask

  initial begin
    logic [31:0] d;
    int n;
    longint sum;
    for (int i = 0; i < 8; i++) st_seen[i] = 0;
    for (int i = 0; i < 64; i++) begin
      yy[i] = 8'($urandom); cb[i] = 8'($urandom); cr[i] = 8'($urandom);
      qq[i] = 8'($urandom_range(255, 1));
      cf[i] = 16'($signed(12'($urandom)));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    check("state Idle after reset", 32'(if_state), 32'd0);
    rd32(CSR + 32'h10, d);
    check("STATE read seen in the Read state", d, 32'd2);
    wr32(CSR + 32'h0C, 32'd0);
    check_seen("state Write after a CSR write", st_seen[1]);
    rd32(CSR + 32'h0C, d);
    check("IRQ register", d, 32'd0);
    rd32(APB, d);
    check("AHB-APB system read through the multiplexer", d, 32'hA0B0_C0D0);
    rd32(32'h00E0_0000, d);
    check("default slave", d, 32'd0);

    // fill bank 0
    build_prog0(n);
    for (int i = 0; i < n; i++) wr32(ZBT0 + 4 * i, prog[i]);
    for (int i = 0; i < 16; i++) begin
      wr32(ZBT0 + 32'h1000 + 4 * i, {yy[4*i+3], yy[4*i+2], yy[4*i+1], yy[4*i]});
      wr32(ZBT0 + 32'h1040 + 4 * i, {cb[4*i+3], cb[4*i+2], cb[4*i+1], cb[4*i]});
    end
    for (int i = 0; i < 64; i++) wr8(ZBT0 + 32'h1080 + i, cr[i]);
    // fill bank 1
    build_prog1(n);
    for (int i = 0; i < n; i++) wr32(ZBT1 + 4 * i, prog[i]);
    for (int i = 0; i < 32; i++) wr32(ZBT1 + 32'h1000 + 4 * i, {cf[2*i+1], cf[2*i]});
    for (int i = 0; i < 16; i++)
      wr32(ZBT1 + 32'h1080 + 4 * i, {qq[4*i+3], qq[4*i+2], qq[4*i+1], qq[4*i]});
    // read back
    build_prog0(n);
    rd32(ZBT0 + 4 * 16, d); check("readback bank0 program", d, prog[16]);
    rd32(ZBT0 + 32'h1080, d); check("readback bank0 byte lanes", d, {cr[3], cr[2], cr[1], cr[0]});
    rd32(ZBT1 + 32'h1000, d); check("readback bank1", d, {cf[1], cf[0]});
    rd32(CSR + 32'h08, d); check("FINISH clear before start", d, 32'd0);

    // run bank 0
    wr32(CSR + 32'h00, 32'd0);
    rd32(CSR + 32'h10, d); check("state Run0 with bank 0", d, 32'h05);
    rd32(ZBT1 + 32'h1000, d); check("bank1 free while core runs bank0", d, {cf[1], cf[0]});
    repeat (300) @(negedge clk);
    ext_irq = 1'b1;
    n = host_wait;
    rd32(ZBT0 + 32'h1100, d);     // waits until the core releases bank 0
    check_seen("host waited while the core owned bank 0", host_wait - n);
    wait_finish(100);
    for (int i = 0; i < 64; i++) begin
      int cbs, crs, r, g, b;
      cbs = int'(cb[i]) - 128; crs = int'(cr[i]) - 128;
      r = int'(yy[i]) + ((359 * crs) >>> 8);
      g = int'(yy[i]) - ((88 * cbs + 183 * crs) >>> 8);
      b = int'(yy[i]) + ((454 * cbs) >>> 8);
      rd32(ZBT0 + 32'h1100 + 4 * i, d);
      check($sformatf("RGB pixel %0d", i), d, {8'd0, clamp8(r), clamp8(g), clamp8(b)});
    end
    rd32(ZBT0 + 32'h1200, d); check("interrupts counted by the program", d, 32'd1);
    rd32(CSR + 32'h10, d); check("state after bank 0 task", d[2:0], 32'd2);  // Read

    // run bank 1
    wr32(CSR + 32'h04, 32'd0);
    rd32(CSR + 32'h10, d); check("state Run1 with bank 1", d, 32'h16);
    wait_finish(20000);
    sum = 0;
    for (int i = 0; i < 64; i++) begin
      int p;
      p = int'($signed(cf[i])) * int'(qq[i]);
      sum += longint'(p);
      rd32(ZBT1 + 32'h1100 + 4 * i, d);
      check($sformatf("dequantised %0d", i), d, p);
    end
    rd32(ZBT1 + 32'h1200, d); check("sum low", d, sum[31:0]);
    rd32(ZBT1 + 32'h1204, d); check("sum high", d, sum[63:32]);

    // mechanisms
    check_seen("state Idle", st_seen[0]);
    check_seen("state Write", st_seen[1]);
    check_seen("state Read", st_seen[2]);
    check_seen("state Pre-Run0", st_seen[3]);
    check_seen("state Pre-Run1", st_seen[4]);
    check_seen("state Run0", st_seen[5]);
    check_seen("state Run1", st_seen[6]);
    check("Pre-Run0 lasts one cycle", st_seen[3], 1);
    check_seen("host byte writes", host_bytes);
    check_seen("core reads bank 0", z0_core_rd);
    check_seen("core writes bank 0", z0_core_wr);
    check_seen("core reads bank 1", z1_core_rd);
    check_seen("core writes bank 1", z1_core_wr);
    check_seen("forwarding", core_fwd);
    check_seen("multiply cycles", core_mul);
    check("interrupt entries", core_exc, 1);
    check("ZBT write data driven", u_z0.n_oe_errors + u_z1.n_oe_errors, 0);
    $display("bank0 core accesses %0d/%0d, bank1 %0d/%0d, host waits %0d, multiply cycles %0d",
             z0_core_rd, z0_core_wr, z1_core_rd, z1_core_wr, host_wait, core_mul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
