// Test of the AHB wrapper (interface block, two ZBT controllers and the two
// bank multiplexers) with two ZBT SRAM models. The test bench is the AHB
// master and does its own slave selection. It loads a short program into
// each bank (sum of 1..N, stored at 0x100, then FINISH), starts bank 1,
// writes and reads bank 0 while the core owns bank 1 (no waits expected),
// reads bank 1 while it is owned (waits expected), then checks the result;
// then the same with the banks swapped. Random data is also written to and
// read back from both banks over AHB.
module tb_ahb_wrapper;
  import acarm7_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] haddr = '0, hwdata = '0;
  logic [1:0]  htrans = '0;
  logic        hwrite = 1'b0, hready;
  logic [2:0]  hsize = 3'd2;
  logic [31:0] rd0, rd1, rdc;
  logic        ry0, ry1, ryc, finish;
  logic [2:0]  if_state;
  logic [18:0] a0, a1;
  logic        c0, c1, w0, w1, o0, o1;
  logic [3:0]  b0, b1;
  logic [31:0] q0, q1, i0, i1;
  logic [2:0]  sel, sel_q = 3'b000;

  assign sel = {haddr[23:21] == 3'd2, haddr[23:21] == 3'd1, haddr[23:21] == 3'd0};

  ahb_wrapper dut (
    .clk, .rst_n, .hsel_zbt0(sel[0]), .hsel_zbt1(sel[1]), .hsel_csr(sel[2]),
    .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hrdata_zbt0(rd0), .hrdata_zbt1(rd1), .hrdata_csr(rdc),
    .hreadyout_zbt0(ry0), .hreadyout_zbt1(ry1), .hreadyout_csr(ryc),
    .ext_irq(1'b0), .finish, .if_state,
    .zbt0_addr(a0), .zbt1_addr(a1), .zbt0_cen_n(c0), .zbt1_cen_n(c1),
    .zbt0_wen_n(w0), .zbt1_wen_n(w1), .zbt0_ben_n(b0), .zbt1_ben_n(b1),
    .zbt0_dq_o(q0), .zbt1_dq_o(q1), .zbt0_dq_oe(o0), .zbt1_dq_oe(o1),
    .zbt0_dq_i(i0), .zbt1_dq_i(i1)
  );
  zbt_sram_model u_z0 (.clk, .addr(a0), .cen_n(c0), .wen_n(w0), .ben_n(b0), .dq_o(q0), .dq_oe(o0), .dq_i(i0));
  zbt_sram_model u_z1 (.clk, .addr(a1), .cen_n(c1), .wen_n(w1), .ben_n(b1), .dq_o(q1), .dq_oe(o1), .dq_i(i1));

  // data-phase multiplexing of the three slaves
  always_ff @(posedge clk) if (hready) sel_q <= sel;
  assign hready = sel_q[0] ? ry0 : sel_q[1] ? ry1 : sel_q[2] ? ryc : 1'b1;
  logic [31:0] hrdata;
  assign hrdata = sel_q[0] ? rd0 : sel_q[1] ? rd1 : rdc;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  int waits = 0;
  task automatic ahb(bit w, logic [31:0] a, logic [31:0] d, output logic [31:0] q);
    haddr = a; htrans = 2'b10; hwrite = w; hsize = 3'd2;
    @(negedge clk);
    htrans = 2'b00;
    if (w) hwdata = d;
    while (!hready) begin waits++; @(negedge clk); end
    q = hrdata;
    @(negedge clk);
  endtask

  localparam logic [31:0] BANK [2] = '{32'h0, 32'h0020_0000};
  localparam logic [31:0] CSR = 32'h0040_0000;

  task automatic load(int k, int nsum);
    logic [31:0] q;
    // r1 = nsum, r2 = 0; loop: r2 += r1; r1 -= 1; bne; STR r2,[r3,#0x100]; FINISH
    ahb(1, BANK[k] + 0,  32'hE3A01000 | 32'(nsum), q);   // MOV r1, #n
    ahb(1, BANK[k] + 4,  32'hE3A02000, q);               // MOV r2, #0
    ahb(1, BANK[k] + 8,  32'hE0822001, q);               // ADD r2, r2, r1
    ahb(1, BANK[k] + 12, 32'hE2511001, q);               // SUBS r1, r1, #1
    ahb(1, BANK[k] + 16, 32'h1AFFFFFC, q);               // BNE 8
    ahb(1, BANK[k] + 20, 32'hE5832100, q);               // STR r2, [r3, #0x100]
    ahb(1, BANK[k] + 24, 32'hE3A00102, q);               // MOV r0, #0x80000000
    ahb(1, BANK[k] + 28, 32'hE5800008, q);               // STR r0, [r0, #8]
    ahb(1, BANK[k] + 32, 32'hEAFFFFFE, q);               // B .
    ahb(1, BANK[k] + 32'h100, 32'd0, q);
  endtask

  task automatic run(int k, int nsum);
    logic [31:0] q, e;
    int w;
    ahb(1, CSR + (k == 1 ? 32'h4 : 32'h0), 32'd0, q);
    // the other bank is free
    w = waits;
    e = $urandom;
    ahb(1, BANK[1-k] + 32'h400, e, q);
    ahb(0, BANK[1-k] + 32'h400, 32'd0, q);
    check("other bank usable during run", q, e);
    check("one wait per access on the free bank", waits - w, 2);
    // the running bank makes the host wait
    w = waits;
    ahb(0, BANK[k] + 32'h100, 32'd0, q);
    checks++;
    if (waits - w < 5) begin failures++; $display("FAIL owned bank did not hold the host"); end
    ahb(0, CSR + 32'h08, 32'd0, q);
    check("FINISH", q, 32'd1);
    ahb(0, BANK[k] + 32'h100, 32'd0, q);
    check($sformatf("bank %0d sum", k), q, 32'(nsum * (nsum + 1) / 2));
  endtask

  initial begin
    logic [31:0] q, e [32];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 2; k++) begin
      for (int i = 0; i < 32; i++) begin
        e[i] = $urandom;
        ahb(1, BANK[k] + 32'h800 + 4 * i, e[i], q);
      end
      for (int i = 0; i < 32; i++) begin
        ahb(0, BANK[k] + 32'h800 + 4 * i, 32'd0, q);
        check("bank write/read", q, e[i]);
      end
    end
    load(0, 40);
    load(1, 25);
    run(1, 25);
    run(0, 40);
    check("interface Idle at the end", 32'(if_state), 32'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
