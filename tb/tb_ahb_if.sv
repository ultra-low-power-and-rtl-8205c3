// Test of the ACARM7 AHB interface block (interface FSM, CSRs and core).
// The core's memory port is served by a test-bench memory with random wait
// states holding a short program: store 0x55 to 0x100, store 0x66 to 0x104
// after an interrupt-free run, then write FINISH and spin. The host side
// drives AHB transfers to the CSRs and checks: Idle after reset; Write and
// Read states for CSR writes and reads; START0 -> Pre-Run0 (one cycle, core
// in reset, FINISH cleared) -> Run0 -> Idle when the program writes FINISH;
// the same through Pre-Run1/Run1 with run1 high; the STATE and IRQ
// registers; host writes ignored in the Run states.
module tb_ahb_if;
  import acarm7_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        hsel = 1'b0, hwrite = 1'b0, hreadyout;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0]  htrans = '0;
  logic        mem_req, mem_we, mem_ready, run0, run1, finish;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  size_e       mem_size;
  logic [2:0]  st;

  ahb_if dut (.clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hready(1'b1),
              .hrdata, .hreadyout, .mem_req, .mem_we, .mem_addr, .mem_size, .mem_wdata,
              .mem_rdata, .mem_ready, .run0, .run1, .ext_irq(1'b0), .finish, .state_o(st));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [31:0] mem [256];
  logic        rdy_q = 1'b0;
  always_ff @(posedge clk) rdy_q <= ($urandom_range(2) != 0);
  assign mem_ready = rdy_q;
  assign mem_rdata = mem[mem_addr[9:2]];
  always_ff @(posedge clk) if (mem_req && mem_ready && mem_we) mem[mem_addr[9:2]] <= mem_wdata;

  int st_seen [8], pre_rst = 0, pre_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    st_seen[st]++;
    if (st == 3'd3 || st == 3'd4) begin
      pre_cycles++;
      if (dut.core_rst_n == 1'b0) pre_rst++;
    end
  end

  task automatic csr(bit w, logic [7:0] a, logic [31:0] d, output logic [31:0] q);
    hsel = 1'b1; haddr = {24'h40_0000, a}; htrans = 2'b10; hwrite = w;
    @(negedge clk);
    hsel = 1'b0; htrans = 2'b00;
    if (w) hwdata = d;
    check("CSR zero wait", 32'(hreadyout), 32'd1);
    q = hrdata;
    @(negedge clk);
  endtask

  task automatic run(bit bank);
    logic [31:0] q;
    int n;
    for (int i = 64; i < 66; i++) mem[i] = 32'd0;
    csr(1, bank ? 8'h04 : 8'h00, 32'd0, q);
    check("run output", 32'({run1, run0}), bank ? 32'd2 : 32'd1);
    csr(1, 8'h0C, 32'h3, q);            // ignored during Run
    n = 0;
    do begin
      csr(0, 8'h08, 32'd0, q);
      n++;
    end while (q == 32'd0 && n < 500);
    check("FINISH", q, 32'd1);
    check("stored 0x55", mem[64], 32'h55);
    check("stored 0x66", mem[65], 32'h66);
    csr(0, 8'h0C, 32'd0, q);
    check("IRQ register unchanged by a write in Run", q, 32'd0);
    check("no run output after finish", 32'({run1, run0}), 32'd0);
  endtask

  initial begin
    logic [31:0] q;
    for (int i = 0; i < 8; i++) st_seen[i] = 0;
    for (int i = 0; i < 256; i++) mem[i] = 32'd0;
    mem[0] = 32'hE3A01055;   // MOV r1, #0x55
    mem[1] = 32'hE5821100;   // STR r1, [r2, #0x100]
    mem[2] = 32'hE3A01066;   // MOV r1, #0x66
    mem[3] = 32'hE5821104;   // STR r1, [r2, #0x104]
    mem[4] = 32'hE3A00102;   // MOV r0, #0x80000000
    mem[5] = 32'hE5800008;   // STR r0, [r0, #8]   (FINISH)
    mem[6] = 32'hEAFFFFFE;   // B .
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("Idle after reset", 32'(st), 32'd0);
    check("core held in reset", 32'(dut.core_rst_n), 32'd0);
    csr(1, 8'h0C, 32'h2, q);
    csr(0, 8'h0C, 32'd0, q);
    check("IRQ register write/read", q, 32'h2);
    csr(1, 8'h0C, 32'h0, q);
    csr(0, 8'h10, 32'd0, q);
    check("STATE during a read", q, 32'd2);
    run(0);
    csr(0, 8'h10, 32'd0, q);
    check("STATE bank 0", q[4], 32'd0);
    run(1);
    csr(0, 8'h10, 32'd0, q);
    check("STATE bank 1", q, 32'h12);
    for (int s = 0; s < 7; s++) begin
      checks++;
      if (st_seen[s] == 0) begin failures++; $display("FAIL state %0d never visited", s); end
    end
    check("Pre-Run cycles", pre_cycles, 2);
    check("core in reset during Pre-Run", pre_rst, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
