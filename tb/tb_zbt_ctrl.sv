// Test of the ZBT SRAM controller against the flow-through SRAM model:
// random byte / halfword / word reads and writes over a small address
// window, with random gaps between requests. Every read is compared with a
// reference copy of the memory, and every access must take exactly two
// cycles (ready in the cycle after the command).
module tb_zbt_ctrl;
  import acarm7_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        req = 1'b0, we = 1'b0, ready;
  logic [20:0] addr = '0;
  size_e       size = SZ_WORD;
  logic [31:0] wdata = '0, rdata;
  logic [18:0] s_addr;
  logic        cen_n, wen_n, oe;
  logic [3:0]  ben_n;
  logic [31:0] dqo, dqi;

  zbt_ctrl dut (.clk, .rst_n, .req, .we, .addr, .size, .wdata, .rdata, .ready,
                .sram_addr(s_addr), .sram_cen_n(cen_n), .sram_wen_n(wen_n), .sram_ben_n(ben_n),
                .sram_dq_o(dqo), .sram_dq_oe(oe), .sram_dq_i(dqi));
  zbt_sram_model u_m (.clk, .addr(s_addr), .cen_n, .wen_n, .ben_n, .dq_o(dqo), .dq_oe(oe), .dq_i(dqi));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [31:0] ref_m [64];

  task automatic access(bit w, logic [20:0] a, size_e sz, logic [31:0] d, output logic [31:0] q);
    int cyc;
    req = 1'b1; we = w; addr = a; size = sz; wdata = d;
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
    end while (!ready);
    q = rdata;
    check("two-cycle access", cyc, 1);
    @(negedge clk);
    req = 1'b0;
  endtask

  initial begin
    logic [31:0] q, e;
    logic [20:0] a;
    size_e sz;
    for (int i = 0; i < 64; i++) ref_m[i] = 32'd0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 1500; n++) begin
      sz = size_e'($urandom_range(2));
      a  = 21'($urandom_range(255));
      if (sz == SZ_HALF) a[0] = 1'b0;
      if (sz == SZ_WORD) a[1:0] = 2'b00;
      if ($urandom_range(1)) begin
        e = $urandom;
        access(1, a, sz, e, q);
        unique case (sz)
          SZ_BYTE: ref_m[a[7:2]][8*a[1:0] +: 8] = e[8*a[1:0] +: 8];
          SZ_HALF: ref_m[a[7:2]][16*a[1] +: 16] = e[16*a[1] +: 16];
          default: ref_m[a[7:2]] = e;
        endcase
      end else begin
        access(0, a, sz, 32'd0, q);
        check($sformatf("read %h", a), q, ref_m[a[7:2]]);
      end
      repeat ($urandom_range(2)) @(negedge clk);
    end
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
