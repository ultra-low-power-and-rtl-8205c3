// Test of the address register: reset to 0, each of the four sources, the
// hold when not loaded, and word alignment of the loaded address.
module tb_addr_reg;
  logic clk = 0, rst_n = 0, ld;
  logic [1:0] sel;
  logic [31:0] alu_in, lsm_in, vec_in, pc, pc_inc;
  int checks = 0, failures = 0;
  addr_reg dut (.clk, .rst_n, .ld, .sel, .alu_in, .lsm_in, .vec_in, .pc, .pc_inc);
  always #5 clk = ~clk;
  task automatic chk(string w, logic [31:0] exp);
    checks++;
    if (pc !== exp) begin failures++; $display("FAIL %s: %h exp %h", w, pc, exp); end
  endtask
  initial begin
    ld = 0; sel = 0; alu_in = 32'h0000_1236; lsm_in = 32'h0000_4000; vec_in = 32'h18;
    @(negedge clk); @(negedge clk); chk("reset", 0);
    rst_n = 1; ld = 1; sel = 0;
    @(negedge clk); chk("incr", 4);
    @(negedge clk); chk("incr2", 8);
    sel = 1; @(negedge clk); chk("alu aligned", 32'h1234);
    sel = 2; @(negedge clk); chk("lsm", 32'h4000);
    ld = 0; sel = 3; @(negedge clk); chk("hold", 32'h4000);
    checks++; if (pc_inc !== 32'h4004) begin failures++; $display("FAIL pc_inc"); end
    ld = 1; @(negedge clk); chk("vector", 32'h18);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
