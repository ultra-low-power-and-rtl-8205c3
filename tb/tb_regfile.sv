// Test of the register file: reset state of the CPSR, writes and reads on
// random physical registers against a shadow copy (both ports), the banked
// mapping of r13/r14 and r8..r14 for FIQ through phys_reg, and the SPSR
// slots.
module tb_regfile;
  import acarm7_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] ra_addr, rb_addr, waddr;
  logic [31:0] ra_data, rb_data, wdata;
  logic we, cpsr_we, spsr_we;
  psr_t cpsr, cpsr_wdata, spsr_rdata, spsr_wdata;
  logic [2:0] spsr_rslot, spsr_wslot;
  logic [31:0] shadow [30];
  int checks = 0, failures = 0;
  regfile dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", w, got, exp); end
  endtask
  initial begin
    we = 0; cpsr_we = 0; spsr_we = 0; ra_addr = 0; rb_addr = 0; waddr = 0; wdata = 0;
    spsr_rslot = 0; spsr_wslot = 0; cpsr_wdata = '0; spsr_wdata = '0;
    for (int i = 0; i < 30; i++) shadow[i] = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    chk("reset CPSR", psr_to_word(cpsr), 32'h0000_00D3);
    for (int i = 0; i < 400; i++) begin
      we = 1; waddr = 5'($urandom_range(0, 29)); wdata = $urandom;
      shadow[waddr] = wdata;
      @(negedge clk);
      we = 0;
      ra_addr = 5'($urandom_range(0, 29)); rb_addr = 5'($urandom_range(0, 29));
      #1;
      chk("port a", ra_data, shadow[ra_addr]);
      chk("port b", rb_data, shadow[rb_addr]);
    end
    chk("map usr r13", 32'(phys_reg(MODE_USR, 13)), 13);
    chk("map svc r13", 32'(phys_reg(MODE_SVC, 13)), 22);
    chk("map irq r14", 32'(phys_reg(MODE_IRQ, 14)), 27);
    chk("map fiq r8",  32'(phys_reg(MODE_FIQ, 8)), 15);
    chk("map fiq r7",  32'(phys_reg(MODE_FIQ, 7)), 7);
    chk("map und r12", 32'(phys_reg(MODE_UND, 12)), 12);
    spsr_we = 1; spsr_wslot = 3'd1; spsr_wdata = word_to_psr(32'hA000_0010);
    cpsr_we = 1; cpsr_wdata = word_to_psr(32'h4000_0092);
    @(negedge clk);
    spsr_we = 0; cpsr_we = 0; spsr_rslot = 3'd1; #1;
    chk("spsr irq", psr_to_word(spsr_rdata), 32'hA000_0010);
    chk("cpsr", psr_to_word(cpsr), 32'h4000_0092);
    spsr_rslot = 3'd7; #1;
    chk("no spsr in user", psr_to_word(spsr_rdata), 32'h4000_0092);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
