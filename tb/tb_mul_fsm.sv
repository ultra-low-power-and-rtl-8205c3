// Test of the multiplication sub-FSM: for multipliers of one to four
// significant bytes, signed and unsigned, with and without accumulation and
// long result, the instruction must take 1 + bytes (+1 accumulate, +1 long)
// cycles, i.e. 2 to 7, and walk through the states in order.
module tb_mul_fsm;
  logic clk = 0, rst_n = 0, en = 1, start = 0, acc = 0, long_res = 0, signed_op = 0;
  logic [31:0] mplier;
  logic [2:0] state;
  logic [1:0] slice, nbytes_m1;
  logic last_slice, done;
  int checks = 0, failures = 0;
  mul_fsm dut (.*);
  always #5 clk = ~clk;

  task automatic one(logic [31:0] m, bit sg, bit a, bit l, int exp_bytes);
    int cyc;
    cyc = 0;
    mplier = m; signed_op = sg; acc = a; long_res = l; start = 1;
    do begin
      #1;
      if (cyc == 0 && state !== 3'd1) begin failures++; $display("FAIL first state %0d", state); end
      cyc++;
      @(negedge clk);
      start = 0;
      mplier = $urandom;   // only sampled in the first cycle
    end while (!(state == 3'd0));
    checks++;
    if (cyc != 1 + exp_bytes + a + l) begin
      failures++;
      $display("FAIL m=%h sg=%0d a=%0d l=%0d: %0d cycles, expected %0d", m, sg, a, l, cyc, 1 + exp_bytes + a + l);
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 1; @(negedge clk);
    one(32'h0000_0007, 0, 0, 0, 1);   // 2 cycles
    one(32'h0000_1234, 0, 0, 0, 2);
    one(32'h0012_3456, 0, 0, 0, 3);
    one(32'h1234_5678, 0, 0, 0, 4);   // 5 cycles
    one(32'hFFFF_FFFF, 0, 1, 1, 4);   // 7 cycles
    one(32'hFFFF_FFFF, 1, 0, 0, 1);
    one(32'hFFFF_FF00, 1, 0, 1, 2);
    one(32'h0000_0080, 1, 0, 0, 2);
    one(32'h0000_0080, 0, 1, 0, 1);
    one(32'hFF80_0000, 1, 1, 0, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
