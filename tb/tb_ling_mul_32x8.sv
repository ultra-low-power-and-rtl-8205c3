// Random test of the 32x8 multiplier in all four signedness combinations,
// and of the operand isolation (product zero when disabled).
module tb_ling_mul_32x8;
  logic en, as, bs;
  logic [31:0] a;
  logic [7:0]  b;
  logic [39:0] p;
  int checks = 0, failures = 0;
  ling_mul_32x8 dut (.en, .a, .b, .a_signed(as), .b_signed(bs), .p);
  initial begin
    for (int i = 0; i < 2000; i++) begin
      longint ea, eb, e;
      a = $urandom; b = 8'($urandom); as = 1'($urandom); bs = 1'($urandom); en = (i % 10 != 0);
      #1;
      ea = as ? longint'($signed(a)) : longint'(a);
      eb = bs ? longint'($signed(b)) : longint'(b);
      e  = en ? ea * eb : 0;
      checks++;
      if (p !== 40'(e)) begin
        failures++;
        $display("FAIL %h * %h (%0d%0d) got %h", a, b, as, bs, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
