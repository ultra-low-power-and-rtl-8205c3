// Random test of the 64-bit adder: sum, carry-out and signed overflow
// against 65-bit arithmetic.
module tb_fong_adder;
  logic [63:0] a, b, sum;
  logic cin, cout, ovf;
  int checks = 0, failures = 0;
  fong_adder dut (.a, .b, .cin, .sum, .cout, .ovf);
  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [64:0] e;
      logic ev;
      a = {$urandom, $urandom}; b = (i % 7 == 0) ? ~a : {$urandom, $urandom}; cin = 1'($urandom);
      #1;
      e = 65'(a) + 65'(b) + 65'(cin);
      ev = ($signed(a) < 0) == ($signed(b) < 0) && (e[63] != a[63]);
      checks++;
      if ({cout, sum} !== e || ovf !== ev) begin
        failures++;
        $display("FAIL %h + %h + %0d", a, b, cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
