// Test of the forwarding unit: a pending write is substituted on either read
// port only when it is valid and its address matches.
module tb_forwarding_unit;
  logic [4:0] ra_addr, rb_addr, wb_addr;
  logic [31:0] ra_rf, rb_rf, wb_data, ra_data, rb_data;
  logic wb_valid, fwd_a, fwd_b;
  int checks = 0, failures = 0;
  forwarding_unit dut (.ra_addr, .ra_rf, .rb_addr, .rb_rf, .wb_valid, .wb_addr, .wb_data,
                       .ra_data, .rb_data, .fwd_a, .fwd_b);
  initial begin
    for (int i = 0; i < 1000; i++) begin
      logic ea, eb;
      ra_addr = 5'($urandom_range(0, 7)); rb_addr = 5'($urandom_range(0, 7)); wb_addr = 5'($urandom_range(0, 7));
      ra_rf = $urandom; rb_rf = $urandom; wb_data = $urandom; wb_valid = 1'($urandom);
      #1;
      ea = wb_valid && ra_addr == wb_addr; eb = wb_valid && rb_addr == wb_addr;
      checks++;
      if (ra_data !== (ea ? wb_data : ra_rf) || rb_data !== (eb ? wb_data : rb_rf) || fwd_a !== ea || fwd_b !== eb) begin
        failures++; $display("FAIL forwarding case %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
