// Test of the AHB address decoder: for random addresses in every region,
// exactly one select is high and it is the one the address map names.
module tb_ahb_decoder;
  logic [31:0] haddr = '0;
  logic        s0, s1, sc, sa, sn;

  ahb_decoder dut (.haddr, .hsel_zbt0(s0), .hsel_zbt1(s1), .hsel_csr(sc), .hsel_apb(sa),
                   .hsel_none(sn));

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [4:0] exp;
    for (int n = 0; n < 2000; n++) begin
      haddr = $urandom;
      #1;
      unique case (haddr[23:21])
        3'd0: exp = 5'b00001;
        3'd1: exp = 5'b00010;
        3'd2: exp = 5'b00100;
        3'd3: exp = 5'b01000;
        default: exp = 5'b10000;
      endcase
      check($sformatf("selects for %h", haddr), 32'({sn, sa, sc, s1, s0}), 32'(exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
