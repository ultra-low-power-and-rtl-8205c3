// Test of the AHB slave-to-master multiplexer: random slave selects are
// presented in address phases with random HREADY; in the next cycle the
// output must carry the read data and ready of the slave registered at the
// last address phase with HREADY high, or the default slave's zero / ready.
module tb_ahb_mux;
  logic        clk = 1'b0, rst_n = 1'b0, hready = 1'b1;
  logic [4:0]  hsel = '0;
  logic [31:0] rd_s [4];
  logic [3:0]  rdy_s = '0;
  logic [31:0] hrdata;
  logic        hreadyout;
  logic [1:0]  hresp;

  ahb_mux dut (.clk, .rst_n, .hready, .hsel, .hrdata_s(rd_s), .hreadyout_s(rdy_s),
               .hrdata, .hreadyout, .hresp);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    int sel_ref;   // index of registered slave, 4 = none
    sel_ref = 4;
    for (int k = 0; k < 4; k++) rd_s[k] = 32'd0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      int k;
      k = $urandom_range(4);
      hsel   = 5'b00001 << k;
      hready = ($urandom_range(3) != 0);
      for (int j = 0; j < 4; j++) rd_s[j] = $urandom;
      rdy_s = 4'($urandom);
      #1;
      if (sel_ref == 4) begin
        check("default data", hrdata, 32'd0);
        check("default ready", 32'(hreadyout), 32'd1);
      end else begin
        check("data", hrdata, rd_s[sel_ref]);
        check("ready", 32'(hreadyout), 32'(rdy_s[sel_ref]));
      end
      check("OKAY", 32'(hresp), 32'd0);
      @(posedge clk);
      if (hready) sel_ref = k;
      @(negedge clk);
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
