// Test of the read/write data selection: byte and halfword extraction with
// zero and sign extension, rotated unaligned word reads, and lane copying
// on writes, against values worked out per case.
module tb_rw_data_sel;
  import acarm7_pkg::*;
  size_e size; logic [1:0] addr_lo; logic sign;
  logic [31:0] mem_rdata, rdata, reg_wdata, mem_wdata;
  int checks = 0, failures = 0;
  rw_data_sel dut (.size, .addr_lo, .sign, .mem_rdata, .rdata, .reg_wdata, .mem_wdata);
  task automatic t(size_e s, int lo, bit sg, logic [31:0] exp_r, logic [31:0] exp_w);
    size = s; addr_lo = 2'(lo); sign = sg; #1;
    checks += 2;
    if (rdata !== exp_r) begin failures++; $display("FAIL read s=%0d lo=%0d sg=%0d got %h exp %h", s, lo, sg, rdata, exp_r); end
    if (mem_wdata !== exp_w) begin failures++; $display("FAIL write s=%0d got %h exp %h", s, mem_wdata, exp_w); end
  endtask
  initial begin
    mem_rdata = 32'h8A7B_C65D; reg_wdata = 32'h1234_5687;
    t(SZ_WORD, 0, 0, 32'h8A7B_C65D, 32'h1234_5687);
    t(SZ_WORD, 1, 0, 32'h5D8A_7BC6, 32'h1234_5687);
    t(SZ_WORD, 2, 0, 32'hC65D_8A7B, 32'h1234_5687);
    t(SZ_BYTE, 0, 0, 32'h0000_005D, 32'h8787_8787);
    t(SZ_BYTE, 1, 1, 32'hFFFF_FFC6, 32'h8787_8787);
    t(SZ_BYTE, 2, 1, 32'h0000_007B, 32'h8787_8787);
    t(SZ_BYTE, 3, 0, 32'h0000_008A, 32'h8787_8787);
    t(SZ_HALF, 0, 1, 32'hFFFF_C65D, 32'h5687_5687);
    t(SZ_HALF, 2, 1, 32'hFFFF_8A7B, 32'h5687_5687);
    t(SZ_HALF, 2, 0, 32'h0000_8A7B, 32'h5687_5687);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
