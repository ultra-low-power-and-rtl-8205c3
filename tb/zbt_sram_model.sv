// Behavioural model of one flow-through ZBT SRAM chip (test bench only).
// A command (chip enable low) is sampled at a rising edge; in the next
// cycle a read returns the addressed word combinationally on dq_i, and a
// write takes dq_o at the end of that cycle into the byte lanes whose byte
// enable is low. WORDS sets the depth; the default is the 512K x 32 (2 MB)
// part of the board. Memory starts at zero. Counts of read and write
// commands are kept for the test benches.
module zbt_sram_model #(
  parameter int unsigned WORDS = 524288,
  parameter int unsigned AW    = 19
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          cen_n,
  input  logic          wen_n,
  input  logic [3:0]    ben_n,
  input  logic [31:0]   dq_o,
  input  logic          dq_oe,
  output logic [31:0]   dq_i
);
  logic [31:0]   mem [WORDS];
  logic          pend_rd = 1'b0, pend_wr = 1'b0;
  logic [AW-1:0] a_q = '0;
  logic [3:0]    be_q = '0;
  int            n_reads = 0, n_writes = 0, n_oe_errors = 0;

  initial for (int i = 0; i < WORDS; i++) mem[i] = 32'd0;

  assign dq_i = pend_rd ? mem[a_q] : 32'hDEAD_BEEF;

  always @(posedge clk) begin
    if (pend_wr) begin
      if (!dq_oe) n_oe_errors++;
      for (int b = 0; b < 4; b++)
        if (be_q[b]) mem[a_q][8*b +: 8] <= dq_o[8*b +: 8];
    end
    pend_rd <= !cen_n && wen_n;
    pend_wr <= !cen_n && !wen_n;
    if (!cen_n) begin
      a_q  <= addr;
      be_q <= ~ben_n;
      if (wen_n) n_reads++; else n_writes++;
    end
  end
endmodule
