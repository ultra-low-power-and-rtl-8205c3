// Address register (program counter) of the core. Its next value comes from
// a 4-to-1 multiplexer over the four address sources of the document: the
// program-counter incrementer (sequential fetch), the ALU output (branch
// targets and data-processing results written to r15), the load/store
// multiple path (a value loaded from memory into r15), and the exception
// vector. The register is loaded when ld is high and holds otherwise; reset
// clears it to the reset vector 0. The register holds the address of the
// next instruction to be fetched. The four sources follow the document; the
// enable and reset behaviour are this design's choice.
module addr_reg (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld,
  input  logic [1:0]  sel,      // 0 incrementer, 1 ALU, 2 LDM/STM, 3 interrupt vector
  input  logic [31:0] alu_in,
  input  logic [31:0] lsm_in,
  input  logic [31:0] vec_in,
  output logic [31:0] pc,
  output logic [31:0] pc_inc
);
  logic [31:0] nxt;
  always_comb begin
    pc_inc = pc + 32'd4;
    unique case (sel)
      2'd0: nxt = pc_inc;
      2'd1: nxt = alu_in;
      2'd2: nxt = lsm_in;
      default: nxt = vec_in;
    endcase
    nxt[1:0] = 2'b00;  // instruction addresses are word aligned
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  pc <= 32'd0;
    else if (ld) pc <= nxt;
endmodule
