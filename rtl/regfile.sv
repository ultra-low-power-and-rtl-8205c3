// Register file of the core: the 30 banked general-purpose registers of the
// six operating-mode groups (user/system, FIQ, supervisor, abort, IRQ,
// undefined) plus the six status registers (CPSR and the five SPSRs). With
// r15, which is held in the address register, this makes the 31 registers of
// the document. Registers are addressed by physical number (see phys_reg in
// acarm7_pkg); the caller maps r0..r14 of a mode onto them.
// Two combinational read ports and one write port for the general registers;
// the CPSR and one SPSR can be written in the same cycle. Status registers are
// kept in 12 bits because the other PSR bits are unused. Reset puts the CPSR
// in supervisor mode with IRQ and FIQ masked and clears all other registers.
// Writes are enabled per register, which lets synthesis gate the clock of
// registers that are not written (the document's clock-gating scheme).
module regfile
  import acarm7_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ra_addr,
  output logic [31:0] ra_data,
  input  logic [4:0]  rb_addr,
  output logic [31:0] rb_data,
  input  logic        we,
  input  logic [4:0]  waddr,
  input  logic [31:0] wdata,
  output psr_t        cpsr,
  input  logic        cpsr_we,
  input  psr_t        cpsr_wdata,
  input  logic [2:0]  spsr_rslot,
  output psr_t        spsr_rdata,
  input  logic        spsr_we,
  input  logic [2:0]  spsr_wslot,
  input  psr_t        spsr_wdata
);
  logic [31:0] gpr  [NPHYS];
  psr_t        spsr [5];

  assign ra_data    = (ra_addr < 5'(NPHYS)) ? gpr[ra_addr] : 32'd0;
  assign rb_data    = (rb_addr < 5'(NPHYS)) ? gpr[rb_addr] : 32'd0;
  assign spsr_rdata = (spsr_rslot < 3'd5) ? spsr[spsr_rslot] : cpsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPHYS; i++) gpr[i] <= 32'd0;
      for (int i = 0; i < 5; i++) spsr[i] <= '0;
      cpsr <= '{n: 1'b0, z: 1'b0, c: 1'b0, v: 1'b0, i: 1'b1, f: 1'b1, t: 1'b0, m: MODE_SVC};
    end else begin
      if (we && waddr < 5'(NPHYS)) gpr[waddr] <= wdata;
      if (cpsr_we) cpsr <= cpsr_wdata;
      if (spsr_we && spsr_wslot < 3'd5) spsr[spsr_wslot] <= spsr_wdata;
    end
  end
endmodule
