// ZBT SRAM controller. It turns a simple request/ready access (from the
// ACARM7 core or from the AHB side, whichever owns the memory) into the
// pin-level cycle of a flow-through ZBT SRAM organised as 512K x 32 (2 MB):
// in the first cycle it drives chip enable, word address, write enable and
// byte enables; one cycle later the SRAM returns read data, or the
// controller drives the write data, and ready goes high. Every access thus
// takes two cycles. Byte enables come from the size and the two low address
// bits (little-endian). The document names this controller without its
// insides; the flow-through protocol, the two-cycle access and the pin set
// are this design's assumptions.
module zbt_ctrl
  import acarm7_pkg::*;
#(
  parameter int unsigned AW = 21          // byte address bits: 2 MB
) (
  input  logic          clk,
  input  logic          rst_n,
  // requester side
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  size_e         size,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata,
  output logic          ready,
  // SRAM pins
  output logic [AW-3:0] sram_addr,
  output logic          sram_cen_n,
  output logic          sram_wen_n,
  output logic [3:0]    sram_ben_n,
  output logic [31:0]   sram_dq_o,
  output logic          sram_dq_oe,
  input  logic [31:0]   sram_dq_i
);
  logic        phase;      // 0: command cycle, 1: data cycle
  logic        we_q;
  logic [3:0]  be;

  always_comb begin
    unique case (size)
      SZ_BYTE: be = 4'b0001 << addr[1:0];
      SZ_HALF: be = addr[1] ? 4'b1100 : 4'b0011;
      default: be = 4'b1111;
    endcase
    sram_cen_n = !(req && !phase);
    sram_wen_n = !(req && !phase && we);
    sram_addr  = addr[AW-1:2];
    sram_ben_n = ~be;
    sram_dq_o  = wdata;
    sram_dq_oe = phase && we_q;
    ready      = phase;
    rdata      = sram_dq_i;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      phase <= 1'b0; we_q <= 1'b0;
    end else if (phase) begin
      phase <= 1'b0;
    end else if (req) begin
      phase <= 1'b1; we_q <= we;
    end
endmodule
