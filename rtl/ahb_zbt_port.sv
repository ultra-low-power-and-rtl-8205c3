// AHB slave port onto one ZBT SRAM controller, used by the host (ARM926)
// to fill and read a ZBT SRAM bank. The address phase of a transfer is
// latched; in the data phase the port issues one request to the ZBT
// controller and holds HREADYOUT low until the controller answers. While
// the ACARM7 core owns the bank ("busy"), the request is held back and the
// transfer waits. HSIZE values 0/1/2 map to byte/half/word. Only OKAY
// responses are produced. The document says the ARM926 accesses the SRAM
// through the AHB bus via a multiplexer; the wait-while-busy behaviour and
// the latching scheme are this design's choices.
module ahb_zbt_port
  import acarm7_pkg::*;
#(
  parameter int unsigned AW = 21
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          hsel,
  input  logic [31:0]   haddr,
  input  logic [1:0]    htrans,
  input  logic          hwrite,
  input  logic [2:0]    hsize,
  input  logic [31:0]   hwdata,
  input  logic          hready,
  output logic [31:0]   hrdata,
  output logic          hreadyout,
  input  logic          busy,
  // requester side towards the ZBT controller (through the bank mux)
  output logic          req,
  output logic          we,
  output logic [AW-1:0] addr,
  output size_e         size,
  output logic [31:0]   wdata,
  input  logic [31:0]   rdata,
  input  logic          ready
);
  logic          pend, w_q;
  logic [AW-1:0] a_q;
  size_e         s_q;

  assign req       = pend && !busy;
  assign we        = w_q;
  assign addr      = a_q;
  assign size      = s_q;
  assign wdata     = hwdata;
  assign hrdata    = rdata;
  assign hreadyout = !pend || (ready && !busy);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pend <= 1'b0; w_q <= 1'b0; a_q <= '0; s_q <= SZ_WORD;
    end else if (hready) begin
      pend <= hsel && htrans[1];
      if (hsel && htrans[1]) begin
        w_q <= hwrite;
        a_q <= haddr[AW-1:0];
        s_q <= (hsize == 3'd0) ? SZ_BYTE : (hsize == 3'd1) ? SZ_HALF : SZ_WORD;
      end
    end
endmodule
