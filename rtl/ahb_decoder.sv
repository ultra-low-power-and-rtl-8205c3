// AHB address decoder of the logic tile. It turns the transfer address into
// one slave select. Map (this design's choice; the document names the
// decoder but gives no map): HADDR[23:21] = 0 ZBT SRAM 0 (2 MB),
// 1 ZBT SRAM 1 (2 MB), 2 ACARM7 CSRs, 3 AHB-APB system; any other value
// selects no slave and the default slave in the AHB multiplexer answers.
// Purely combinational.
module ahb_decoder (
  input  logic [31:0] haddr,
  output logic        hsel_zbt0,
  output logic        hsel_zbt1,
  output logic        hsel_csr,
  output logic        hsel_apb,
  output logic        hsel_none
);
  always_comb begin
    hsel_zbt0 = haddr[23:21] == 3'd0;
    hsel_zbt1 = haddr[23:21] == 3'd1;
    hsel_csr  = haddr[23:21] == 3'd2;
    hsel_apb  = haddr[23:21] == 3'd3;
    hsel_none = haddr[23:21] > 3'd3;
  end
endmodule
