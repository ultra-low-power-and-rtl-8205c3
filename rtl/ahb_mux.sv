// AHB slave-to-master multiplexer. The slave select of each address phase
// is registered (when HREADY is high) and, during the following data phase,
// picks that slave's HRDATA and HREADYOUT for the master. When no slave was
// selected, a built-in default slave answers at once with zero data and an
// OKAY response. Order of the select vector: {none, apb, csr, zbt1, zbt0}.
// The document names the multiplexer; its register-the-select structure is
// the usual AHB one and is this design's choice.
module ahb_mux (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hready,
  input  logic [4:0]  hsel,
  input  logic [31:0] hrdata_s [4],
  input  logic [3:0]  hreadyout_s,
  output logic [31:0] hrdata,
  output logic        hreadyout,
  output logic [1:0]  hresp
);
  logic [4:0] sel_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      sel_q <= 5'b10000;
    else if (hready) sel_q <= hsel;

  always_comb begin
    hrdata    = 32'd0;
    hreadyout = 1'b1;
    for (int k = 0; k < 4; k++)
      if (sel_q[k]) begin
        hrdata    = hrdata_s[k];
        hreadyout = hreadyout_s[k];
      end
    hresp = 2'b00;
  end
endmodule
