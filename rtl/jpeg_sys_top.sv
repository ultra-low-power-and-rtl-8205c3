// Top of the JPEG decoder system logic (the part built in the FPGA of the
// logic tile): AHB decoder, AHB multiplexer and the AHB wrapper holding the
// ACARM7 with its AHB interface and the two ZBT SRAM controllers.
//
// The host side (ARM926 on the core tile) is the single AHB master and
// drives HADDR/HTRANS/HWRITE/HSIZE/HWDATA; this block returns HRDATA,
// HREADY and HRESP. The AHB-APB system (bridge, interrupt controller, LED
// registers) is not part of this design; its select, its read data and its
// ready are brought out as ports. The two ZBT SRAM chips are external; their
// pins are ports. ext_irq is the push-button interrupt line for the ACARM7.
//
// Host flow: write the program and data into ZBT SRAM 0 or 1, write START0
// or START1 in the CSRs, poll FINISH, read results. The block partition
// follows the document's system and wrapper figures; the address map and the
// CSR layout are this design's (see ahb_decoder and ahb_if).
module jpeg_sys_top (
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic [31:0] HADDR,
  input  logic [1:0]  HTRANS,
  input  logic        HWRITE,
  input  logic [2:0]  HSIZE,
  input  logic [31:0] HWDATA,
  output logic [31:0] HRDATA,
  output logic        HREADY,
  output logic [1:0]  HRESP,
  // AHB-APB system (outside this design)
  output logic        hsel_apb,
  input  logic [31:0] hrdata_apb,
  input  logic        hreadyout_apb,
  input  logic        ext_irq,
  output logic        finish,
  output logic [2:0]  if_state,
  // ZBT SRAM pins
  output logic [18:0] zbt0_addr, zbt1_addr,
  output logic        zbt0_cen_n, zbt1_cen_n,
  output logic        zbt0_wen_n, zbt1_wen_n,
  output logic [3:0]  zbt0_ben_n, zbt1_ben_n,
  output logic [31:0] zbt0_dq_o, zbt1_dq_o,
  output logic        zbt0_dq_oe, zbt1_dq_oe,
  input  logic [31:0] zbt0_dq_i, zbt1_dq_i
);
  logic        s_zbt0, s_zbt1, s_csr, s_none;
  logic [31:0] rd_s [4];
  logic [3:0]  rdy_s;

  ahb_decoder u_dec (
    .haddr(HADDR), .hsel_zbt0(s_zbt0), .hsel_zbt1(s_zbt1), .hsel_csr(s_csr),
    .hsel_apb, .hsel_none(s_none)
  );

  ahb_wrapper u_wrap (
    .clk(HCLK), .rst_n(HRESETn),
    .hsel_zbt0(s_zbt0), .hsel_zbt1(s_zbt1), .hsel_csr(s_csr),
    .haddr(HADDR), .htrans(HTRANS), .hwrite(HWRITE), .hsize(HSIZE),
    .hwdata(HWDATA), .hready(HREADY),
    .hrdata_zbt0(rd_s[0]), .hrdata_zbt1(rd_s[1]), .hrdata_csr(rd_s[2]),
    .hreadyout_zbt0(rdy_s[0]), .hreadyout_zbt1(rdy_s[1]), .hreadyout_csr(rdy_s[2]),
    .ext_irq, .finish, .if_state,
    .zbt0_addr, .zbt1_addr, .zbt0_cen_n, .zbt1_cen_n, .zbt0_wen_n, .zbt1_wen_n,
    .zbt0_ben_n, .zbt1_ben_n, .zbt0_dq_o, .zbt1_dq_o, .zbt0_dq_oe, .zbt1_dq_oe,
    .zbt0_dq_i, .zbt1_dq_i
  );

  assign rd_s[3]  = hrdata_apb;
  assign rdy_s[3] = hreadyout_apb;

  ahb_mux u_mux (
    .clk(HCLK), .rst_n(HRESETn), .hready(HREADY),
    .hsel({s_none, hsel_apb, s_csr, s_zbt1, s_zbt0}),
    .hrdata_s(rd_s), .hreadyout_s(rdy_s),
    .hrdata(HRDATA), .hreadyout(HREADY), .hresp(HRESP)
  );
endmodule
