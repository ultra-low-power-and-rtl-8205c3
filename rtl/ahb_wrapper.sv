// AHB wrapper of the JPEG decoder system logic: the ACARM7 with its AHB
// interface (ahb_if), two ZBT SRAM controllers and, in front of each
// controller, a multiplexer that gives the memory either to the host over
// AHB or to the ACARM7 core. Bank k is given to the core in state Run k of
// the interface FSM and to the host otherwise, so the host can fill one
// bank while the core works on the other. This partition (two controllers,
// two multiplexers, the interface block) follows the document's wrapper
// figure; the select rule is this design's reading of it.
//
// Interface: three AHB slave selects (ZBT0 window, ZBT1 window, CSRs) with
// shared address/control/write data, one HRDATA/HREADYOUT per slave, and
// the pins of the two ZBT SRAMs.
module ahb_wrapper
  import acarm7_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hsel_zbt0,
  input  logic        hsel_zbt1,
  input  logic        hsel_csr,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [2:0]  hsize,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic [31:0] hrdata_zbt0, hrdata_zbt1, hrdata_csr,
  output logic        hreadyout_zbt0, hreadyout_zbt1, hreadyout_csr,
  input  logic        ext_irq,
  output logic        finish,
  output logic [2:0]  if_state,
  // ZBT SRAM pins, bank 0 and bank 1
  output logic [18:0] zbt0_addr, zbt1_addr,
  output logic        zbt0_cen_n, zbt1_cen_n,
  output logic        zbt0_wen_n, zbt1_wen_n,
  output logic [3:0]  zbt0_ben_n, zbt1_ben_n,
  output logic [31:0] zbt0_dq_o, zbt1_dq_o,
  output logic        zbt0_dq_oe, zbt1_dq_oe,
  input  logic [31:0] zbt0_dq_i, zbt1_dq_i
);
  // core port
  logic        m_req, m_we, m_ready, run0, run1;
  logic [31:0] m_addr, m_wdata, m_rdata;
  size_e       m_size;

  ahb_if u_if (
    .clk, .rst_n, .hsel(hsel_csr), .haddr, .htrans, .hwrite, .hwdata, .hready,
    .hrdata(hrdata_csr), .hreadyout(hreadyout_csr),
    .mem_req(m_req), .mem_we(m_we), .mem_addr(m_addr), .mem_size(m_size),
    .mem_wdata(m_wdata), .mem_rdata(m_rdata), .mem_ready(m_ready),
    .run0, .run1, .ext_irq, .finish, .state_o(if_state)
  );

  // host ports
  logic        h_req [2], h_we [2], h_ready [2];
  logic [20:0] h_addr [2];
  size_e       h_size [2];
  logic [31:0] h_wdata [2];
  logic [31:0] z_rdata [2];

  ahb_zbt_port u_hp0 (
    .clk, .rst_n, .hsel(hsel_zbt0), .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hrdata(hrdata_zbt0), .hreadyout(hreadyout_zbt0), .busy(run0),
    .req(h_req[0]), .we(h_we[0]), .addr(h_addr[0]), .size(h_size[0]),
    .wdata(h_wdata[0]), .rdata(z_rdata[0]), .ready(h_ready[0])
  );
  ahb_zbt_port u_hp1 (
    .clk, .rst_n, .hsel(hsel_zbt1), .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hrdata(hrdata_zbt1), .hreadyout(hreadyout_zbt1), .busy(run1),
    .req(h_req[1]), .we(h_we[1]), .addr(h_addr[1]), .size(h_size[1]),
    .wdata(h_wdata[1]), .rdata(z_rdata[1]), .ready(h_ready[1])
  );

  // bank multiplexers and controllers
  logic        z_req [2], z_we [2], z_ready [2];
  logic [20:0] z_addr [2];
  size_e       z_size [2];
  logic [31:0] z_wdata [2];
  logic        own [2], sel [2], core_q [2];

  // The owner of an access is fixed at its command cycle and kept for its
  // data cycle, so a change of owner never splits an access.
  assign own[0] = run0;
  assign own[1] = run1;
  assign sel[0] = z_ready[0] ? core_q[0] : own[0];
  assign sel[1] = z_ready[1] ? core_q[1] : own[1];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      core_q[0] <= 1'b0; core_q[1] <= 1'b0;
    end else begin
      core_q[0] <= own[0];
      core_q[1] <= own[1];
    end

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      z_req[k]   = sel[k] ? m_req          : h_req[k];
      z_we[k]    = sel[k] ? m_we           : h_we[k];
      z_addr[k]  = sel[k] ? m_addr[20:0]   : h_addr[k];
      z_size[k]  = sel[k] ? m_size         : h_size[k];
      z_wdata[k] = sel[k] ? m_wdata        : h_wdata[k];
      h_ready[k] = !sel[k] && z_ready[k];
    end
    m_rdata = run1 ? z_rdata[1] : z_rdata[0];
    m_ready = (run0 && sel[0] && z_ready[0]) || (run1 && sel[1] && z_ready[1]);
  end

  zbt_ctrl u_zc0 (
    .clk, .rst_n, .req(z_req[0]), .we(z_we[0]), .addr(z_addr[0]), .size(z_size[0]),
    .wdata(z_wdata[0]), .rdata(z_rdata[0]), .ready(z_ready[0]),
    .sram_addr(zbt0_addr), .sram_cen_n(zbt0_cen_n), .sram_wen_n(zbt0_wen_n),
    .sram_ben_n(zbt0_ben_n), .sram_dq_o(zbt0_dq_o), .sram_dq_oe(zbt0_dq_oe),
    .sram_dq_i(zbt0_dq_i)
  );
  zbt_ctrl u_zc1 (
    .clk, .rst_n, .req(z_req[1]), .we(z_we[1]), .addr(z_addr[1]), .size(z_size[1]),
    .wdata(z_wdata[1]), .rdata(z_rdata[1]), .ready(z_ready[1]),
    .sram_addr(zbt1_addr), .sram_cen_n(zbt1_cen_n), .sram_wen_n(zbt1_wen_n),
    .sram_ben_n(zbt1_ben_n), .sram_dq_o(zbt1_dq_o), .sram_dq_oe(zbt1_dq_oe),
    .sram_dq_i(zbt1_dq_i)
  );
endmodule
