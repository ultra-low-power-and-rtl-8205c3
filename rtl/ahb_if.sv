// ACARM7 with its AHB interface. This block holds the core, its control and
// status registers (CSRs) and the seven-state interface FSM of the
// document: Idle, Write, Read, Pre-Run0, Pre-Run1, Run0 and Run1.
//
// The host (the ARM926 on the board) reaches the CSRs as an AHB slave.
// A write transfer moves the FSM to Write, a read to Read; a write to
// START0 or START1 is a decoding request and moves it (from Idle, Write or
// Read) to Pre-Run0 or Pre-Run1, which holds the core in reset for one cycle
// and clears FINISH; the FSM must then go to Run0/Run1, where the core runs
// from address 0 of ZBT SRAM 0 or 1 until it signals the end of its task.
// Run then returns to Idle. In the Run states host reads of the CSRs are
// still answered (so FINISH can be polled) and host writes are ignored.
//
// CSR map (byte offsets): 0x00 START0 (write), 0x04 START1 (write),
// 0x08 FINISH (read bit 0), 0x0C IRQ (bit 0 drives the core IRQ, bit 1 FIQ),
// 0x10 STATE (read: FSM state in bits 2:0, bank in bit 4).
// The core signals completion by writing to core address 0x8000_0008
// (any address with bit 31 set is this local CSR space for the core);
// that sets FINISH. All other core accesses go out on the mem_* port to
// the ZBT SRAM of the running bank.
//
// The seven states and their roles follow the document's FSM figure; the
// CSR addresses, the START/IRQ/STATE registers and the finish mechanism are
// this design's own, since the document does not give them.
module ahb_if
  import acarm7_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AHB slave port for the CSRs
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic [31:0] hrdata,
  output logic        hreadyout,
  // core memory port towards the ZBT SRAM of the running bank
  output logic        mem_req,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output size_e       mem_size,
  output logic [31:0] mem_wdata,
  input  logic [31:0] mem_rdata,
  input  logic        mem_ready,
  output logic        run0,        // core owns ZBT SRAM 0
  output logic        run1,        // core owns ZBT SRAM 1
  input  logic        ext_irq,
  output logic        finish,
  output logic [2:0]  state_o
);
  typedef enum logic [2:0] {
    S_IDLE, S_WRITE, S_READ, S_PRE0, S_PRE1, S_RUN0, S_RUN1
  } ifst_e;

  localparam logic [7:0] A_START0 = 8'h00, A_START1 = 8'h04, A_FINISH = 8'h08,
                         A_IRQ = 8'h0C, A_STATE = 8'h10;

  ifst_e       st, st_n;
  logic        xfer, start0, start1;
  logic        dph_valid, dph_write;
  logic [7:0]  dph_addr;
  logic [1:0]  irq_q;
  logic        core_rst_n, bank;

  // core
  logic        c_req, c_write, c_ready, c_retire, c_fwd, c_exc;
  logic [31:0] c_addr, c_wdata, c_rdata;
  size_e       c_size;
  logic [2:0]  c_exst;
  logic        c_local;

  acarm7_core u_core (
    .clk, .rst_n(core_rst_n), .irq(irq_q[0] || ext_irq), .fiq(irq_q[1]),
    .bus_req(c_req), .bus_addr(c_addr), .bus_write(c_write), .bus_size(c_size),
    .bus_wdata(c_wdata), .bus_rdata(c_rdata), .bus_ready(c_ready),
    .retire(c_retire), .ex_state_o(c_exst), .fwd_used(c_fwd), .exc_taken(c_exc)
  );

  assign c_local   = c_addr[31];
  assign mem_req   = c_req && !c_local;
  assign mem_we    = c_write;
  assign mem_addr  = c_addr;
  assign mem_size  = c_size;
  assign mem_wdata = c_wdata;
  assign c_rdata   = c_local ? {31'd0, finish} : mem_rdata;
  assign c_ready   = c_local ? 1'b1 : mem_ready;

  // AHB address phase
  assign xfer   = hsel && hready && htrans[1];
  assign start0 = xfer && hwrite && haddr[7:0] == A_START0;
  assign start1 = xfer && hwrite && haddr[7:0] == A_START1;

  always_comb begin
    st_n = st;
    unique case (st)
      S_IDLE, S_WRITE, S_READ: begin
        if (start0)             st_n = S_PRE0;
        else if (start1)        st_n = S_PRE1;
        else if (xfer && hwrite) st_n = S_WRITE;
        else if (xfer)          st_n = S_READ;
        else                    st_n = S_IDLE;
      end
      S_PRE0: st_n = S_RUN0;
      S_PRE1: st_n = S_RUN1;
      S_RUN0, S_RUN1: if (finish) st_n = S_IDLE;
      default: st_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; dph_valid <= 1'b0; dph_write <= 1'b0; dph_addr <= '0;
      irq_q <= '0; finish <= 1'b0; core_rst_n <= 1'b0; bank <= 1'b0;
    end else begin
      st <= st_n;
      core_rst_n <= (st_n == S_RUN0 || st_n == S_RUN1);
      if (hready) begin
        dph_valid <= xfer; dph_write <= hwrite; dph_addr <= haddr[7:0];
      end
      if (st_n == S_PRE0 || st_n == S_PRE1) begin
        finish <= 1'b0;
        bank   <= (st_n == S_PRE1);
      end else if ((st == S_RUN0 || st == S_RUN1) && c_req && c_local && c_write &&
                   c_addr[7:0] == A_FINISH)
        finish <= 1'b1;
      // host CSR writes take effect in the data phase, outside the Run states
      if (dph_valid && dph_write && dph_addr == A_IRQ && st != S_RUN0 && st != S_RUN1)
        irq_q <= hwdata[1:0];
    end
  end

  always_comb begin
    unique case (dph_addr)
      A_FINISH: hrdata = {31'd0, finish};
      A_IRQ:    hrdata = {30'd0, irq_q};
      A_STATE:  hrdata = {27'd0, bank, 1'b0, st};
      default:  hrdata = 32'd0;
    endcase
  end
  assign hreadyout = 1'b1;
  assign run0      = (st == S_RUN0);
  assign run1      = (st == S_RUN1);
  assign state_o   = st;

  // A decoding request only ever leads into a Pre-Run state, and a Pre-Run
  // state is always followed by its Run state.
  a_prerun_run: assert property (@(posedge clk) disable iff (!rst_n)
                                 (st == S_PRE0) |=> (st == S_RUN0));
  a_core_owns_one: assert property (@(posedge clk) disable iff (!rst_n) !(run0 && run1));
endmodule
