// Forwarding unit. Results of the execute stage are written into the
// register file one cycle after they are computed (they wait in the
// write-back register). An instruction reading a register in that cycle
// would see the old contents, so this unit compares each read address with
// the pending write and substitutes the pending data on a match.
// Addresses are physical register numbers, so banked registers of different
// modes never alias. Combinational, two read ports. The forwarding from the
// execute output follows the document; the one-cycle write-back register it
// serves is this design's choice.
module forwarding_unit #(
  parameter int unsigned AW = 5
) (
  input  logic [AW-1:0] ra_addr,
  input  logic [31:0]   ra_rf,
  input  logic [AW-1:0] rb_addr,
  input  logic [31:0]   rb_rf,
  input  logic          wb_valid,
  input  logic [AW-1:0] wb_addr,
  input  logic [31:0]   wb_data,
  output logic [31:0]   ra_data,
  output logic [31:0]   rb_data,
  output logic          fwd_a,
  output logic          fwd_b
);
  always_comb begin
    fwd_a   = wb_valid && (wb_addr == ra_addr);
    fwd_b   = wb_valid && (wb_addr == rb_addr);
    ra_data = fwd_a ? wb_data : ra_rf;
    rb_data = fwd_b ? wb_data : rb_rf;
  end
endmodule
