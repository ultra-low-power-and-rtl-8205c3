// 32x8 multiplier of the execute stage. Each cycle of a multiplication it
// multiplies the 32-bit multiplicand by one 8-bit slice of the multiplier
// and gives a 40-bit product, which the ALU adder accumulates. The document
// names a Ling multiplier here without its insides; this module gives the
// function only. Either operand may be taken as signed (the top slice of a
// signed multiplier, and the multiplicand of a signed multiplication); the
// 40-bit result is exact in both cases. When en is low the inputs are forced
// to zero so that the array does not toggle (operand isolation of an unused
// unit, as the document's low-power scheme asks). Combinational.
module ling_mul_32x8 (
  input  logic        en,
  input  logic [31:0] a,
  input  logic [7:0]  b,
  input  logic        a_signed,
  input  logic        b_signed,
  output logic [39:0] p
);
  logic [32:0] ag;
  logic [8:0]  bg;
  logic [41:0] full;
  always_comb begin
    ag   = en ? {a_signed & a[31], a} : 33'd0;
    bg   = en ? {b_signed & b[7], b}  : 9'd0;
    full = 42'($signed(ag) * $signed(bg));
    p    = full[39:0];
  end
endmodule
