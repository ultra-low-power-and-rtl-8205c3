// 64-bit adder of the ALU. The document uses a low-power "Fong" adder here
// but gives none of its insides, so this module only provides its function:
// sum = a + b + cin, with the carry out of bit 63 and the two's-complement
// overflow of the 64-bit sum. Synthesis picks the adder architecture.
// Ordinary ALU operations use the upper 32 bits (the caller fills the lower
// half); 64-bit multiply accumulation uses all of it. Combinational.
module fong_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         ovf
);
  always_comb begin
    {cout, sum} = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
    ovf = (a[W-1] == b[W-1]) && (sum[W-1] != a[W-1]);
  end
endmodule
