// ALU of the execute stage. Operand 1 (Src_a, a register) and operand 2
// (Src_b after the barrel shifter) first pass a reverse-inverse multiplexer
// that swaps them for the reverse subtractions (RSB, RSC) and inverts the
// subtrahend for every subtraction. Logical operations then go to the logic
// unit, arithmetic ones to the upper 32 bits of the 64-bit adder; the unit
// that is not used gets all-zero inputs so that it does not toggle.
// In multiply mode (mul=1) the adder takes the 64-bit accumulator and the
// shifted 40-bit partial product instead, using its full width.
//
// Flags: arithmetic operations produce N, Z, C (adder carry) and V; logical
// ones produce N and Z, take C from the shifter and keep V. Combinational.
// The structure follows the document. To let the carry-in (ADC, SBC, RSC,
// and the +1 of a subtraction) reach bit 32 of the adder, the lower half of
// one adder input is filled with ones instead of zeros; that detail is this
// design's own.
module alu
  import acarm7_pkg::*;
(
  input  aluop_e      op,
  input  logic [31:0] a,        // Src_a
  input  logic [31:0] b,        // barrel shifter output
  input  logic        c_in,     // current C flag
  input  logic        v_in,     // current V flag
  input  logic        sh_cout,  // barrel shifter carry-out
  input  logic        mul,      // multiply accumulation mode
  input  logic [63:0] acc,
  input  logic [63:0] prod,
  output logic [31:0] res,
  output logic [63:0] res64,
  output logic        n, z, c, v
);
  logic        is_logic, swap, inv, cin;
  logic [31:0] x, y, lu_x, lu_y, lu;
  logic [63:0] ad_a, ad_b, sum;
  logic        ad_cout, ad_ovf;

  fong_adder #(.W(64)) u_adder (.a(ad_a), .b(ad_b), .cin(cin), .sum(sum), .cout(ad_cout), .ovf(ad_ovf));

  always_comb begin
    is_logic = 1'b0;
    swap = 1'b0;
    inv  = 1'b0;
    cin  = 1'b0;
    unique case (op)
      OP_AND, OP_EOR, OP_TST, OP_TEQ, OP_ORR, OP_MOV, OP_BIC, OP_MVN: is_logic = 1'b1;
      OP_SUB, OP_CMP: begin inv = 1'b1; cin = 1'b1; end
      OP_RSB:         begin inv = 1'b1; swap = 1'b1; cin = 1'b1; end
      OP_SBC:         begin inv = 1'b1; cin = c_in; end
      OP_RSC:         begin inv = 1'b1; swap = 1'b1; cin = c_in; end
      OP_ADC:         cin = c_in;
      default:        ;  // ADD, CMN
    endcase
    if (mul) begin
      is_logic = 1'b0;
      cin = 1'b0;
    end

    // Reverse-inverse multiplexer.
    x = swap ? b : a;
    y = swap ? a : b;
    if (inv) y = ~y;

    // Logic unit with isolated inputs.
    lu_x = is_logic ? a : 32'd0;
    lu_y = is_logic ? b : 32'd0;
    unique case (op)
      OP_AND, OP_TST: lu = lu_x & lu_y;
      OP_EOR, OP_TEQ: lu = lu_x ^ lu_y;
      OP_ORR:         lu = lu_x | lu_y;
      OP_BIC:         lu = lu_x & ~lu_y;
      OP_MVN:         lu = ~lu_y;
      default:        lu = lu_y;  // MOV
    endcase

    // Adder inputs: multiply, arithmetic, or isolated.
    if (mul) begin
      ad_a = acc;
      ad_b = prod;
    end else if (!is_logic) begin
      ad_a = {x, 32'hFFFF_FFFF};
      ad_b = {y, 32'h0000_0000};
    end else begin
      ad_a = '0;
      ad_b = '0;
    end

    res64 = sum;
    if (is_logic) begin
      res = lu;
      c   = sh_cout;
      v   = v_in;
    end else begin
      res = sum[63:32];
      c   = ad_cout;
      v   = ad_ovf;
    end
    n = res[31];
    z = (res == 32'd0);
  end
endmodule
