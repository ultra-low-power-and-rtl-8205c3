// Barrel shifter of the execute stage (operand 2 path). A 32-bit operand is
// shifted left, shifted right logically or arithmetically, or rotated right,
// in five logarithmic stages that move the data by 1, 2, 4, 8 and 16 bits;
// each stage applies the same one of the four operations. A final stage
// then handles what the five stages cannot: amounts of 32 and above, the
// zero amount, rotate-right-extended, and the shifter carry-out.
//
// The datapath runs on 33 bits so that the last bit shifted out lands in
// the extra bit and becomes the carry without a separate selection tree.
// Shift amounts follow the ARM rules: with imm_form=1 the amount is the
// 5-bit immediate of the instruction (LSR #0 and ASR #0 mean 32, ROR #0
// means RRX); with imm_form=0 it is the low byte of a register, where 0
// leaves the operand and the carry unchanged. Purely combinational.
// The staged structure and the extra final stage follow the document; the
// 33-bit carry trick is this design's own.
module barrel_shifter
  import acarm7_pkg::*;
(
  input  logic [31:0] din,
  input  logic [7:0]  amount,
  input  shift_e      stype,
  input  logic        imm_form,
  input  logic        cin,
  output logic [31:0] dout,
  output logic        cout
);
  logic [32:0] st [0:5];
  logic [31:0] rot [0:5];
  logic [7:0]  amt;
  logic        rrx, pass;

  always_comb begin
    // Normalise the amount (immediate special cases).
    amt  = amount;
    rrx  = 1'b0;
    pass = 1'b0;
    if (imm_form) begin
      amt = {3'b000, amount[4:0]};
      if (amount[4:0] == 5'd0) begin
        unique case (stype)
          SH_LSL: pass = 1'b1;
          SH_LSR, SH_ASR: amt = 8'd32;
          SH_ROR: rrx = 1'b1;
        endcase
      end
    end else if (amount == 8'd0) begin
      pass = 1'b1;
    end

    // Five logarithmic stages.
    st[0]  = (stype == SH_LSL) ? {1'b0, din} : {din, 1'b0};
    rot[0] = din;
    for (int i = 0; i < 5; i++) begin
      if (amt[i]) begin
        unique case (stype)
          SH_LSL: st[i+1] = st[i] << (1 << i);
          SH_LSR: st[i+1] = st[i] >> (1 << i);
          SH_ASR: st[i+1] = 33'($signed(st[i]) >>> (1 << i));
          SH_ROR: st[i+1] = st[i];
        endcase
        rot[i+1] = (rot[i] >> (1 << i)) | (rot[i] << (32 - (1 << i)));
      end else begin
        st[i+1]  = st[i];
        rot[i+1] = rot[i];
      end
    end

    // Final stage: large amounts, zero amount, RRX and carry.
    if (pass) begin
      dout = din;
      cout = cin;
    end else if (rrx) begin
      dout = {cin, din[31:1]};
      cout = din[0];
    end else begin
      unique case (stype)
        SH_LSL: begin
          if (amt > 8'd32)       begin dout = '0; cout = 1'b0;   end
          else if (amt == 8'd32) begin dout = '0; cout = din[0]; end
          else                   begin dout = st[5][31:0]; cout = st[5][32]; end
        end
        SH_LSR: begin
          if (amt > 8'd32)       begin dout = '0; cout = 1'b0;    end
          else if (amt == 8'd32) begin dout = '0; cout = din[31]; end
          else                   begin dout = st[5][32:1]; cout = st[5][0]; end
        end
        SH_ASR: begin
          if (amt >= 8'd32)      begin dout = {32{din[31]}}; cout = din[31]; end
          else                   begin dout = st[5][32:1]; cout = st[5][0]; end
        end
        SH_ROR: begin
          dout = rot[5];
          cout = rot[5][31];
        end
      endcase
    end
  end
endmodule
