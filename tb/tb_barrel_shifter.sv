// Random test of the barrel shifter against a reference written from the
// ARM shift rules (immediate and register amounts, RRX, amounts >= 32,
// carry-out), plus fixed corner cases.
module tb_barrel_shifter;
  import acarm7_pkg::*;
  logic [31:0] din, dout;
  logic [7:0]  amount;
  shift_e      stype;
  logic        imm_form, cin, cout;
  int checks = 0, failures = 0;

  barrel_shifter dut (.din, .amount, .stype, .imm_form, .cin, .dout, .cout);

  function automatic logic [32:0] ref_shift(logic [31:0] x, int a, shift_e t, bit immf, bit c);
    logic [63:0] w;
    if (immf) begin
      a = a % 32;
      if (a == 0) begin
        if (t == SH_LSL) return {c, x};
        if (t == SH_ROR) return {x[0], c, x[31:1]};
        a = 32;
      end
    end else if (a == 0) return {c, x};
    unique case (t)
      SH_LSL: begin
        if (a > 32) return 33'd0;
        w = {32'd0, x} << a;
        return {w[32], w[31:0]};
      end
      SH_LSR: begin
        if (a > 32) return 33'd0;
        if (a == 32) return {x[31], 32'd0};
        return {x[a-1], x >> a};
      end
      SH_ASR: begin
        if (a >= 32) return {x[31], {32{x[31]}}};
        return {x[a-1], 32'($signed(x) >>> a)};
      end
      default: begin
        a = a % 32;
        if (a == 0) return {x[31], x};
        w = {x, x} >> a;
        return {w[31], w[31:0]};
      end
    endcase
  endfunction

  task automatic run(logic [31:0] x, int a, shift_e t, bit immf, bit c);
    logic [32:0] e;
    din = x; amount = 8'(a); stype = t; imm_form = immf; cin = c;
    #1;
    e = ref_shift(x, a, t, immf, c);
    checks++;
    if ({cout, dout} !== e) begin
      failures++;
      $display("FAIL x=%h a=%0d t=%0d imm=%0d c=%0d got %b_%h exp %b_%h", x, a, t, immf, c, cout, dout, e[32], e[31:0]);
    end
  endtask

  initial begin
    run(32'h8000_0001, 0, SH_ROR, 1, 1);   // RRX
    run(32'h8000_0001, 0, SH_LSR, 1, 0);   // LSR #32
    run(32'h8000_0001, 32, SH_LSL, 0, 0);
    run(32'h8000_0001, 33, SH_LSL, 0, 1);
    run(32'h8000_0001, 40, SH_ASR, 0, 0);
    run(32'h8000_0001, 32, SH_ROR, 0, 0);
    run(32'h0000_00FF, 4, SH_ROR, 0, 0);
    for (int i = 0; i < 3000; i++)
      run($urandom, $urandom_range(0, 255) % ($urandom_range(0, 1) ? 40 : 256),
          shift_e'($urandom_range(0, 3)), 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
