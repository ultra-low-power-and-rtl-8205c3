// Random test of the ALU: all sixteen data-processing operations with their
// N, Z, C, V results against a reference model, and the 64-bit multiply
// accumulation mode.
module tb_alu;
  import acarm7_pkg::*;
  aluop_e op;
  logic [31:0] a, b, res;
  logic c_in, v_in, sh_cout, mul, n, z, c, v;
  logic [63:0] acc, prod, res64;
  int checks = 0, failures = 0;
  alu dut (.op, .a, .b, .c_in, .v_in, .sh_cout, .mul, .acc, .prod, .res, .res64, .n, .z, .c, .v);

  task automatic ref_op(output logic [31:0] r, output logic rc, output logic rv);
    logic [32:0] t;
    rc = sh_cout; rv = v_in;
    unique case (op)
      OP_AND, OP_TST: r = a & b;
      OP_EOR, OP_TEQ: r = a ^ b;
      OP_ORR: r = a | b;
      OP_BIC: r = a & ~b;
      OP_MOV: r = b;
      OP_MVN: r = ~b;
      OP_ADD, OP_CMN: begin t = 33'(a) + 33'(b); r = t[31:0]; rc = t[32]; rv = (a[31] == b[31]) && (r[31] != a[31]); end
      OP_ADC: begin t = 33'(a) + 33'(b) + 33'(c_in); r = t[31:0]; rc = t[32]; rv = (a[31] == b[31]) && (r[31] != a[31]); end
      OP_SUB, OP_CMP: begin t = 33'(a) + {1'b0, ~b} + 33'd1; r = t[31:0]; rc = t[32]; rv = (a[31] != b[31]) && (r[31] != a[31]); end
      OP_SBC: begin t = 33'(a) + {1'b0, ~b} + 33'(c_in); r = t[31:0]; rc = t[32]; rv = (a[31] != b[31]) && (r[31] != a[31]); end
      OP_RSB: begin t = 33'(b) + {1'b0, ~a} + 33'd1; r = t[31:0]; rc = t[32]; rv = (a[31] != b[31]) && (r[31] != b[31]); end
      default: begin t = 33'(b) + {1'b0, ~a} + 33'(c_in); r = t[31:0]; rc = t[32]; rv = (a[31] != b[31]) && (r[31] != b[31]); end
    endcase
  endtask

  initial begin
    mul = 1'b0; acc = '0; prod = '0;
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] er; logic ec, ev;
      op = aluop_e'($urandom_range(0, 15));
      a = (i % 5 == 0) ? 32'h8000_0000 : $urandom; b = (i % 7 == 0) ? a : $urandom;
      c_in = 1'($urandom); v_in = 1'($urandom); sh_cout = 1'($urandom);
      #1;
      ref_op(er, ec, ev);
      checks++;
      if (res !== er || n !== er[31] || z !== (er == 0) || c !== ec || v !== ev) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h got %h %b%b%b%b exp %h c%b v%b", op, a, b, res, n, z, c, v, er, ec, ev);
      end
    end
    mul = 1'b1;
    for (int i = 0; i < 500; i++) begin
      acc = {$urandom, $urandom}; prod = {$urandom, $urandom}; op = aluop_e'($urandom_range(0, 15));
      c_in = 1'($urandom);
      #1;
      checks++;
      if (res64 !== acc + prod) begin failures++; $display("FAIL mul acc"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
