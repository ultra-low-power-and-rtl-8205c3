// Multiplication sub-FSM. A 32x32 multiplication is done 8 multiplier bits
// per cycle on the 32x8 multiplier, with each 40-bit partial product added
// into a 64-bit accumulator one cycle after it is formed. The FSM has seven
// working states: C0 forms the first partial product; ACC loads the
// accumulator for MLA/UMLAL/SMLAL; A1..A4 each add the previous partial
// product (and form the next); HI writes the upper word of a long result.
// Multiplication stops early once the remaining multiplier bytes are only
// sign (signed) or zero (unsigned) bits, so a multiplication takes
// 1 + bytes cycles (2 to 5), plus one for accumulation and one for a long
// result: 7 at most, as the document states.
//
// Interface: the current state is 'state' (C0 in the first cycle, while
// start is high and the FSM is idle); 'slice' is the multiplier byte to
// multiply this cycle; 'last_slice' marks the final A state, 'done' the
// final cycle of the instruction (the finish signal to the main FSM);
// 'nbytes_m1' is the number of multiplier bytes used, minus one. The
// FSM only moves when en is high. The state list, byte-wise schedule and
// cycle counts follow the document; the early-termination rule is the
// usual ARM7 one, assumed here.
module mul_fsm (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        start,
  input  logic        acc,
  input  logic        long_res,
  input  logic        signed_op,
  input  logic [31:0] mplier,     // multiplier as read in the C0 cycle
  output logic [2:0]  state,
  output logic [1:0]  slice,
  output logic        last_slice,
  output logic [1:0]  nbytes_m1,
  output logic        done
);
  localparam logic [2:0] M_IDLE = 3'd0, M_C0 = 3'd1, M_ACC = 3'd2, M_A1 = 3'd3,
                         M_A2 = 3'd4, M_A3 = 3'd5, M_A4 = 3'd6, M_HI = 3'd7;

  logic [2:0] st, nxt;
  logic [1:0] nb_q;   // multiplier bytes needed, minus one
  logic       long_q;

  function automatic logic [1:0] bytes_needed(logic [31:0] m, logic sgn);
    logic [1:0] r;
    if (sgn) begin
      if      (m[31:7]  == '0 || m[31:7]  == '1) r = 2'd0;
      else if (m[31:15] == '0 || m[31:15] == '1) r = 2'd1;
      else if (m[31:23] == '0 || m[31:23] == '1) r = 2'd2;
      else r = 2'd3;
    end else begin
      if      (m[31:8]  == '0) r = 2'd0;
      else if (m[31:16] == '0) r = 2'd1;
      else if (m[31:24] == '0) r = 2'd2;
      else r = 2'd3;
    end
    return r;
  endfunction

  always_comb begin
    state     = (st == M_IDLE && start) ? M_C0 : st;
    nbytes_m1 = (state == M_C0) ? bytes_needed(mplier, signed_op) : nb_q;
    slice      = 2'd0;
    last_slice = 1'b0;
    done       = 1'b0;
    nxt        = st;
    unique case (state)
      M_IDLE: nxt = M_IDLE;
      M_C0:   nxt = acc ? M_ACC : M_A1;
      M_ACC:  nxt = M_A1;
      M_A1, M_A2, M_A3, M_A4: begin
        slice = 2'(state - M_A1 + 3'd1);  // next slice to form
        last_slice = (2'(state - M_A1) == nbytes_m1);
        if (last_slice) begin
          nxt  = long_q ? M_HI : M_IDLE;
          done = !long_q;
        end else nxt = state + 3'd1;
      end
      M_HI: begin nxt = M_IDLE; done = 1'b1; end
      default: nxt = M_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= M_IDLE; nb_q <= '0; long_q <= 1'b0;
    end else if (en) begin
      st <= nxt;
      if (state == M_C0) begin
        nb_q <= nbytes_m1; long_q <= long_res;
      end
    end
endmodule
