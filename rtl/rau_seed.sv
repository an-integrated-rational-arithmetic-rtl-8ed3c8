// rau_seed: builds the starting register contents of the Euclidian engine
// for one operation of the rational arithmetic unit.
//
// The engine holds six registers laid out as
//      P  A  C
//      Q  B  D
// with p/q (the accumulator) in P, Q and a 2x2 "seed" matrix {a c; b d} in
// A, B, C, D. Running the engine on p/q with that seed yields u/v =
// (a*q + b*p)/(c*q + d*p), so one matrix per operator turns the same
// algorithm into each operation with the operand r/s:
//      add  {r s; s 0}     sub {-r s; s 0}
//      mul  {0 s; r 0}     div {0 r; s 0}
//      store (mediant rounding) uses the unit matrix {0 1; 1 0}.
// Two shortcuts start a faster but equivalent run when the operand happens
// to suit it (for example integer operands):
//   - when d = 0 and |q| = |b|, p and b trade places (P := b, B := p);
//   - otherwise, when a = d = 0 and |p| = |c|, q and c trade places.
// Either yields the same ratio u/v, possibly with a common factor left in.
// The shortcuts are used only for add/sub/mul/div, never for a store, whose
// stopping rule depends on the sequence of intermediate pairs.
//
// The matrices and both shortcuts follow the design description. Every
// matrix listed has d = 0, so d_o is constant zero; it stays an output so
// that the engine keeps a general seed interface. Purely combinational; all
// values are N-bit two's complement.
module rau_seed
  import rau_pkg::*;
#(
  parameter int unsigned N = 2 * FS_N_DEF + 4,
  parameter bit          SHORTCUTS = 1'b1
) (
  input  rau_op_e             op,
  input  logic signed [N-1:0] acc_p,   // accumulator numerator
  input  logic signed [N-1:0] acc_q,   // accumulator denominator
  input  logic signed [N-1:0] r,       // operand numerator (signed)
  input  logic signed [N-1:0] s,       // operand denominator
  output logic signed [N-1:0] p_o, q_o, a_o, b_o, c_o, d_o,
  output bne_bound_e          bound,   // stopping rule for the engine
  output logic                sc_pb,   // p/b shortcut taken
  output logic                sc_qc    // q/c shortcut taken
);

  function automatic logic signed [N-1:0] absv(input logic signed [N-1:0] x);
    return x[N-1] ? -x : x;
  endfunction

  logic signed [N-1:0] a, b, c, d;

  always_comb begin
    unique case (op)
      OP_ADD:  begin a = r;  c = s; b = s; d = '0; end
      OP_SUB:  begin a = -r; c = s; b = s; d = '0; end
      OP_MUL:  begin a = '0; c = s; b = r; d = '0; end
      OP_DIV:  begin a = '0; c = r; b = s; d = '0; end
      default: begin a = '0; c = N'(1); b = N'(1); d = '0; end
    endcase
    bound = (op == OP_STORE) ? BND_FS : BND_REG;

    p_o = acc_p; q_o = acc_q;
    a_o = a; b_o = b; c_o = c; d_o = d;
    sc_pb = 1'b0;
    sc_qc = 1'b0;
    if (SHORTCUTS && op != OP_STORE && op != OP_LOAD) begin
      if (d == 0 && absv(acc_q) == absv(b)) begin
        sc_pb = 1'b1;
        p_o   = b;
        b_o   = acc_p;
      end else if (a == 0 && d == 0 && absv(acc_p) == absv(c)) begin
        sc_qc = 1'b1;
        q_o   = c;
        c_o   = acc_q;
      end
    end
  end

endmodule
