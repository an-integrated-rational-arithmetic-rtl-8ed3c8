// tb_rau_seed: for every operator and random operands, checks the seed
// matrix against the operator's defining property: evaluating
// u/v = (a*q + b*p)/(c*q + d*p) on the starting values must equal the
// operation applied to p/q and r/s (cross-multiplied, so unreduced results
// pass). Also checks that a store uses the unit matrix, that the shortcuts
// fire exactly when their conditions hold, and which bound is selected.
module tb_rau_seed;
  import rau_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 54;
  rau_op_e            op;
  logic signed [N-1:0] acc_p, acc_q, r, s, p_o, q_o, a_o, b_o, c_o, d_o;
  bne_bound_e          bound;
  logic                sc_pb, sc_qc;
  int checks = 0, failures = 0;
  int n_pb = 0, n_qc = 0;

  rau_seed dut (.*);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s op=%s p=%0d q=%0d r=%0d s=%0d", what, op.name(),
                                  acc_p, acc_q, r, s);
    end
  endtask

  function automatic logic signed [N-1:0] rnd(int nb, bit pos);
    logic [31:0] x = $urandom & ((32'd1 << nb) - 1);
    if (x == 0) x = 1;
    return (pos || $urandom % 2) ? N'(x) : -N'(x);
  endfunction

  initial begin
    rau_op_e ops [5] = '{OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_STORE};
    repeat (3000) begin
      big_t eu, ev, xu, xv, P, Q, R, S;
      int sel;
      sel   = $urandom % 4;
      op    = ops[$urandom % 5];
      acc_p = rnd(1 + $urandom % 20, 0);
      acc_q = rnd(1 + $urandom % 20, 0);
      r     = rnd(1 + $urandom % 20, 0);
      s     = rnd(1 + $urandom % 20, 1);
      if (sel == 1) acc_q = s;            // same denominators
      if (sel == 2) acc_p = r;            // provokes the q/c shortcut for div
      if (sel == 3) begin acc_q = 1; s = 1; end
      #1;
      P = acc_p; Q = acc_q; R = r; S = s;
      eu = big_t'(a_o) * big_t'(q_o) + big_t'(b_o) * big_t'(p_o);
      ev = big_t'(c_o) * big_t'(q_o) + big_t'(d_o) * big_t'(p_o);
      unique case (op)
        OP_ADD: begin xu = P * S + R * Q; xv = Q * S; end
        OP_SUB: begin xu = P * S - R * Q; xv = Q * S; end
        OP_MUL: begin xu = P * R;         xv = Q * S; end
        OP_DIV: begin xu = P * S;         xv = Q * R; end
        default: begin xu = P;            xv = Q;     end
      endcase
      check("value", eu * xv == ev * xu && ev != 0);
      check("bound", bound == ((op == OP_STORE) ? BND_FS : BND_REG));
      if (op == OP_STORE)
        check("unit", a_o == 0 && b_o == 1 && c_o == 1 && d_o == 0 && p_o == acc_p
                      && q_o == acc_q && !sc_pb && !sc_qc);
      else begin
        logic signed [N-1:0] b0, c0;
        b0 = (op == OP_MUL) ? r : s;
        c0 = (op == OP_DIV) ? r : s;
        check("sc_pb", sc_pb == (babs(big_t'(acc_q)) == babs(big_t'(b0))));
        check("sc_qc", sc_qc == (!sc_pb && (op inside {OP_MUL, OP_DIV}) &&
                                 babs(big_t'(acc_p)) == babs(big_t'(c0))));
        n_pb += int'(sc_pb);
        n_qc += int'(sc_qc);
      end
    end
    check("both shortcuts seen", n_pb > 0 && n_qc > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
