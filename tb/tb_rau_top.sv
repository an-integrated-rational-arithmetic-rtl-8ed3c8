// tb_rau_top: end-to-end test of the rational arithmetic unit at its
// default size (n = 25: 32-bit packed words, 54-bit accumulator).
//
// Chains of commands (load, a few random add/sub/mul/div, store) are sent
// through the ready/valid interface. A whole-integer model keeps its own
// accumulator: it builds the seed matrix for each operator (with the two
// shortcuts) and runs the reference Euclidian algorithm. Every response is
// checked against it: accumulator contents, the inexact flag and, for a
// store, the packed word. Results that complete are also checked to be the
// exact rational result, and a store of a value that fits the packed format
// must return that value exactly and in lowest terms. Directed commands provoke division by
// zero, a value too large to store and an accumulator overflow.
// Each mechanism of the unit is counted and must occur at least once.
module tb_rau_top;
  import rau_pkg::*;
  import tb_ref_pkg::*;
  localparam int FS_N = 25;
  localparam int KW   = 5;
  localparam int N    = 54;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  rau_op_e cmd_op;
  logic [31:0] cmd_word, rsp_word;
  logic rsp_valid, rsp_inexact, rsp_ovf;
  logic signed [N-1:0] acc_p, acc_q;
  rau_events_t events;

  rau_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int c_op [6];
  int c_pb = 0, c_qc = 0, c_qs = 0, c_ps = 0, c_as = 0, c_sw = 0;
  int c_round = 0, c_arith_early = 0, c_ovf_div = 0, c_ovf_store = 0, c_exact_store = 0;

  always @(posedge clk) if (rst_n) begin
    c_pb += int'(events.shortcut_pb);
    c_qc += int'(events.shortcut_qc);
    c_qs += int'(events.qshift);
    c_ps += int'(events.pshift);
    c_as += int'(events.addsub);
    c_sw += int'(events.swap);
    if (events.guard) begin
      failures++;
      $display("FAIL guard stop at default size");
    end
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // model state
  big_t mp = 0, mq = 1;

  function automatic big_t rnd_mag(int nb);
    big_t x = big_t'({$urandom, $urandom});
    if (nb <= 0) return 0;
    x = x & ((big_t'(1) <<< nb) - 1);
    x[nb - 1] = 1'b1;
    return x;
  endfunction

  // random packed operand that fits
  function automatic logic [31:0] rnd_operand(int kind);
    big_t u, v;
    int bv, bu;
    unique case (kind)
      0: begin v = 1; u = rnd_mag($urandom % 20); end                 // integer
      1: begin bv = 1 + $urandom % 13; bu = $urandom % 14;
               v = rnd_mag(bv); u = rnd_mag(bu); end                  // small fraction
      default: begin bv = 1 + $urandom % 26; bu = 27 - bv;
               v = rnd_mag(bv); u = rnd_mag(bu); end                  // full width
    endcase
    if ($urandom % 2) u = -u;
    return 32'(fs_encode(u, v, FS_N, KW));
  endfunction

  task automatic send(rau_op_e op, logic [31:0] w);
    int t = 0;
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_word = w;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 0;
    while (!rsp_valid) begin
      @(negedge clk);
      t++;
    end
    c_op[int'(op)]++;
  endtask

  // model of one command; compares the response
  task automatic do_op(rau_op_e op, logic [31:0] w);
    big_t r, s, p, q, a, b, c, d, u, v, xu, xv;
    bit   lg, early;
    fs_decode(64'(w), FS_N, KW, r, s, lg);
    send(op, w);
    if (op == OP_LOAD) begin
      mp = r; mq = s;
      check("load", big_t'(acc_p) == mp && big_t'(acc_q) == mq && !rsp_ovf);
      return;
    end
    p = mp; q = mq;
    unique case (op)
      OP_ADD: begin a = r;  c = s; b = s; d = 0; xu = mp * s + r * mq; xv = mq * s; end
      OP_SUB: begin a = -r; c = s; b = s; d = 0; xu = mp * s - r * mq; xv = mq * s; end
      OP_MUL: begin a = 0;  c = s; b = r; d = 0; xu = mp * r;          xv = mq * s; end
      OP_DIV: begin a = 0;  c = r; b = s; d = 0; xu = mp * s;          xv = mq * r; end
      default: begin a = 0; c = 1; b = 1; d = 0; xu = mp;              xv = mq;     end
    endcase
    if (op != OP_STORE) begin
      if (babs(q) == babs(b)) begin p = b; b = mp; end
      else if (a == 0 && babs(p) == babs(c)) begin q = c; c = mq; end
    end
    bne_ref(N, FS_N, op == OP_STORE, p, q, a, b, c, d, u, v, early);
    check("inexact flag", rsp_inexact == early);
    if (op == OP_STORE) begin
      bit fits = fs_fits(u, v, FS_N);
      check("store ovf", rsp_ovf == !fits);
      if (fits) check("store word", rsp_word == 32'(fs_encode(u, v, FS_N, KW)));
      if (!fits) c_ovf_store++;
      if (early && fits) c_round++;
      // a value that fits after reduction must come back exactly
      if (!early) begin
        check("store exact", fits && u * mq == v * mp);
        check("store reduced", gcd(u, v) == 1);
        c_exact_store++;
      end
    end else begin
      if (v == 0) begin
        check("ovf flag", rsp_ovf && big_t'(acc_p) == mp && big_t'(acc_q) == mq);
        c_ovf_div++;
      end else begin
        check("acc", !rsp_ovf && big_t'(acc_p) == u && big_t'(acc_q) == v);
        if (!early) check("exact", u * xv == v * xu);
        else c_arith_early++;
        mp = u; mq = v;
      end
    end
  endtask

  initial begin
    rau_op_e aops [4] = '{OP_ADD, OP_SUB, OP_MUL, OP_DIV};
    cmd_op = OP_LOAD; cmd_word = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // directed: 355/113 stored exactly, integer add with the p/b shortcut
    do_op(OP_LOAD, 32'(fs_encode(355, 113, FS_N, KW)));
    do_op(OP_STORE, 0);
    do_op(OP_LOAD, 32'(fs_encode(1000, 1, FS_N, KW)));
    do_op(OP_ADD, 32'(fs_encode(-24, 1, FS_N, KW)));
    check("976", acc_p * acc_q > 0 && acc_p == 976 * acc_q);
    // division by zero
    do_op(OP_DIV, 32'(fs_encode(0, 1, FS_N, KW)));
    // too large to store: 2^25 * 2^25
    do_op(OP_LOAD, 32'(fs_encode(big_t'(1) <<< 25, 1, FS_N, KW)));
    do_op(OP_MUL, 32'(fs_encode(big_t'(1) <<< 25, 1, FS_N, KW)));
    do_op(OP_STORE, 0);
    // random chains
    repeat (250) begin
      do_op(OP_LOAD, rnd_operand($urandom % 3));
      repeat (1 + $urandom % 5) begin
        rau_op_e op;
        logic [31:0] w;
        op = aops[$urandom % 4];
        w  = rnd_operand($urandom % 3);
        // sometimes reuse the accumulator's magnitudes to reach the shortcuts
        if ($urandom % 8 == 0 && babs(mq) < (big_t'(1) <<< 26) && babs(mp) < (big_t'(1) <<< 26)
            && mq != 0 && fs_fits(mp, mq, FS_N))
          w = 32'(fs_encode(mp, mq, FS_N, KW));
        do_op(op, w);
      end
      do_op(OP_STORE, 0);
    end
    // long products to overflow the accumulator registers
    do_op(OP_LOAD, rnd_operand(2));
    repeat (6) do_op(OP_MUL, rnd_operand(2));
    do_op(OP_STORE, 0);

    $display("ops: load=%0d add=%0d sub=%0d mul=%0d div=%0d store=%0d",
             c_op[0], c_op[1], c_op[2], c_op[3], c_op[4], c_op[5]);
    $display("shortcut p/b=%0d q/c=%0d qshift=%0d pshift=%0d addsub=%0d swap=%0d",
             c_pb, c_qc, c_qs, c_ps, c_as, c_sw);
    $display("rounded stores=%0d exact stores=%0d store ovf=%0d div0=%0d arith early=%0d",
             c_round, c_exact_store, c_ovf_store, c_ovf_div, c_arith_early);
    foreach (c_op[i]) check("op seen", c_op[i] > 0);
    check("shortcut p/b seen", c_pb > 0);
    check("shortcut q/c seen", c_qc > 0);
    check("steps seen", c_qs > 0 && c_ps > 0 && c_as > 0 && c_sw > 0);
    check("rounding seen", c_round > 0);
    check("exact store seen", c_exact_store > 0);
    check("store overflow seen", c_ovf_store > 0);
    check("division by zero seen", c_ovf_div > 0);
    check("accumulator overflow seen", c_arith_early > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
