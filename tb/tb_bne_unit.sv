// tb_bne_unit: runs the Euclidian engine at its default size on random
// accumulators and seeds and checks
//   - register-bound runs on operands that cannot overflow: the run
//     completes and u/v equals (a*q + b*p)/(c*q + d*p) exactly;
//   - every run: u, v and the early flag equal the whole-integer reference
//     algorithm, for register-bound runs with large operands (early stops)
//     and for packed-word-bound runs with the unit seed (mediant rounding);
//   - zero special cases: q = 0 returns b/d, p = 0 returns a/c;
//   - a second engine with A..D only N+4 bits wide, where the overflow guard
//     must stop runs: a guarded run returns one of the pairs the complete
//     reference run accepts, and never one that the reference rejects.
// The number of clocks of each run is checked against the count of its
// steps: one per shift, add/subtract or accepted pair, plus the fixed
// overhead of the sequencing states.
module tb_bne_unit;
  import rau_pkg::*;
  import tb_ref_pkg::*;
  localparam int FS_N = 25;
  localparam int N    = 54;

  logic clk = 0, rst_n = 0, start = 0;
  bne_bound_e bound;
  logic signed [N-1:0] p_in, q_in, a_in, b_in, c_in, d_in, u_out, v_out;
  logic busy, done, early, guard, ev_qshift, ev_pshift, ev_addsub, ev_swap;
  int checks = 0, failures = 0;
  int n_early = 0, n_full = 0;

  bne_unit dut (.*);

  // narrow engine for the overflow guard
  logic start_g = 0, busy_g, done_g, early_g, guard_g;
  logic signed [N-1:0] u_g, v_g;
  int n_guard = 0;
  bne_unit #(.W(N + 4)) dut_g (
    .clk, .rst_n, .start(start_g), .bound(BND_REG),
    .p_in, .q_in, .a_in, .b_in, .c_in, .d_in,
    .busy(busy_g), .done(done_g), .u_out(u_g), .v_out(v_g), .early(early_g), .guard(guard_g),
    .ev_qshift(), .ev_pshift(), .ev_addsub(), .ev_swap());

  task automatic run_guard(logic signed [N-1:0] p, q, a, b, c, d);
    big_t ru, rv;
    bit   re, found;
    @(negedge clk);
    p_in = p; q_in = q; a_in = a; b_in = b; c_in = c; d_in = d;
    start_g = 1;
    @(negedge clk);
    start_g = 0;
    while (!done_g) @(negedge clk);
    bne_ref(N, FS_N, 0, p, q, a, b, c, d, ru, rv, re);
    found = 0;
    foreach (pairs_u[i]) if (pairs_u[i] == big_t'(u_g) && pairs_v[i] == big_t'(v_g)) found = 1;
    if (guard_g) begin
      n_guard++;
      check("guard pair", found && early_g);
    end else begin
      check("narrow engine", big_t'(u_g) == ru && big_t'(v_g) == rv && early_g == re);
    end
  endtask
  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s p=%0d q=%0d seed=%0d %0d %0d %0d -> %0d/%0d early=%b",
                                  what, p_in, q_in, a_in, c_in, b_in, d_in, u_out, v_out, early);
    end
  endtask

  function automatic logic signed [N-1:0] rnd(int nb);
    logic [63:0] x = {$urandom, $urandom};
    if (nb == 0) return 0;
    x = x & ((64'd1 << nb) - 1);
    return ($urandom % 2) ? -$signed(N'(x)) : $signed(N'(x));
  endfunction

  task automatic run(bne_bound_e bnd, logic signed [N-1:0] p, q, a, b, c, d, bit exact);
    big_t ru, rv;
    bit   re;
    int   cyc = 0, steps = 0, swaps = 0;
    @(negedge clk);
    bound = bnd; p_in = p; q_in = q; a_in = a; b_in = b; c_in = c; d_in = d;
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      steps += int'(ev_qshift) + int'(ev_pshift) + int'(ev_addsub);
      swaps += int'(ev_swap);
      cyc++;
      @(negedge clk);
    end
    bne_ref(N, FS_N, bnd == BND_FS, p, q, a, b, c, d, ru, rv, re);
    check("reference", big_t'(u_out) == ru && big_t'(v_out) == rv && early == re && !guard);
    if (exact)
      check("exact", !early && big_t'(u_out) * (big_t'(c) * q + big_t'(d) * p)
                              == big_t'(v_out) * (big_t'(a) * q + big_t'(b) * p));
    // cycle budget: every clock between start and done is a step, a
    // quotient boundary (leaving NORMQ, leaving INNER, SWAP, OUTER) or
    // the normalization prologue; it can never be less than the steps.
    check("cycles", cyc >= steps + swaps && cyc <= steps + 4 * (swaps + 1) + N + 2);
    if (early) n_early++; else n_full++;
  endtask

  initial begin
    rst_n = 0; bound = BND_REG;
    {p_in, q_in, a_in, b_in, c_in, d_in} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // special cases
    run(BND_REG, 0, 7, 3, 5, 11, 13, 1);        // p = 0 -> a/c
    check("p=0", u_out * 11 == v_out * 3);
    run(BND_REG, 9, 0, 3, 5, 11, 13, 0);        // q = 0 -> b/d
    check("q=0", u_out == 5 && v_out == 13);
    run(BND_FS, 355, 113, 0, 1, 1, 0, 1);
    check("355/113", u_out * 113 == v_out * 355);
    // exact register-bound runs: operands of at most 26 bits
    repeat (400) begin
      logic signed [N-1:0] q;
      q = rnd(1 + $urandom % 26);
      if (q == 0) q = 1;
      run(BND_REG, rnd($urandom % 27), q, rnd($urandom % 27), rnd($urandom % 27),
          rnd($urandom % 27), rnd($urandom % 27), 1);
    end
    // register-bound runs with large operands, which may stop early
    repeat (200)
      run(BND_REG, rnd(52), rnd(52), rnd(40), rnd(40), rnd(40), rnd(40), 0);
    // mediant rounding of wide accumulators into the packed format
    repeat (400)
      run(BND_FS, rnd(20 + $urandom % 33), rnd(20 + $urandom % 33), 0, 1, 1, 0, 0);
    // overflow guard on the narrow engine
    repeat (300)
      run_guard(rnd(20 + $urandom % 30), rnd(20 + $urandom % 30), rnd(50), rnd(50), rnd(50), rnd(50));
    check("early stops seen", n_early > 0);
    check("guard stops seen", n_guard > 0);
    $display("guard stops: %0d", n_guard);
    $display("runs: %0d complete, %0d early", n_full, n_early);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
