// bne_unit: the Euclidian engine of the rational arithmetic unit
// (binary, normalized, nonrestoring Euclidian algorithm with a seed matrix).
//
// Given p/q in P, Q and a seed {a c; b d} in A, B, C, D, the engine expands
// p/q into a signed continued fraction by shifts and add/subtracts and, in
// step, accumulates u = a*q_i + b*p_i and v = c*q_i + d*p_i for the
// successive convergents p_i/q_i. Each clock does one step:
//   PRE    shift P and Q left together until one of them is normalized
//          (its two leading bits differ);
//   NORMQ  shift Q left until normalized; B, D and the one-hot unit
//          tracker K shift left with it;
//   INNER  if P is normalized: when P and Q have equal signs P := P-Q,
//          A := A+B, C := C+D, else P := P+Q, A := A-B, C := C-D;
//          if P is not normalized and K > 1: shift P left, B, D and K right;
//          if P is not normalized and K = 1: the quotient is complete;
//   SWAP   exchange P/Q, A/B, C/D: B, D now hold the next pair (u_i, v_i);
//   OUTER  stop when Q = 0, else start the next quotient.
// At each SWAP the new pair is converted from carry-save form and tested
// against the bound selected by `bound`: BND_REG accepts pairs that fit
// N-bit signed registers, BND_FS pairs that fit the packed floating-slash
// word. A pair that fails ends the run and the previous pair is the result
// (`early` is set); for BND_FS this is the mediant rounding of p/q to the
// packed format. If p/q expands completely the last pair is the exact
// result, possibly negated in both parts, and not necessarily reduced.
//
// Datapath: P and Q are N-bit two's complement registers with an ordinary
// adder. A and C are carry-save register pairs of W bits updated through
// cs_addsub without carry propagation. B and D receive A and C only at a
// SWAP, through the carry-look-ahead conversion (cs_to_twos), so they are
// always held with a zero carry word; that keeps their right shifts exact.
// Before every shift or add/subtract of A..D the leading three positions
// are classified (cs_lead_classify); if any operand is not in the "narrow"
// cases the step could overflow W bits, so the run stops as for a bound
// failure and `guard` is set. With the default W = 2N+2 a run whose pairs
// fit N bits cannot reach that limit.
//
// Follows the design: the algorithm, the register set, the K register, the
// carry-save A..D arithmetic and the stopping rule. This design's own
// choices: P/Q without carry-save form, A..D integer-aligned and W bits wide
// rather than left-aligned with unit-position registers, and the result
// latch. Interface: pulse `start` while `busy` is low; operands are sampled
// then. `done` pulses for one clock with u_out/v_out valid, and those hold
// until the next start. Latency is data dependent: one clock per shift or
// add/subtract, plus two per quotient and two per run.
module bne_unit
  import rau_pkg::*;
#(
  parameter int unsigned FS_N = FS_N_DEF,
  parameter int unsigned N    = 2 * FS_N + 4,
  parameter int unsigned W    = 2 * N + 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  bne_bound_e          bound,
  input  logic signed [N-1:0] p_in, q_in, a_in, b_in, c_in, d_in,
  output logic                busy,
  output logic                done,
  output logic signed [N-1:0] u_out,
  output logic signed [N-1:0] v_out,
  output logic                early,     // stopped before p/q was fully expanded
  output logic                guard,     // stopped by the A..D overflow guard
  // one-clock event strobes
  output logic                ev_qshift, // Q normalization shift
  output logic                ev_pshift, // P shift with B, D right shift
  output logic                ev_addsub, // add/subtract step
  output logic                ev_swap    // accepted pair
);

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_OUTER, S_NORMQ, S_INNER, S_SWAP, S_DONE} state_e;
  state_e state;

  logic signed [N-1:0] P, Q;
  logic [W-1:0] Ac, Ap, Cc, Cp;   // carry-save A and C
  logic [W-1:0] B, D;             // B and D, carry word always zero
  logic [N-1:0] K;                // one-hot unit-position tracker

  function automatic logic normd(input logic [N-1:0] x);
    return x[N-1] ^ x[N-2];
  endfunction

  // ---- A..D arithmetic ----------------------------------------------------
  logic         op_sub;
  logic [W-1:0] nAc, nAp, nCc, nCp;
  assign op_sub = (P[N-1] != Q[N-1]);

  cs_addsub #(.W(W)) u_add_a (.a_c(Ac), .a_p(Ap), .b_c('0), .b_p(B), .sub(op_sub),
                              .r_c(nAc), .r_p(nAp));
  cs_addsub #(.W(W)) u_add_c (.a_c(Cc), .a_p(Cp), .b_c('0), .b_p(D), .sub(op_sub),
                              .r_c(nCc), .r_p(nCp));

  // ---- overflow guard -----------------------------------------------------
  logic sm_a, sm_b, sm_c, sm_d;
  cs_lead_classify u_cls_a (.lead_c(Ac[W-1 -: 3]), .lead_p(Ap[W-1 -: 3]),
                            .case_no(), .scaled(), .narrow(sm_a), .sign_known(), .neg());
  cs_lead_classify u_cls_b (.lead_c(3'b000), .lead_p(B[W-1 -: 3]),
                            .case_no(), .scaled(), .narrow(sm_b), .sign_known(), .neg());
  cs_lead_classify u_cls_c (.lead_c(Cc[W-1 -: 3]), .lead_p(Cp[W-1 -: 3]),
                            .case_no(), .scaled(), .narrow(sm_c), .sign_known(), .neg());
  cs_lead_classify u_cls_d (.lead_c(3'b000), .lead_p(D[W-1 -: 3]),
                            .case_no(), .scaled(), .narrow(sm_d), .sign_known(), .neg());

  // ---- conversion and bound test of the next pair -------------------------
  logic [W-1:0] ua, vc;
  cs_to_twos #(.W(W)) u_cv_a (.c(Ac), .p(Ap), .y(ua));
  cs_to_twos #(.W(W)) u_cv_c (.c(Cc), .p(Cp), .y(vc));

  logic fit_reg, fit_fs;
  assign fit_reg = ($signed(ua) == $signed(W'($signed(ua[N-1:0])))) &&
                   ($signed(vc) == $signed(W'($signed(vc[N-1:0]))));
  fs_pack #(.FS_N(FS_N), .WI(N)) u_fit (.u(ua[N-1:0]), .v(vc[N-1:0]), .fits(fit_fs), .word());

  logic pair_ok;
  assign pair_ok = fit_reg && ((bound == BND_REG) || fit_fs);

  // ---- control and registers ----------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      P <= '0; Q <= '0; Ac <= '0; Ap <= '0; Cc <= '0; Cp <= '0; B <= '0; D <= '0;
      K <= '0;
      u_out <= '0; v_out <= '0; early <= 1'b0; guard <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          P <= p_in; Q <= q_in;
          Ac <= '0; Ap <= W'(a_in);
          Cc <= '0; Cp <= W'(c_in);
          B  <= W'(b_in); D <= W'(d_in);
          K  <= N'(1);
          u_out <= b_in; v_out <= d_in;
          early <= 1'b0; guard <= 1'b0;
          if (p_in == 0 && q_in == 0) begin
            u_out <= '0; v_out <= '0;     // 0/0: no value, report 0/0
            state <= S_DONE;
          end else begin
            state <= S_PRE;
          end
        end
        S_PRE:
          if (normd(P) || normd(Q)) state <= S_OUTER;
          else begin P <= P <<< 1; Q <= Q <<< 1; end
        S_OUTER:
          state <= (Q == 0) ? S_DONE : S_NORMQ;
        S_NORMQ:
          if (normd(Q)) state <= S_INNER;
          else if (!(sm_b && sm_d)) begin
            guard <= 1'b1; early <= 1'b1; state <= S_DONE;
          end else begin
            Q <= Q <<< 1; B <= B << 1; D <= D << 1; K <= K << 1;
          end
        S_INNER:
          if (!normd(P)) begin
            if (K[0]) state <= S_SWAP;
            else begin
              P <= P <<< 1;
              B <= W'($signed(B) >>> 1);
              D <= W'($signed(D) >>> 1);
              K <= K >> 1;
            end
          end else if (!(sm_a && sm_b && sm_c && sm_d)) begin
            guard <= 1'b1; early <= 1'b1; state <= S_DONE;
          end else begin
            P  <= op_sub ? P + Q : P - Q;
            Ac <= nAc; Ap <= nAp; Cc <= nCc; Cp <= nCp;
          end
        S_SWAP:
          if (pair_ok) begin
            P <= Q; Q <= P;
            Ac <= '0; Ap <= B; B <= ua;
            Cc <= '0; Cp <= D; D <= vc;
            u_out <= ua[N-1:0]; v_out <= vc[N-1:0];
            state <= S_OUTER;
          end else begin
            early <= 1'b1; state <= S_DONE;
          end
        S_DONE:
          state <= S_IDLE;
        default:
          state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign done      = (state == S_DONE);
  assign ev_qshift = (state == S_NORMQ) && !normd(Q) && sm_b && sm_d;
  assign ev_pshift = (state == S_INNER) && !normd(P) && !K[0];
  assign ev_addsub = (state == S_INNER) && normd(P) && sm_a && sm_b && sm_c && sm_d;
  assign ev_swap   = (state == S_SWAP) && pair_ok;

  // K is one-hot while a run is in progress
  a_k_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                               (state inside {S_OUTER, S_NORMQ, S_INNER, S_SWAP}) |-> $onehot(K));

endmodule
