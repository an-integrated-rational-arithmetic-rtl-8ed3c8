// rau_top: rational arithmetic unit with a floating-slash operand format.
//
// The unit keeps one rational accumulator p/q as a pair of N-bit two's
// complement integers (N = 2n+4, wide enough for the numerator and
// denominator of a sum, difference, product or quotient of two packed
// values). Each command carries a packed floating-slash word r/s:
//   OP_LOAD   p/q := r/s (no arithmetic)
//   OP_ADD, OP_SUB, OP_MUL, OP_DIV
//             p/q := (p/q) op (r/s). The operator and r/s form a seed
//             matrix (rau_seed) and the Euclidian engine (bne_unit) expands
//             p/q against it; the final pair u/v is written back to the
//             accumulator. The result is exact unless a pair outgrows the
//             N-bit registers, in which case the last pair that fitted is
//             kept and rsp_inexact is set.
//   OP_STORE  rsp_word := p/q rounded to the packed format. The engine runs
//             with the unit matrix and stops at the last pair that still
//             fits the packed word (mediant rounding); the accumulator is
//             left unchanged. rsp_inexact marks a rounded result.
// rsp_ovf is set when the result has a zero denominator (division by zero,
// or a value too large for the accumulator or the packed word); the
// accumulator is then left unchanged.
//
// Interface: a command is taken when cmd_valid and cmd_ready are both high.
// rsp_valid pulses once per command, one clock after acceptance for a LOAD
// and when the engine finishes otherwise; cmd_ready is low in between.
// Reset clears the accumulator to 0/1.
//
// The accumulator, the seeded Euclidian algorithm, the register width
// N = 2n+4 and the packed format follow the design description. The command
// set, handshake, flags and the value of n (set in rau_pkg) are this
// design's own choices.
module rau_top
  import rau_pkg::*;
#(
  parameter int unsigned FS_N = FS_N_DEF,
  localparam int unsigned N   = 2 * FS_N + 4,
  localparam int unsigned KW  = $clog2(FS_N + 2),
  localparam int unsigned WW  = 1 + KW + FS_N + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cmd_valid,
  output logic                cmd_ready,
  input  rau_op_e             cmd_op,
  input  logic [WW-1:0]       cmd_word,
  output logic                rsp_valid,
  output logic [WW-1:0]       rsp_word,
  output logic                rsp_inexact,
  output logic                rsp_ovf,
  output logic signed [N-1:0] acc_p,
  output logic signed [N-1:0] acc_q,
  output rau_events_t         events    // mechanism strobes, for monitoring
);

  // ---- operand decode -------------------------------------------------------
  logic            o_neg, o_legal;
  logic [FS_N:0]   o_num;
  logic [FS_N+1:0] o_den;
  fs_unpack #(.FS_N(FS_N)) u_unpack (.word(cmd_word), .neg(o_neg), .num(o_num),
                                     .den(o_den), .legal(o_legal));

  logic signed [N-1:0] r, s;
  assign r = o_neg ? -$signed(N'(o_num)) : $signed(N'(o_num));
  assign s = $signed(N'(o_den));

  // ---- seed -----------------------------------------------------------------
  logic signed [N-1:0] sp, sq, sa, sb, sc, sd;
  bne_bound_e          sbound;
  logic                sc_pb, sc_qc;
  rau_seed #(.N(N)) u_seed (.op(cmd_op), .acc_p(acc_p), .acc_q(acc_q), .r(r), .s(s),
                            .p_o(sp), .q_o(sq), .a_o(sa), .b_o(sb), .c_o(sc), .d_o(sd),
                            .bound(sbound), .sc_pb(sc_pb), .sc_qc(sc_qc));

  // ---- engine ---------------------------------------------------------------
  logic                e_start, e_busy, e_done, e_early, e_guard;
  logic signed [N-1:0] e_u, e_v;
  logic                ev_qshift, ev_pshift, ev_addsub, ev_swap;
  bne_unit #(.FS_N(FS_N), .N(N)) u_bne (
    .clk, .rst_n, .start(e_start), .bound(sbound),
    .p_in(sp), .q_in(sq), .a_in(sa), .b_in(sb), .c_in(sc), .d_in(sd),
    .busy(e_busy), .done(e_done), .u_out(e_u), .v_out(e_v),
    .early(e_early), .guard(e_guard),
    .ev_qshift, .ev_pshift, .ev_addsub, .ev_swap);

  assign events = '{shortcut_pb: e_start && sc_pb,
                    shortcut_qc: e_start && sc_qc,
                    qshift:      ev_qshift,
                    pshift:      ev_pshift,
                    addsub:      ev_addsub,
                    swap:        ev_swap,
                    early:       e_done && e_early,
                    guard:       e_done && e_guard};

  // ---- result packing -------------------------------------------------------
  logic          pk_fits;
  logic [WW-1:0] pk_word;
  fs_pack #(.FS_N(FS_N), .WI(N)) u_pack (.u(e_u), .v(e_v), .fits(pk_fits), .word(pk_word));

  // ---- command sequencing ---------------------------------------------------
  typedef enum logic [1:0] {T_IDLE, T_RUN, T_RESP} tstate_e;
  tstate_e tstate;
  rau_op_e op_q;

  assign cmd_ready = (tstate == T_IDLE) && !e_busy;
  assign e_start   = cmd_valid && cmd_ready && (cmd_op != OP_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate      <= T_IDLE;
      op_q        <= OP_LOAD;
      acc_p       <= '0;
      acc_q       <= N'(1);
      rsp_valid   <= 1'b0;
      rsp_word    <= '0;
      rsp_inexact <= 1'b0;
      rsp_ovf     <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (tstate)
        T_IDLE: if (cmd_valid && cmd_ready) begin
          op_q <= cmd_op;
          if (cmd_op == OP_LOAD) begin
            acc_p       <= r;
            acc_q       <= s;
            rsp_valid   <= 1'b1;
            rsp_word    <= cmd_word;
            rsp_inexact <= 1'b0;
            rsp_ovf     <= !o_legal;
          end else begin
            tstate <= T_RUN;
          end
        end
        T_RUN: if (e_done) begin
          rsp_valid   <= 1'b1;
          rsp_inexact <= e_early;
          if (op_q == OP_STORE) begin
            rsp_word <= pk_word;
            rsp_ovf  <= !pk_fits;
          end else begin
            rsp_word <= '0;
            rsp_ovf  <= (e_v == 0);
            if (e_v != 0) begin
              acc_p <= e_u;
              acc_q <= e_v;
            end
          end
          tstate <= T_IDLE;
        end
        default: tstate <= T_IDLE;
      endcase
    end
  end

endmodule
