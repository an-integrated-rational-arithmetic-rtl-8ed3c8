// rau_pkg: types and default sizes shared by the rational arithmetic unit.
//
// The unit works on rationals p/q held as a pair of two's complement
// integers (the accumulator) and on operands r/s stored in a packed
// floating-slash word. FS_N is the index n of the most significant position
// of the numerator/denominator field (the field spans positions n..0), and
// the accumulator width is N = 2n+4 as the design prescribes. The value of
// n itself is this design's choice (n = 25 gives a 32-bit packed word with a
// sign bit and a 5-bit slash position).
package rau_pkg;

  // Default field index n; field width is n+1.
  localparam int unsigned FS_N_DEF = 25;

  // Operation codes presented to the unit.
  typedef enum logic [2:0] {
    OP_LOAD  = 3'd0,  // accumulator := packed operand
    OP_ADD   = 3'd1,  // accumulator := accumulator + operand
    OP_SUB   = 3'd2,  // accumulator := accumulator - operand
    OP_MUL   = 3'd3,  // accumulator := accumulator * operand
    OP_DIV   = 3'd4,  // accumulator := accumulator / operand
    OP_STORE = 3'd5   // result word := accumulator, mediant rounded
  } rau_op_e;

  // How the Euclidian engine decides whether a new (u,v) pair is accepted.
  typedef enum logic {
    BND_REG = 1'b0,   // pair must fit the N-bit accumulator registers
    BND_FS  = 1'b1    // pair must fit the packed floating-slash word
  } bne_bound_e;

  // One-clock strobes of the mechanisms inside the unit, for monitoring.
  typedef struct packed {
    logic shortcut_pb;  // operation started with p and b exchanged
    logic shortcut_qc;  // operation started with q and c exchanged
    logic qshift;       // Q normalization shift
    logic pshift;       // P shift with B, D right shift
    logic addsub;       // add/subtract step
    logic swap;         // accepted (u,v) pair
    logic early;        // run ended on a bound, previous pair kept
    logic guard;        // run ended on the A..D overflow guard
  } rau_events_t;

endpackage
