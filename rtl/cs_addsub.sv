// cs_addsub: carry-save adder/subtracter, R = A + B or R = A - B.
//
// Each operand is held in carry-save form as two W-bit two's complement
// words (a "carry" word and a "place" word) whose sum, modulo 2^W, is the
// value. Every bit position is the same slice: the two bits of B are first
// passed through XOR gates driven by the add/subtract control, then two
// levels of full adders (3-2 counters) combine A's two bits with B's two
// bits. The first-level carry goes to the second-level adder of the next
// more significant slice; the second-level carry becomes the carry-word bit
// of the next more significant slice. No carry travels further than one
// position, so the delay does not depend on W.
//
// At the least significant end two carries enter: both are 0 for an add and
// both are 1 for a subtract, which completes the two's complement of the
// inverted carry and place words of B. The two carries leaving the most
// significant slice are dropped (arithmetic is modulo 2^W).
//
// The slice (XOR pre-inversion, two full adders built from AND/XOR/OR) and
// the end-carry rules follow the design description; the word width is a
// parameter. Purely combinational.
module cs_addsub #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a_c,   // carry word of A
  input  logic [W-1:0] a_p,   // place word of A
  input  logic [W-1:0] b_c,   // carry word of B
  input  logic [W-1:0] b_p,   // place word of B
  input  logic         sub,   // 1: R = A - B, 0: R = A + B
  output logic [W-1:0] r_c,   // carry word of R
  output logic [W-1:0] r_p    // place word of R
);

  logic [W:0] x;   // first-level carries, x[0] is the carry entering at the right
  logic [W:0] y;   // second-level carries, y[0] likewise

  assign x[0] = sub;
  assign y[0] = sub;

  for (genvar i = 0; i < W; i++) begin : g_slice
    logic bp, bc;      // B bits after the add/subtract XOR
    logic s1, t1;      // first level: half sum and full sum
    logic t2;          // second level half sum
    assign bp = b_p[i] ^ sub;
    assign bc = b_c[i] ^ sub;
    // first-level full adder: A place, A carry, B place
    assign t1       = a_p[i] ^ a_c[i];
    assign s1       = t1 ^ bp;
    assign x[i+1]   = (a_p[i] & a_c[i]) | (t1 & bp);
    // second-level full adder: first-level sum, B carry, carry from the right
    assign t2       = s1 ^ bc;
    assign r_p[i]   = t2 ^ x[i];
    assign y[i+1]   = (s1 & bc) | (t2 & x[i]);
    // the carry word takes the second-level carry of the slice to the right
    assign r_c[i]   = y[i];
  end

endmodule
