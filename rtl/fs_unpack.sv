// fs_unpack: decoder for the packed floating-slash rational format.
//
// Word layout, most significant bit first:  s | k | field[n..0]
//   s      sign of the rational
//   k      slash position, $clog2(n+2) bits, legal values 0..n+1
//   field  numerator and denominator sharing n+1 positions
// With k = i the unsigned numerator p occupies positions n..i (its least
// significant bit at position i). The denominator q occupies positions
// i-1..0 with its bits reversed: its least significant bit sits next to the
// slash at position i-1 and its bit i-1 at position 0. A further position
// -1, not stored, always holds q's leading 1, so q lies in [2^k, 2^(k+1))
// and can never be zero. k = 0 gives an integer of n+1 bits (q = 1);
// k = n+1 leaves no room for p, which is then 1.
//
// The layout and its rules follow the design description; the ordering of
// s and k in the word and the treatment of k > n+1 (flagged illegal,
// decoded as k = n+1) are this design's choices. Purely combinational.
module fs_unpack #(
  parameter int unsigned FS_N = rau_pkg::FS_N_DEF,
  localparam int unsigned KW  = $clog2(FS_N + 2),
  localparam int unsigned WW  = 1 + KW + FS_N + 1
) (
  input  logic [WW-1:0]   word,   // packed operand
  output logic            neg,    // sign bit s
  output logic [FS_N:0]   num,    // numerator p, unsigned
  output logic [FS_N+1:0] den,    // denominator q, unsigned, never 0
  output logic            legal   // k within 0..n+1
);

  logic [KW-1:0] k;
  logic [FS_N:0] field;
  int unsigned   ki;

  assign neg   = word[WW-1];
  assign k     = word[WW-2 -: KW];
  assign field = word[FS_N:0];
  assign legal = (32'(k) <= FS_N + 1);

  always_comb begin
    ki  = legal ? 32'(k) : FS_N + 1;
    num = '0;
    den = '0;
    if (ki > FS_N) num = 1;
    else           num = field >> ki;
    den[ki] = 1'b1;                     // the stored-nowhere leading 1
    for (int m = 0; m <= FS_N; m++) begin
      if (m < int'(ki)) den[int'(ki) - 1 - m] = field[m];
    end
  end

endmodule
