// fs_pack: fit test and encoder from a signed pair (u, v) to the packed
// floating-slash format (layout described in fs_unpack).
//
// Let bu and bv be the bit lengths of |u| and |v|. The slash position is
// k = bv - 1, so that |v| carries its leading 1 at the unstored position -1,
// and |u| must fit positions n..k, that is bu + bv <= n+2. The pair u = +/-1
// with bv = n+2 also fits, using k = n+1 where the numerator 1 is implied.
// u = 0 packs as zero (p = 0, q = 1, k = 0) whatever v is; v = 0 never fits.
// The sign bit is the exclusive-or of the signs of u and v.
//
// The fit rule and encoding follow the packed format of the design; the
// exact bit count comes from the converted (two's complement) pair, which
// the design obtains from its carry-look-ahead conversion adder. Purely
// combinational.
module fs_pack #(
  parameter int unsigned FS_N = rau_pkg::FS_N_DEF,
  parameter int unsigned WI   = 2 * FS_N + 4,
  localparam int unsigned KW  = $clog2(FS_N + 2),
  localparam int unsigned WW  = 1 + KW + FS_N + 1
) (
  input  logic signed [WI-1:0] u,     // numerator candidate
  input  logic signed [WI-1:0] v,     // denominator candidate
  output logic                 fits,  // u/v is representable as given
  output logic [WW-1:0]        word   // packed value, meaningful when fits
);

  logic [WI-1:0] mu, mv;
  int unsigned   bu, bv, k;
  logic [FS_N:0] field;
  logic          s;

  always_comb begin
    mu = u[WI-1] ? WI'(-u) : WI'(u);
    mv = v[WI-1] ? WI'(-v) : WI'(v);
    bu = 0;
    bv = 0;
    for (int i = 0; i < int'(WI); i++) begin
      if (mu[i]) bu = i + 1;
      if (mv[i]) bv = i + 1;
    end
    fits  = (bv != 0) && ((bu == 0) || (bu + bv <= FS_N + 2) ||
                          (bu == 1 && bv == FS_N + 2));
    k     = (bu == 0 || bv == 0) ? 0 : bv - 1;
    s     = (bu != 0) && (u[WI-1] ^ v[WI-1]);
    field = '0;
    if (bu != 0) begin
      for (int m = 0; m <= int'(FS_N); m++) begin
        if (m < int'(k)) field[m] = mv[int'(k) - 1 - m];
        else             field[m] = mu[m - int'(k)];
      end
    end
    word = {s, KW'(k), field};
  end

endmodule
