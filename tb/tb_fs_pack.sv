// tb_fs_pack: for random signed pairs (u, v) of assorted bit lengths,
// compares the fit decision with the reference rule and, when the pair
// fits, decodes the packed word with the reference decoder and checks that
// it gives back exactly |u|, |v| and the sign of u/v. Boundary lengths
// (bu + bv = n+2 and n+3, u = +/-1 with a 27-bit v, u = 0, v = 0) are included.
module tb_fs_pack;
  import tb_ref_pkg::*;
  localparam int N_ = 25;
  localparam int KW = 5;
  logic signed [53:0] u, v;
  logic               fits;
  logic [31:0]        word;
  int checks = 0, failures = 0;

  fs_pack dut (.*);

  function automatic logic signed [53:0] rnd_bits(int nb);
    logic [63:0] x = {$urandom, $urandom};
    if (nb == 0) return 0;
    x = x & ((64'd1 << nb) - 1);
    x[nb - 1] = 1'b1;
    return ($urandom % 2) ? -$signed(54'(x)) : $signed(54'(x));
  endfunction

  task automatic run(logic signed [53:0] uu, logic signed [53:0] vv);
    big_t p, q;
    bit   lg, ef;
    u = uu; v = vv;
    #1;
    ef = fs_fits(big_t'(u), big_t'(v), N_);
    checks++;
    if (fits != ef) begin
      failures++;
      if (failures < 10) $display("FAIL fit u=%0d v=%0d fits=%b", u, v, fits);
    end else if (fits) begin
      fs_decode(64'(word), N_, KW, p, q, lg);
      checks++;
      if (!(lg && (p * big_t'(v) == q * big_t'(u)) && babs(q) == babs(big_t'(v)) || (u == 0 && p == 0 && lg))) begin
        failures++;
        if (failures < 10) $display("FAIL pack u=%0d v=%0d word=%h -> %0d/%0d", u, v, word, p, q);
      end
    end
  endtask

  initial begin
    run(0, 5); run(7, 0); run(1, rnd_bits(27)); run(-1, rnd_bits(27)); run(3, rnd_bits(27));
    run(rnd_bits(26), 1); run(rnd_bits(27), 1);
    repeat (4000) begin
      int bu, bv;
      bu = $urandom % 30;
      bv = 1 + $urandom % 30;
      run(rnd_bits(bu), rnd_bits(bv));
    end
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
