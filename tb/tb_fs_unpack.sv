// tb_fs_unpack: decodes random packed words (every slash position, plus
// illegal ones) and compares sign, numerator and denominator with the
// reference decoder, and checks the integer case k = 0 and the implied
// numerator at k = n+1 explicitly.
module tb_fs_unpack;
  import tb_ref_pkg::*;
  localparam int N_ = 25;
  localparam int KW = 5;
  logic [31:0] word;
  logic        neg, legal;
  logic [25:0] num;
  logic [26:0] den;
  int checks = 0, failures = 0;

  fs_unpack dut (.*);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s word=%h num=%h den=%h neg=%b", what, word, num, den, neg);
    end
  endtask

  initial begin
    big_t p, q;
    bit   lg;
    // integer 12345, k = 0
    word = {1'b1, 5'd0, 26'd12345}; #1;
    check("integer", neg && num == 12345 && den == 1 && legal);
    // k = n+1: numerator 1 implied, denominator 27 bits
    word = {1'b0, 5'd26, 26'h2aaaaaa}; #1;
    check("k=n+1", !neg && num == 1 && den[26] && legal);
    repeat (3000) begin
      word = $urandom;
      #1;
      fs_decode(64'(word), N_, KW, p, q, lg);
      check("random", legal == lg && (neg ? -big_t'(num) : big_t'(num)) == (neg ? -babs(p) : babs(p))
                      && big_t'(den) == q && (num == 0 || neg == (p < 0)));
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
