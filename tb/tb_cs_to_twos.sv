// tb_cs_to_twos: checks the conversion adder, y = c + p mod 2^W, at an odd
// width (exhaustively) and at a wide width (random and carry-chain corners).
module tb_cs_to_twos;
  logic [6:0]   c7, p7, y7;
  logic [109:0] cw, pw, yw;
  int checks = 0, failures = 0;

  cs_to_twos #(.W(7))   dut7 (.c(c7), .p(p7), .y(y7));
  cs_to_twos #(.W(110)) dutw (.c(cw), .p(pw), .y(yw));

  initial begin
    for (int i = 0; i < 128; i++) for (int j = 0; j < 128; j++) begin
      c7 = 7'(i); p7 = 7'(j);
      #1;
      checks++;
      if (y7 !== 7'(i + j)) failures++;
    end
    for (int t = 0; t < 2000; t++) begin
      if (t == 0)      begin cw = '1; pw = 110'd1; end
      else if (t == 1) begin cw = {1'b0, {109{1'b1}}}; pw = 110'd1; end
      else             begin cw = {4{$urandom}}; pw = {4{$urandom}}; end
      #1;
      checks++;
      if (yw !== 110'(cw + pw)) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h -> %h", cw, pw, yw);
      end
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
