// tb_cs_addsub: checks the carry-save adder/subtracter against ordinary
// integer arithmetic modulo 2^W, for random operands and for the corner
// values 0, -1 and the most negative number, in both add and subtract mode.
module tb_cs_addsub;
  localparam int unsigned W = 16;
  logic [W-1:0] a_c, a_p, b_c, b_p, r_c, r_p;
  logic         sub;
  int checks = 0, failures = 0;

  cs_addsub #(.W(W)) dut (.*);

  task automatic check_one();
    logic [W-1:0] exp;
    #1;
    exp = sub ? (a_c + a_p) - (b_c + b_p) : (a_c + a_p) + (b_c + b_p);
    checks++;
    if (W'(r_c + r_p) !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL sub=%0b a=%h+%h b=%h+%h r=%h+%h exp %h",
                                  sub, a_c, a_p, b_c, b_p, r_c, r_p, exp);
    end
  endtask

  initial begin
    logic [W-1:0] corners [4] = '{16'h0000, 16'hffff, 16'h8000, 16'h7fff};
    foreach (corners[i]) foreach (corners[j]) begin
      a_c = corners[i]; a_p = corners[j]; b_c = corners[j]; b_p = corners[i];
      sub = 0; check_one();
      sub = 1; check_one();
    end
    repeat (5000) begin
      a_c = W'($urandom); a_p = W'($urandom); b_c = W'($urandom); b_p = W'($urandom);
      sub = 1'($urandom);
      check_one();
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
