// tb_cs_lead_classify: for every pair of 8-bit carry and place words, adds
// the words in full and checks that the value lies in the range the
// classification of the leading three positions promises (value scaled so
// that the sign position has weight 1: the range table of cases 0..7), that
// "narrow" implies a value in [-1/2, 1/2), "scaled" a magnitude of at least
// 1/4, and that the sign output is right whenever it is declared known.
module tb_cs_lead_classify;
  logic [2:0] lead_c, lead_p, case_no;
  logic       scaled, narrow, sign_known, neg;
  int checks = 0, failures = 0;

  cs_lead_classify dut (.*);

  // range of each case in units of 1/128, [lo, hi)
  int lo1 [8] = '{0, 32, 64, 96, -128, -96, -64, -32};
  int hi1 [8] = '{64, 96, 128, 128, -64, -32, 0, 32};

  initial begin
    for (int c = 0; c < 256; c++) begin
      for (int p = 0; p < 256; p++) begin
        int v;
        bit ok;
        lead_c = 3'(c >> 5);
        lead_p = 3'(p >> 5);
        #1;
        v = int'($signed(8'(c + p)));
        checks++;
        if (case_no == 3'd3) ok = (v >= 96) || (v < -96);
        else                 ok = (v >= lo1[case_no]) && (v < hi1[case_no]);
        if (narrow) ok = ok && (v >= -64) && (v < 64);
        if (scaled) ok = ok && ((v >= 32) || (v < -32));
        if (sign_known) ok = ok && (neg == (v < 0));
        ok = ok && (narrow == (case_no inside {3'd0, 3'd6, 3'd7}));
        if (!ok) begin
          failures++;
          if (failures < 10) $display("FAIL c=%h p=%h v=%0d case=%0d nar=%b sc=%b", c, p, v,
                                      case_no, narrow, scaled);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
