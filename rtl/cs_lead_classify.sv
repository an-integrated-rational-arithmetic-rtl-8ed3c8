// cs_lead_classify: range classification of a carry-save number from its
// three leading positions.
//
// A number in carry-save form is the sum of a carry word and a place word.
// Without full carry propagation only the leading three positions are added
// (a 3-bit adder, carries from the lower positions ignored). With the unit at
// the sign position, so that the value lies in [-1, 1), the dropped lower
// positions add between 0 and just under 1/2, and the 3-bit sum places the
// value in one of eight overlapping ranges (case = the 3-bit sum):
//
//   case 0: [0,1/2)    case 1: [1/4,3/4)   case 2: [1/2,1)
//   case 3: [3/4,1) or [-1,-3/4)           case 4: [-1,-1/2)
//   case 5: [-3/4,-1/4) case 6: [-1/2,0)   case 7: [-1/4,1/4)
//
// Cases 1..5 are taken as "scaled" (magnitude at least 1/4). Cases 0, 6 and 7
// are "narrow": the value lies in [-1/2, 1/2), so a left shift or the sum of
// two such values cannot overflow the word. The sign follows the leading bit
// of the sum except in cases 3 and 7, whose ranges straddle zero or wrap.
//
// The table and its use follow the design description; the output encoding
// is this design's choice. Purely combinational.
module cs_lead_classify (
  input  logic [2:0] lead_c,     // carry word, leading three positions ([2] = sign position)
  input  logic [2:0] lead_p,     // place word, leading three positions
  output logic [2:0] case_no,    // 3-bit sum, the case number of the table
  output logic       scaled,     // cases 1..5: magnitude at least 1/4
  output logic       narrow,      // cases 0, 6, 7: value in [-1/2, 1/2)
  output logic       sign_known, // sign decided by the leading bit (all cases but 3 and 7)
  output logic       neg         // leading bit of the sum: negative when sign_known
);

  always_comb begin
    case_no    = lead_c + lead_p;
    scaled     = (case_no >= 3'd1) && (case_no <= 3'd5);
    narrow      = !scaled;
    sign_known = (case_no != 3'd3) && (case_no != 3'd7);
    neg        = case_no[2];
  end

endmodule
