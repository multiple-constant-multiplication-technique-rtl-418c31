// tb_mcm_cse: exhaustive check of the multiple constant multiplication block.
//
// Instance 1 uses the two constants of the sharing example, 19 and 43, whose
// CSD forms both contain the pattern {1 0 -1}; the test checks that this
// pattern (distance 2, digits of opposite sign, sub = 4x - x) is the one
// shared and that both products are right for every 8-bit input. Instance 2
// holds a single constant, instance 3 a slice of four out of a longer list of
// constants with negative and extreme values, and instance 4 a set in which
// two patterns recur, {1 0 -1} (3x) and {1 0 1} (5x), both of which must be
// shared. Products are compared with ordinary multiplication.
module tb_mcm_cse;

  localparam int XW = 8, CW = 8, PW = XW + CW;
  localparam logic signed [CW-1:0] PAIR [2] = '{8'sd19, 8'sd43};
  localparam logic signed [CW-1:0] ONE [1] = '{-8'sd93};
  localparam logic signed [CW-1:0] QUAD [4] = '{8'sd85, 8'sd19, 8'sd43, -8'sd93};
  localparam logic signed [CW-1:0] LIST [6] = '{8'sd5, -8'sd77, 8'sd105, -8'sd128, 8'sd127, 8'sd45};

  logic signed [XW-1:0] x;
  logic signed [PW-1:0] p1 [2];
  logic signed [PW-1:0] p2 [1];
  logic signed [PW-1:0] p3 [4];
  logic signed [PW-1:0] p4 [4];
  int checks = 0, failures = 0;

  mcm_cse #(.XW(XW), .CW(CW), .NC(2), .COEFS(PAIR)) dut (.x(x), .p(p1));
  mcm_cse #(.XW(XW), .CW(CW), .NC(1), .NH(1), .COEFS(ONE)) u_scm (.x(x), .p(p2));
  mcm_cse #(.XW(XW), .CW(CW), .NC(4), .NH(6), .FIRST(1), .COEFS(LIST)) u_slice (.x(x), .p(p3));
  mcm_cse #(.XW(XW), .CW(CW), .NC(4), .COEFS(QUAD)) u_two (.x(x), .p(p4));

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: x=%0d got %0d expected %0d", what, x, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // {19, 43}: one shared pattern, {1 0 -1} (distance 2, signs opposite)
    expect_eq("shared patterns 19/43", dut.NP, 1);
    expect_eq("first pattern 19/43", int'(dut.PATS[7:0]), 2 * 2 + 0);
    // {85, 19, 43, -93}: {1 0 -1} and then {1 0 1} are both shared
    expect_eq("shared patterns quad", u_two.NP, 2);
    expect_eq("second pattern quad", int'(u_two.PATS[15:8]), 2 * 2 + 1);
    for (int v = -128; v < 128; v++) begin
      x = XW'(v);
      #1;
      expect_eq("19x", p1[0], 19 * v);
      expect_eq("43x", p1[1], 43 * v);
      expect_eq("-93x", p2[0], -93 * v);
      for (int c = 0; c < 4; c++) expect_eq("slice", p3[c], longint'(LIST[1+c]) * v);
      for (int c = 0; c < 4; c++) expect_eq("quad", p4[c], longint'(QUAD[c]) * v);
      expect_eq("shared 3x", dut.g_sub.s[0], 3 * v);
      expect_eq("shared 5x", u_two.g_sub.s[1], 5 * v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
