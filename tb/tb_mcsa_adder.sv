// tb_mcsa_adder: checks the carry select adder of ripple carry adders. The default
// 8-bit instance is checked exhaustively (all 2^17 values of x1, x2, ci), which
// exercises both selections of the upper block. A 10-bit instance (blocks of 4, 4
// and 2 bits) is checked at random and at the all-ones corner, where the carry has
// to pass every selected block. {co, dataout} must equal x1 + x2 + ci.
// Prints one TB_RESULT line.
module tb_mcsa_adder;
  logic [7:0] x1, x2, d;
  logic       ci, co;
  logic [9:0] w1, w2, wd;
  logic       wci, wco;
  int checks = 0, failures = 0;
  int sel0 = 0, sel1 = 0;
  mcsa_adder dut (.x1(x1), .x2(x2), .ci(ci), .dataout(d), .co(co));
  mcsa_adder #(.WIDTH(10)) dut_w (.x1(w1), .x2(w2), .ci(wci), .dataout(wd), .co(wco));
  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {x1, x2, ci} = 17'(v);
      #1;
      checks++;
      if ((int'(x1[3:0]) + int'(x2[3:0]) + int'(ci)) > 15) sel1++; else sel0++;
      if ({co, d} != 9'(int'(x1) + int'(x2) + int'(ci))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d+%0d+%0d -> %0d", x1, x2, ci, {co, d});
      end
    end
    w1 = '1; w2 = '0; wci = 1'b1;
    #1;
    checks++;
    if ({wco, wd} != 11'h400) failures++;
    for (int n = 0; n < 2000; n++) begin
      w1 = 10'($urandom); w2 = 10'($urandom); wci = 1'($urandom);
      #1;
      checks++;
      if ({wco, wd} != 11'(int'(w1) + int'(w2) + int'(wci))) failures++;
    end
    if (sel0 == 0 || sel1 == 0) failures++;
    $display("upper block selected with carry 0: %0d, with carry 1: %0d", sel0, sel1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
