// tb_rca: exhaustive check of the 4-bit ripple carry adder (all 512 combinations of
// a, b and ci), plus random checks of a 13-bit instance. {co, s} must equal
// a + b + ci. Prints one TB_RESULT line.
module tb_rca;
  logic [3:0]  a, b, s;
  logic        ci, co;
  logic [12:0] wa, wb, ws;
  logic        wci, wco;
  int checks = 0, failures = 0;
  rca dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  rca #(.WIDTH(13)) dut_w (.a(wa), .b(wb), .ci(wci), .s(ws), .co(wco));
  initial begin
    for (int v = 0; v < 512; v++) begin
      {a, b, ci} = 9'(v);
      #1;
      checks++;
      if ({co, s} != 5'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL %0d+%0d+%0d -> %0d", a, b, ci, {co, s});
      end
    end
    for (int n = 0; n < 500; n++) begin
      wa = 13'($urandom); wb = 13'($urandom); wci = 1'($urandom);
      #1;
      checks++;
      if ({wco, ws} != 14'(int'(wa) + int'(wb) + int'(wci))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
