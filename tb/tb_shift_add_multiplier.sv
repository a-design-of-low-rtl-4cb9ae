// tb_shift_add_multiplier: exhaustive check of the default 8x8 multiplier (low 8
// product bits kept) over all 65536 operand pairs, and random checks of an exact
// 8x8 -> 16-bit instance. p must equal (x * h) mod 2^PROD_W. Prints one TB_RESULT line.
module tb_shift_add_multiplier;
  logic [7:0]  x, h, p;
  logic [15:0] pf;
  int checks = 0, failures = 0;
  shift_add_multiplier dut (.x(x), .h(h), .p(p));
  shift_add_multiplier #(.DATA_W(8), .COEF_W(8), .PROD_W(16)) dut_f (.x(x), .h(h), .p(pf));
  initial begin
    for (int v = 0; v < 65536; v++) begin
      {x, h} = 16'(v);
      #1;
      checks++;
      if (p != 8'(int'(x) * int'(h))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d -> %0d", x, h, p);
      end
      if (v % 7 == 0) begin
        checks++;
        if (pf != 16'(int'(x) * int'(h))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
