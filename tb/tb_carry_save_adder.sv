// tb_carry_save_adder: random and corner checks of one 10-bit carry save row. For
// each operand triple it checks that s + c equals x + y + z modulo 2^10, that
// c[0] is zero, and that each bit pair (s[i], c[i+1]) is the full-adder result of
// bit i alone (no carry moves along the row). Prints one TB_RESULT line.
module tb_carry_save_adder;
  localparam int W = 10;
  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;
  carry_save_adder #(.WIDTH(W)) dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  task automatic check_one();
    int exp_sum;
    logic bad;
    #1;
    exp_sum = (int'(x) + int'(y) + int'(z)) % (1 << W);
    checks++;
    if (((int'(s) + int'(c)) % (1 << W)) != exp_sum) begin
      failures++;
      $display("FAIL sum x=%0d y=%0d z=%0d s=%0d c=%0d", x, y, z, s, c);
    end
    bad = c[0];
    for (int i = 0; i < W; i++) begin
      if (s[i] != (x[i] ^ y[i] ^ z[i])) bad = 1'b1;
      if (i < W - 1 && c[i+1] != ((x[i] & y[i]) | (x[i] & z[i]) | (y[i] & z[i]))) bad = 1'b1;
    end
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL bits x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
    end
  endtask

  initial begin
    x = '1; y = '1; z = '1; check_one();
    x = '0; y = '0; z = '0; check_one();
    x = '1; y = '0; z = 10'h001; check_one();
    for (int n = 0; n < 1000; n++) begin
      x = W'($urandom); y = W'($urandom); z = W'($urandom);
      check_one();
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
