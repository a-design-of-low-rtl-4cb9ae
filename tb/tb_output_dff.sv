// tb_output_dff: drives random data and enables into the 10-bit output register and
// compares q after every rising edge with a model: load when en is high, hold when
// low, clear on rst. Prints one TB_RESULT line.
module tb_output_dff;
  logic       clk = 0, rst, en;
  logic [9:0] d, q, model;
  int checks = 0, failures = 0, cycles = 0;
  output_dff dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));
  always #5 clk = ~clk;
  initial begin
    rst = 1; en = 0; d = '0; model = '0;
    @(posedge clk); #1;
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      d = 10'($urandom); en = 1'($urandom); rst = ($urandom % 50) == 0;
      @(posedge clk);
      if (rst) model = '0; else if (en) model = d;
      #1;
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL cycle %0d q=%h model=%h", n, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) begin
    cycles++;
    if (cycles > 5000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
