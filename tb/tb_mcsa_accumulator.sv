// tb_mcsa_accumulator: presents random product sets to the accumulator at its
// default size (4 products of 8 bits, 10-bit result) and to a 9-product instance,
// pulses prod_en and then out_en, and checks that data_out equals the sum of the
// products modulo 2^OUT_W exactly two edges after the products were presented,
// not earlier, and that it holds while out_en is low. Prints one TB_RESULT line.
module tb_mcsa_accumulator;
  localparam int TAPS = 4, PW = 8, OW = 10;
  localparam int T9 = 9, OW9 = 12;
  logic clk = 0, rst, prod_en, out_en;
  logic [TAPS-1:0][PW-1:0] prod;
  logic [T9-1:0][PW-1:0]   prod9;
  logic [OW-1:0]  data_out;
  logic [OW9-1:0] data_out9;
  int checks = 0, failures = 0, cycles = 0;
  int exp4, exp9, prev4;

  mcsa_accumulator dut (
    .clk(clk), .rst(rst), .prod(prod), .prod_en(prod_en), .out_en(out_en),
    .data_out(data_out)
  );
  mcsa_accumulator #(.TAPS(T9), .PROD_W(PW), .OUT_W(OW9)) dut9 (
    .clk(clk), .rst(rst), .prod(prod9), .prod_en(prod_en), .out_en(out_en),
    .data_out(data_out9)
  );
  always #5 clk = ~clk;

  initial begin
    rst = 1; prod_en = 0; out_en = 0; prod = '0; prod9 = '0;
    @(posedge clk); #1;
    rst = 0;
    checks++; if (data_out != '0) failures++;
    for (int n = 0; n < 300; n++) begin
      exp4 = 0; exp9 = 0;
      for (int k = 0; k < TAPS; k++) begin prod[k] = PW'($urandom); exp4 += prod[k]; end
      for (int k = 0; k < T9; k++) begin prod9[k] = (n % 10 == 0) ? '1 : PW'($urandom); exp9 += prod9[k]; end
      exp4 %= (1 << OW); exp9 %= (1 << OW9);
      prev4 = data_out;
      prod_en = 1;
      @(posedge clk); #1;
      prod_en = 0; out_en = 1;
      prod = '0; prod9 = '0;            // the register must have kept the products
      checks++;
      if (data_out != OW'(prev4)) begin failures++; $display("FAIL early update at %0d", n); end
      @(posedge clk); #1;
      out_en = 0;
      checks += 2;
      if (data_out != OW'(exp4)) begin failures++; $display("FAIL sum4 %0d exp %0d", data_out, exp4); end
      if (data_out9 != OW9'(exp9)) begin failures++; $display("FAIL sum9 %0d exp %0d", data_out9, exp9); end
      @(posedge clk); #1;
      checks++;
      if (data_out != OW'(exp4)) begin failures++; $display("FAIL hold at %0d", n); end
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
