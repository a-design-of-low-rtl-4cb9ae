// tb_fir_triangle9: runs the 9-tap triangular filter h = 1,2,3,4,5,4,3,2,1 (times a
// scale a) on the filter, built with 9 taps and exact widths (8-bit data, 16-bit
// products, 20-bit output) so that nothing wraps. It checks the impulse response
// (the output replays a*h), the DC gain (a constant input x gives 25*a*x once the
// line is full) and 500 random samples against a direct convolution, each exactly
// two edges after its sample, with one sample per cycle. Prints one TB_RESULT line.
module tb_fir_triangle9;
  localparam int TAPS = 9, DW = 8, PW = 16, OW = 20;
  localparam int A = 3;

  logic          clk = 0, rst, coeff_en, sample_en;
  logic [DW-1:0] data_in;
  logic [OW-1:0] data_out;
  logic          data_valid;

  fir_mcsa_top #(.TAPS(TAPS), .DATA_W(DW), .PROD_W(PW), .OUT_W(OW)) dut (
    .clk(clk), .rst(rst), .data_in(data_in), .coeff_en(coeff_en),
    .sample_en(sample_en), .data_out(data_out), .data_valid(data_valid)
  );
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int h [TAPS] = '{1, 2, 3, 4, 5, 4, 3, 2, 1};
  int x [$];          // every sample fed, newest last
  int y_exp [$];      // expected outputs, in order

  function automatic int conv(int n);
    int y = 0;
    for (int k = 0; k < TAPS; k++)
      if (n - k >= 0) y += A * h[k] * x[n-k];
    return y;
  endfunction

  // a sample is fed each cycle; outputs are compared as they become valid
  task automatic feed(int d);
    rst = 0; coeff_en = 0; sample_en = 1; data_in = DW'(d);
    x.push_back(d);
    y_exp.push_back(conv(x.size() - 1));
    @(posedge clk); #1;
    compare();
  endtask

  task automatic compare();
    if (data_valid) begin
      checks++;
      if (y_exp.size() == 0 || int'(data_out) != y_exp[0]) begin
        failures++;
        if (failures < 10) $display("FAIL y=%0d expected %0d", data_out, (y_exp.size() > 0) ? y_exp[0] : -1);
      end
      if (y_exp.size() > 0) void'(y_exp.pop_front());
    end
  endtask

  initial begin
    rst = 1; coeff_en = 0; sample_en = 0; data_in = '0;
    repeat (2) @(posedge clk);
    #1;
    rst = 0;
    for (int k = 0; k < TAPS; k++) begin
      coeff_en = 1; data_in = DW'(A * h[k]);
      @(posedge clk); #1;
    end
    coeff_en = 0;
    // impulse
    feed(1);
    for (int n = 0; n < TAPS + 2; n++) feed(0);
    // constant input: DC gain 25*A
    for (int n = 0; n < TAPS + 2; n++) feed(200);
    checks++;
    if (int'(data_out) != 25 * A * 200) begin failures++; $display("FAIL DC gain %0d", data_out); end
    // random signal, including full-scale samples
    for (int n = 0; n < 500; n++) feed((n % 37 == 0) ? 255 : int'($urandom % 256));
    sample_en = 0;
    repeat (3) begin @(posedge clk); #1; compare(); end
    checks++;
    if (y_exp.size() != 0) begin failures++; $display("FAIL %0d outputs missing", y_exp.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
