// tb_coefficient_register: writes random values with random one-hot (and
// sometimes empty) load strobes and compares all coefficients after every edge
// with a model; also checks that rst clears them. Prints one TB_RESULT line.
module tb_coefficient_register;
  localparam int TAPS = 4, W = 8;
  logic clk = 0, rst;
  logic [W-1:0] data_in;
  logic [TAPS-1:0] load;
  logic [TAPS-1:0][W-1:0] coef, model;
  int checks = 0, failures = 0, cycles = 0;
  coefficient_register #(.TAPS(TAPS), .DATA_W(W)) dut (
    .clk(clk), .rst(rst), .data_in(data_in), .load(load), .coef(coef)
  );
  always #5 clk = ~clk;
  initial begin
    rst = 1; load = '0; data_in = '0;
    @(posedge clk); #1;
    rst = 0; model = '0;
    checks++; if (coef != '0) failures++;
    for (int n = 0; n < 300; n++) begin
      data_in = W'($urandom);
      load = (($urandom % 5) == 0) ? '0 : TAPS'(1 << ($urandom % TAPS));
      rst = ($urandom % 60) == 0;
      @(posedge clk);
      for (int k = 0; k < TAPS; k++)
        if (rst) model[k] = '0; else if (load[k]) model[k] = data_in;
      #1;
      checks++;
      if (coef != model) begin
        failures++;
        $display("FAIL cycle %0d coef=%h model=%h", n, coef, model);
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
