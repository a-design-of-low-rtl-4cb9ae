// tb_control_unit: drives random coeff_en / sample_en patterns into the control unit
// and compares every output with a model: coef_load is the one-hot strobe of a
// wrapping index that advances on each coeff_en cycle, coeff_en has priority over
// sample_en, and prod_en / out_en / data_valid follow a taken sample by exactly
// 1 / 2 / 3 cycles. Prints one TB_RESULT line.
module tb_control_unit;
  localparam int TAPS = 4;
  logic clk = 0, rst, coeff_en, sample_en;
  logic [TAPS-1:0] coef_load;
  logic sample_shift, prod_en, out_en, data_valid;
  int checks = 0, failures = 0, cycles = 0;
  int idx;
  logic [2:0] pipe;   // model of the three enable stages

  control_unit #(.TAPS(TAPS)) dut (
    .clk(clk), .rst(rst), .coeff_en(coeff_en), .sample_en(sample_en),
    .coef_load(coef_load), .sample_shift(sample_shift),
    .prod_en(prod_en), .out_en(out_en), .data_valid(data_valid)
  );
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  initial begin
    rst = 1; coeff_en = 0; sample_en = 0;
    @(posedge clk); #1;
    rst = 0; idx = 0; pipe = '0;
    for (int n = 0; n < 400; n++) begin
      coeff_en  = ($urandom % 3) == 0;
      sample_en = 1'($urandom);
      #1;
      check("coef_load", coef_load == (coeff_en ? TAPS'(1 << idx) : '0));
      check("sample_shift", sample_shift == (sample_en && !coeff_en));
      check("prod_en", prod_en == pipe[0]);
      check("out_en", out_en == pipe[1]);
      check("data_valid", data_valid == pipe[2]);
      @(posedge clk);
      pipe = {pipe[1:0], sample_en && !coeff_en};
      if (coeff_en) idx = (idx + 1) % TAPS;
      #1;
    end
    // reset restarts the index
    rst = 1; coeff_en = 0; sample_en = 0;
    @(posedge clk); #1;
    rst = 0; coeff_en = 1;
    #1;
    check("index after reset", coef_load == TAPS'(1));
    check("pipe cleared", {data_valid, out_en, prod_en} == 3'b000);
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
