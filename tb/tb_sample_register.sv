// tb_sample_register: shifts random samples into the delay line with a random
// shift enable and checks after every edge that taps[k] holds the k-th most
// recent sample taken (zero before that many samples), and that rst clears the
// line. Prints one TB_RESULT line.
module tb_sample_register;
  localparam int TAPS = 4, W = 8;
  logic clk = 0, rst, shift;
  logic [W-1:0] data_in;
  logic [TAPS-1:0][W-1:0] taps;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0, cycles = 0;
  sample_register #(.TAPS(TAPS), .DATA_W(W)) dut (
    .clk(clk), .rst(rst), .data_in(data_in), .shift(shift), .taps(taps)
  );
  always #5 clk = ~clk;
  initial begin
    rst = 1; shift = 0; data_in = '0;
    @(posedge clk); #1;
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      data_in = W'($urandom);
      shift = 1'($urandom);
      rst = (n == 150);
      @(posedge clk);
      if (rst) hist.delete();
      else if (shift) hist.push_front(data_in);
      #1;
      for (int k = 0; k < TAPS; k++) begin
        checks++;
        if (taps[k] != ((k < hist.size()) ? hist[k] : W'(0))) begin
          failures++;
          $display("FAIL cycle %0d tap %0d = %h", n, k, taps[k]);
        end
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
