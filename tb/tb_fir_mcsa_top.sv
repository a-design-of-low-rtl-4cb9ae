// tb_fir_mcsa_top: end-to-end test of the FIR filter at its default size (4 taps,
// 8-bit data, 8-bit products, 10-bit output), with no parameter overrides.
// A cycle-accurate reference model keeps its own coefficients and sample history,
// computes y = sum_k (h(k) * x(t-k) mod 2^8) for every sample taken, and expects it
// on data_out exactly two edges after the sample edge, with data_valid high in the
// following cycle; data_out must hold in between. The stimulus:
//   1. reset, load four coefficients, feed an impulse (the output must replay the
//      coefficients), then a step;
//   2. back-to-back random samples at one per cycle;
//   3. random traffic: idle cycles, coefficient reloads in mid-stream, cycles with
//      both enables high (the coefficient load wins), and resets.
// Each mechanism is counted and must occur at least once. Prints one TB_RESULT line.
module tb_fir_mcsa_top;
  localparam int TAPS = 4, DW = 8, PW = 8, OW = 10;

  logic          clk = 0, rst, coeff_en, sample_en;
  logic [DW-1:0] data_in;
  logic [OW-1:0] data_out;
  logic          data_valid;

  fir_mcsa_top dut (
    .clk(clk), .rst(rst), .data_in(data_in), .coeff_en(coeff_en),
    .sample_en(sample_en), .data_out(data_out), .data_valid(data_valid)
  );
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  // model state
  int m_coef [TAPS];
  int m_hist [TAPS];
  int m_idx;
  int p0, p1, m_out;
  bit p0v, p1v, m_valid;
  int n_samples_since_load;
  // mechanism counters
  int n_coef_load = 0, n_sample = 0, n_back_to_back = 0, n_idle = 0;
  int n_reload = 0, n_conflict = 0, n_reset = 0, n_prod_wrap = 0, n_outputs = 0;
  bit last_taken = 0;

  function automatic int model_y();
    int y = 0;
    for (int k = 0; k < TAPS; k++) begin
      int p = m_coef[k] * m_hist[k];
      if (p >= (1 << PW)) n_prod_wrap++;
      y += p % (1 << PW);
    end
    return y % (1 << OW);
  endfunction

  task automatic model_reset();
    for (int k = 0; k < TAPS; k++) begin m_coef[k] = 0; m_hist[k] = 0; end
    m_idx = 0; p0v = 0; p1v = 0; m_out = 0; m_valid = 0; p0 = 0; p1 = 0;
    n_samples_since_load = 0;
  endtask

  // one clock cycle with the given inputs; the model follows the same edge
  task automatic step(bit r, bit ce, bit se, int d);
    bit taken;
    rst = r; coeff_en = ce; sample_en = se; data_in = DW'(d);
    @(posedge clk);
    cycles++;
    taken = se && !ce && !r;
    if (r) begin
      model_reset();
      n_reset++;
    end else begin
      m_valid = p1v;
      if (p1v) m_out = p1;
      p1v = p0v; p1 = p0;
      if (ce) begin
        m_coef[m_idx] = d % (1 << DW);
        m_idx = (m_idx + 1) % TAPS;
        n_coef_load++;
        if (n_samples_since_load > 0) n_reload++;
        n_samples_since_load = 0;
        if (se) n_conflict++;
      end else if (se) begin
        for (int k = TAPS - 1; k > 0; k--) m_hist[k] = m_hist[k-1];
        m_hist[0] = d % (1 << DW);
        n_sample++;
        n_samples_since_load++;
        if (last_taken) n_back_to_back++;
      end else begin
        n_idle++;
      end
      p0v = taken;
      if (taken) p0 = model_y();
    end
    last_taken = taken;
    #1;
    checks++;
    if (data_out != OW'(m_out) || data_valid != m_valid) begin
      failures++;
      if (failures < 20)
        $display("FAIL cycle %0d: data_out=%0d valid=%0b, expected %0d valid=%0b",
                 cycles, data_out, data_valid, m_out, m_valid);
    end
    if (data_valid) n_outputs++;
  endtask

  int h [TAPS] = '{3, 5, 7, 2};
  int y_seen [$];

  initial begin
    model_reset();
    // 1. reset, coefficients, impulse and step
    step(1, 0, 0, 0);
    step(1, 0, 0, 0);
    for (int k = 0; k < TAPS; k++) step(0, 1, 0, h[k]);
    step(0, 0, 1, 1);
    for (int n = 0; n < TAPS + 3; n++) begin
      step(0, 0, 1, 0);
      if (data_valid) y_seen.push_back(int'(data_out));
    end
    // impulse response = coefficients (first valid output is the impulse itself)
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (k >= y_seen.size() || y_seen[k] != h[k]) begin
        failures++;
        $display("FAIL impulse response tap %0d", k);
      end
    end
    for (int n = 0; n < 8; n++) step(0, 0, 1, 1);
    checks++;
    if (data_out != OW'(3 + 5 + 7 + 2)) begin failures++; $display("FAIL step response %0d", data_out); end
    // 2. back-to-back random samples with large coefficients
    for (int k = 0; k < TAPS; k++) step(0, 1, 0, 200 + k * 13);
    for (int n = 0; n < 200; n++) step(0, 0, 1, int'($urandom % 256));
    // 3. random traffic
    for (int n = 0; n < 3000; n++) begin
      int r;
      r = int'($urandom % 100);
      if (r < 1)       step(1, 0, 0, 0);
      else if (r < 6)  step(0, 1, 0, int'($urandom % 256));
      else if (r < 8)  step(0, 1, 1, int'($urandom % 256));
      else if (r < 30) step(0, 0, 0, int'($urandom % 256));
      else             step(0, 0, 1, int'($urandom % 256));
    end
    for (int n = 0; n < 4; n++) step(0, 0, 0, 0);

    $display("coef loads=%0d samples=%0d back-to-back=%0d idle=%0d reloads=%0d both-enables=%0d resets=%0d product-wraps=%0d outputs=%0d",
             n_coef_load, n_sample, n_back_to_back, n_idle, n_reload, n_conflict, n_reset, n_prod_wrap, n_outputs);
    if (n_coef_load == 0)    begin failures++; $display("FAIL no coefficient load"); end
    if (n_sample == 0)       begin failures++; $display("FAIL no sample"); end
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back samples"); end
    if (n_idle == 0)         begin failures++; $display("FAIL no idle cycle"); end
    if (n_reload == 0)       begin failures++; $display("FAIL no coefficient reload"); end
    if (n_conflict == 0)     begin failures++; $display("FAIL no enable conflict"); end
    if (n_reset < 3)         begin failures++; $display("FAIL no reset in traffic"); end
    if (n_prod_wrap == 0)    begin failures++; $display("FAIL no product wrap"); end
    if (n_outputs == 0)      begin failures++; $display("FAIL no output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
