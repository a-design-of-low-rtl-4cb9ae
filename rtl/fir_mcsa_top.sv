// fir_mcsa_top: direct-form FIR filter y(t) = sum_k h(k) * x(t-k), k = 0..TAPS-1,
// whose multipliers are shift-and-add arrays and whose tap products are summed by
// a modified carry save accumulator (carry save rows closed by a carry select
// adder of ripple carry adders).
// Coefficients and samples share data_in. With coeff_en high, one coefficient is
// written per cycle, h(0) first. With sample_en high (and coeff_en low), data_in is
// shifted into the delay line as the new x(t). The TAPS products of the updated
// line are registered on the next edge, summed and stored in the output register
// on the edge after that: data_out holds y for a sample taken at edge n from edge
// n+2 on, and data_valid is high for the one cycle after edge n+2. One sample
// can be taken every cycle; data_out holds its value between samples.
// Arithmetic is unsigned. Products keep their low PROD_W bits and the output its
// low OUT_W bits; the defaults (8-bit data, 8-bit products, 10-bit output, four
// taps) are the widths of the reference design; PROD_W = 2*DATA_W and
// OUT_W = 2*DATA_W + clog2(TAPS) give an exact filter. rst is synchronous, active high.
module fir_mcsa_top #(
  parameter int unsigned TAPS   = fir_pkg::TAPS_DEF,
  parameter int unsigned DATA_W = fir_pkg::DATA_W_DEF,
  parameter int unsigned PROD_W = fir_pkg::PROD_W_DEF,
  parameter int unsigned OUT_W  = fir_pkg::OUT_W_DEF
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] data_in,
  input  logic              coeff_en,
  input  logic              sample_en,
  output logic [OUT_W-1:0]  data_out,
  output logic              data_valid
);
  logic [TAPS-1:0]              coef_load;
  logic                         sample_shift, prod_en, out_en;
  logic [TAPS-1:0][DATA_W-1:0]  coef;
  logic [TAPS-1:0][DATA_W-1:0]  taps;
  logic [TAPS-1:0][PROD_W-1:0]  prod;

  control_unit #(.TAPS(TAPS)) u_ctrl (
    .clk(clk), .rst(rst), .coeff_en(coeff_en), .sample_en(sample_en),
    .coef_load(coef_load), .sample_shift(sample_shift),
    .prod_en(prod_en), .out_en(out_en), .data_valid(data_valid)
  );

  coefficient_register #(.TAPS(TAPS), .DATA_W(DATA_W)) u_coef (
    .clk(clk), .rst(rst), .data_in(data_in), .load(coef_load), .coef(coef)
  );

  sample_register #(.TAPS(TAPS), .DATA_W(DATA_W)) u_samp (
    .clk(clk), .rst(rst), .data_in(data_in), .shift(sample_shift), .taps(taps)
  );

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    shift_add_multiplier #(.DATA_W(DATA_W), .COEF_W(DATA_W), .PROD_W(PROD_W)) u_mul (
      .x(taps[k]), .h(coef[k]), .p(prod[k])
    );
  end

  mcsa_accumulator #(.TAPS(TAPS), .PROD_W(PROD_W), .OUT_W(OUT_W)) u_acc (
    .clk(clk), .rst(rst), .prod(prod), .prod_en(prod_en), .out_en(out_en),
    .data_out(data_out)
  );
endmodule
