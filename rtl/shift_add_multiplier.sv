// shift_add_multiplier: multiplier made only of adders. The sample x, shifted left
// by i, is added into a running partial product when coefficient bit h[i] is set;
// one PROD_W-bit ripple carry adder per coefficient bit does the additions, in
// coefficient-bit order. Replacing the multiplier by aligned additions is the idea
// of the design; this particular array is the simplest that does it.
// Interface: p = (x * h) mod 2^PROD_W, unsigned. With PROD_W = DATA_W + COEF_W the
// product is exact; the default keeps the low 8 bits, the width of the tap
// products in the reference design. Purely combinational.
module shift_add_multiplier #(
  parameter int unsigned DATA_W = fir_pkg::DATA_W_DEF,
  parameter int unsigned COEF_W = fir_pkg::DATA_W_DEF,
  parameter int unsigned PROD_W = fir_pkg::PROD_W_DEF
) (
  input  logic [DATA_W-1:0] x,
  input  logic [COEF_W-1:0] h,
  output logic [PROD_W-1:0] p
);
  // x widened (or cut) to the product width
  localparam int unsigned XW = (DATA_W < PROD_W) ? DATA_W : PROD_W;
  logic [PROD_W-1:0] xw;
  always_comb begin
    xw = '0;
    xw[XW-1:0] = x[XW-1:0];
  end

  // acc[i] is the partial product after coefficient bits 0..i-1
  logic [PROD_W-1:0] acc [COEF_W+1];
  assign acc[0] = '0;

  for (genvar i = 0; i < COEF_W; i++) begin : g_row
    logic [PROD_W-1:0] addend;
    logic              unused_co;
    // aligned operand: x << i, gated by the coefficient bit
    assign addend = h[i] ? (xw << i) : '0;
    rca #(.WIDTH(PROD_W)) u_rca (
      .a(acc[i]), .b(addend), .ci(1'b0), .s(acc[i+1]), .co(unused_co)
    );
  end

  assign p = acc[COEF_W];
endmodule
