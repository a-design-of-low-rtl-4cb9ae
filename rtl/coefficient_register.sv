// coefficient_register: holds the TAPS filter coefficients h(0)..h(TAPS-1). On a
// rising clock edge coefficient k takes data_in when load[k] is high (the control
// unit raises one strobe at a time); the others hold. A synchronous, active-high
// rst clears all coefficients. Coefficients have the width of the shared data
// input, since both the coefficients and the samples arrive on it.
module coefficient_register #(
  parameter int unsigned TAPS   = fir_pkg::TAPS_DEF,
  parameter int unsigned DATA_W = fir_pkg::DATA_W_DEF
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [DATA_W-1:0]            data_in,
  input  logic [TAPS-1:0]              load,
  output logic [TAPS-1:0][DATA_W-1:0]  coef
);
  always_ff @(posedge clk) begin
    for (int k = 0; k < TAPS; k++) begin
      if (rst)          coef[k] <= '0;
      else if (load[k]) coef[k] <= data_in;
    end
  end
endmodule
