// sample_register: the tapped delay line (the chain of z^-1 elements) of the
// direct-form filter. On a rising clock edge with shift high, data_in enters
// taps[0] and every sample moves one tap down, so after the edge
// taps[k] = x(t-k). With shift low it holds. The newest sample is itself
// registered (tap 0 is a flip-flop, as in the reference schematic), which adds one
// cycle of latency. A synchronous, active-high rst clears the line.
module sample_register #(
  parameter int unsigned TAPS   = fir_pkg::TAPS_DEF,
  parameter int unsigned DATA_W = fir_pkg::DATA_W_DEF
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [DATA_W-1:0]            data_in,
  input  logic                         shift,
  output logic [TAPS-1:0][DATA_W-1:0]  taps
);
  always_ff @(posedge clk) begin
    if (rst) begin
      taps <= '0;
    end else if (shift) begin
      taps[0] <= data_in;
      for (int k = 1; k < TAPS; k++) taps[k] <= taps[k-1];
    end
  end
endmodule
