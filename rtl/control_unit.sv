// control_unit: sequences the filter from the two enables on the shared data input.
// coeff_en high: coef_load is the one-hot strobe of the coefficient at index idx,
//   and idx advances (wrapping after TAPS-1), so TAPS cycles with coeff_en load
//   h(0)..h(TAPS-1) in order. coeff_en has priority: no sample is taken meanwhile.
// sample_en high (coeff_en low): sample_shift is high in the same cycle, so the
//   delay line takes data_in at the next edge.
// The pipeline enables follow a taken sample: prod_en one cycle later (product
// register), out_en two cycles later (output register) and data_valid three
// cycles later, i.e. in the cycle in which data_out shows the new result.
// rst is synchronous and active high; it restarts the coefficient index and clears
// the pipeline enables. The load order and the priority are this design's choices.
module control_unit #(
  parameter int unsigned TAPS = fir_pkg::TAPS_DEF
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            coeff_en,
  input  logic            sample_en,
  output logic [TAPS-1:0] coef_load,
  output logic            sample_shift,
  output logic            prod_en,
  output logic            out_en,
  output logic            data_valid
);
  localparam int unsigned IW = (TAPS > 1) ? $clog2(TAPS) : 1;
  logic [IW-1:0] idx;

  always_comb begin
    coef_load = '0;
    if (coeff_en) coef_load[idx] = 1'b1;
    sample_shift = sample_en & ~coeff_en;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx        <= '0;
      prod_en    <= 1'b0;
      out_en     <= 1'b0;
      data_valid <= 1'b0;
    end else begin
      if (coeff_en) idx <= (idx == IW'(TAPS - 1)) ? '0 : idx + 1'b1;
      prod_en    <= sample_shift;
      out_en     <= prod_en;
      data_valid <= out_en;
    end
  end
endmodule
