// full_adder: one-bit full adder, the cell of every ripple carry adder in the filter.
// It is written with the generate (g = a & b) and propagate (p = a ^ b) terms:
// s = p ^ ci, co = g | (p & ci). Purely combinational; no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic g, p;
  always_comb begin
    g  = a & b;
    p  = a ^ b;
    s  = p ^ ci;
    co = g | (p & ci);
  end
endmodule
