// rca: ripple carry adder of WIDTH bits (4 by default), built as a chain of full
// adders. The carry out of bit i is the carry in of bit i+1, so the sum settles
// after the carry has rippled from the least to the most significant bit.
// Interface: s + 2^WIDTH * co = a + b + ci. Purely combinational.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [WIDTH:0] c;
  assign c[0] = ci;
  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end
  assign co = c[WIDTH];
endmodule
