// carry_save_adder: one carry save (3:2) row. WIDTH independent full adders reduce
// three operands x, y, z to a partial sum vector s and a carry vector c with
// x + y + z = s + c (mod 2^WIDTH). No carry travels along the row: the carry of
// bit i is handed to bit i+1 of the c output, which is therefore already shifted
// one place up (c[0] = 0). The carry leaving the top bit is dropped, so the row
// works modulo 2^WIDTH. The final carry-propagate addition of s and c is left to
// the caller. Purely combinational.
module carry_save_adder #(
  parameter int unsigned WIDTH = fir_pkg::OUT_W_DEF
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] c
);
  logic [WIDTH:0] cw;
  assign cw[0] = 1'b0;
  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (.a(x[i]), .b(y[i]), .ci(z[i]), .s(s[i]), .co(cw[i+1]));
  end
  assign c = cw[WIDTH-1:0];
endmodule
