// output_dff: the D flip-flop register that stores the filter output. On a rising
// clock edge it loads d when en is high and holds otherwise; a synchronous,
// active-high rst clears it. q changes one clock edge after en and d are presented.
module output_dff #(
  parameter int unsigned WIDTH = fir_pkg::OUT_W_DEF
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end
endmodule
