// mcsa_accumulator: the modified carry save accumulator that sums the tap products.
// Stage 1: a row of D flip-flops stores the TAPS products when prod_en is high.
// Stage 2 (combinational): the registered products, widened to OUT_W bits, are
// reduced to one sum vector and one carry vector by TAPS-2 carry save rows (row k
// folds product k into the running pair, no carry chain inside a row); the pair is
// then added once by the carry select adder built of ripple carry adders
// (mcsa_adder). The result is stored in the output D flip-flop when out_en is high.
// Timing: data_out holds sum(prod) two clock edges after prod is presented, when
// prod_en is high at the first edge and out_en at the second. Sums wrap modulo
// 2^OUT_W. Registering the products first and using a carry select final adder
// follow the reference design; the reduction order is this design's own choice.
// rst is synchronous and active high.
module mcsa_accumulator #(
  parameter int unsigned TAPS   = fir_pkg::TAPS_DEF,
  parameter int unsigned PROD_W = fir_pkg::PROD_W_DEF,
  parameter int unsigned OUT_W  = fir_pkg::OUT_W_DEF
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [TAPS-1:0][PROD_W-1:0]  prod,
  input  logic                         prod_en,
  input  logic                         out_en,
  output logic [OUT_W-1:0]             data_out
);
  // product register (the DFF row in front of the adders)
  logic [TAPS-1:0][PROD_W-1:0] prod_q;
  always_ff @(posedge clk) begin
    if (rst)          prod_q <= '0;
    else if (prod_en) prod_q <= prod;
  end

  logic [OUT_W-1:0] pe [TAPS];
  always_comb begin
    for (int k = 0; k < TAPS; k++) pe[k] = OUT_W'(prod_q[k]);
  end

  // running sum / carry pair after product k
  logic [OUT_W-1:0] sv [TAPS];
  logic [OUT_W-1:0] cv [TAPS];

  if (TAPS == 1) begin : g_one
    assign sv[0] = pe[0];
    assign cv[0] = '0;
  end else begin : g_many
    assign sv[0] = '0;
    assign cv[0] = '0;
    assign sv[1] = pe[0];
    assign cv[1] = pe[1];
    for (genvar k = 2; k < TAPS; k++) begin : g_row
      carry_save_adder #(.WIDTH(OUT_W)) u_csa (
        .x(sv[k-1]), .y(cv[k-1]), .z(pe[k]), .s(sv[k]), .c(cv[k])
      );
    end
  end

  logic [OUT_W-1:0] sum;
  logic             unused_co;
  mcsa_adder #(.WIDTH(OUT_W)) u_add (
    .x1(sv[TAPS-1]), .x2(cv[TAPS-1]), .ci(1'b0), .dataout(sum), .co(unused_co)
  );

  output_dff #(.WIDTH(OUT_W)) u_dff (
    .clk(clk), .rst(rst), .en(out_en), .d(sum), .q(data_out)
  );
endmodule
