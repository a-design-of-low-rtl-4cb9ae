// mcsa_adder: the adder of the modified carry save accumulator, a carry select
// adder made of ripple carry adders. The low BLOCK bits are added by one ripple
// carry adder that gets the real carry in (RCAin). Every higher block is added
// twice at once, by one ripple carry adder whose carry in is tied to 0 (RCA0) and
// one tied to 1 (RCA1); a multiplexer then picks the sum and carry of one of them
// with the carry that leaves the block below. The carry thus crosses each upper
// block through one multiplexer instead of BLOCK full adders.
// At the default WIDTH = 8 this is exactly one RCAin block (bits 3:0) and one
// selected block (bits 7:4). Wider adders chain more selected blocks, each chosen
// by the carry of the block below; the top block may be narrower than BLOCK
// (this generalisation is this design's own).
// Interface: dataout + 2^WIDTH * co = x1 + x2 + ci. Purely combinational.
module mcsa_adder #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned BLOCK = fir_pkg::BLOCK_W
) (
  input  logic [WIDTH-1:0] x1,
  input  logic [WIDTH-1:0] x2,
  input  logic             ci,
  output logic [WIDTH-1:0] dataout,
  output logic             co
);
  localparam int unsigned NB = (WIDTH + BLOCK - 1) / BLOCK;

  // bc[b] is the carry into block b
  logic [NB:0] bc;
  assign bc[0] = ci;

  for (genvar b = 0; b < NB; b++) begin : g_blk
    localparam int unsigned LO = b * BLOCK;
    localparam int unsigned BW = (WIDTH - LO < BLOCK) ? (WIDTH - LO) : BLOCK;
    if (b == 0) begin : g_in
      rca #(.WIDTH(BW)) u_rca_in (
        .a(x1[LO +: BW]), .b(x2[LO +: BW]), .ci(bc[0]),
        .s(dataout[LO +: BW]), .co(bc[1])
      );
    end else begin : g_sel
      logic [BW-1:0] s0, s1;
      logic          c0, c1;
      rca #(.WIDTH(BW)) u_rca0 (
        .a(x1[LO +: BW]), .b(x2[LO +: BW]), .ci(1'b0), .s(s0), .co(c0)
      );
      rca #(.WIDTH(BW)) u_rca1 (
        .a(x1[LO +: BW]), .b(x2[LO +: BW]), .ci(1'b1), .s(s1), .co(c1)
      );
      assign dataout[LO +: BW] = bc[b] ? s1 : s0;
      assign bc[b+1]           = bc[b] ? c1 : c0;
    end
  end

  assign co = bc[NB];
endmodule
