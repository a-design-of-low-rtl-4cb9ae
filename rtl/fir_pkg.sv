// fir_pkg: default sizes shared by the FIR filter with the modified carry save
// accumulator. The filter has four taps, 8-bit samples and coefficients, 8-bit tap
// products and a 10-bit output, the widths of the reference simulation of the
// design. BLOCK_W is the width of one ripple carry adder block inside the carry
// select stage. All arithmetic is unsigned.
package fir_pkg;
  localparam int unsigned TAPS_DEF   = 4;
  localparam int unsigned DATA_W_DEF = 8;
  localparam int unsigned PROD_W_DEF = 8;
  localparam int unsigned OUT_W_DEF  = 10;
  localparam int unsigned BLOCK_W    = 4;
endpackage
