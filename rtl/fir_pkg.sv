// fir_pkg: sizes shared by the block FIR filter.
//
// The filter has N taps and is split into M inner product units (IPUs), each
// handling L = N/M consecutive taps; L is also the block size, i.e. the number
// of input samples taken and output samples produced per clock. The defaults
// N = 32 and M = 4 and the widths of the sample (32 bit), coefficient (4 bit)
// and output (32 bit) buses are the values of the reference design's
// simulation; L = 8 follows from them. Samples and coefficients are signed
// two's complement, a choice of this design. Outputs are kept to Y_W bits,
// i.e. the sum is exact modulo 2**Y_W.
package fir_pkg;
  localparam int unsigned N_DEF   = 32;  // filter taps
  localparam int unsigned M_DEF   = 4;   // inner product units
  localparam int unsigned L_DEF   = N_DEF / M_DEF;  // block size
  localparam int unsigned X_W_DEF = 32;  // input sample width
  localparam int unsigned H_W_DEF = 4;   // coefficient width
  localparam int unsigned Y_W_DEF = 32;  // output / accumulator width
endpackage
