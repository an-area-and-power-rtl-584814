// lbcs_pkg: sizes shared by the Hadamard LBCS encoder.
//
// The main configuration compresses windows of N = 64 samples at a compression
// rate CR = 8, so M = N / CR = 8 Hadamard rows are kept per window. The ADC
// resolution B_I is not fixed by the design description; 10 bits is this
// design's choice. The accumulator width B_O = B_I + log2(N) is the smallest
// width that holds every Hadamard row sum without overflow: row 0 sums N
// samples (range [-N*2^(B_I-1), N*(2^(B_I-1)-1)]) and every other row adds N/2
// samples and subtracts N/2, which stays inside the same range.
package lbcs_pkg;
  localparam int unsigned N_DEF   = 64;  // sampling window length
  localparam int unsigned CR_DEF  = 8;   // compression rate N/M
  localparam int unsigned M_DEF   = N_DEF / CR_DEF;  // kept Hadamard rows
  localparam int unsigned B_I_DEF = 10;  // ADC sample width (signed)
  localparam int unsigned B_O_DEF = B_I_DEF + $clog2(N_DEF);  // accumulator width
endpackage
