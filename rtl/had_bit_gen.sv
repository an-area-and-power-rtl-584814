// had_bit_gen: on-the-fly Walsh-Hadamard entry generator.
//
// The natural-order (Sylvester) Hadamard matrix of size N = 2^n has entry
// (-1)^(sum_i w_i * j_i) at row w, column j. Mapping +1 to 0 and -1 to 1, the
// entry is the parity of the bitwise AND of the two indices: one AND gate per
// index bit and an XOR tree. That is what this block computes, so no
// coefficient memory is needed.
//
// Interface: row (log2 N bits), col (log2 N bits) -> h (1 bit, 1 = subtract).
// Timing: purely combinational.
module had_bit_gen #(
  parameter int unsigned N = lbcs_pkg::N_DEF
) (
  input  logic [$clog2(N)-1:0] row,  // Hadamard row index w(k)
  input  logic [$clog2(N)-1:0] col,  // Hadamard column index (sample index j)
  output logic                 h     // 0 = +1 (add), 1 = -1 (subtract)
);
  always_comb h = ^(row & col);
endmodule
