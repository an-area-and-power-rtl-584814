// had_block: Hadamard bit-stream source of the LBCS encoder.
//
// Replaces a stored Hadamard matrix: the Row-Index LuT maps the output index k
// to the learnt row w(k), and the Hadamard bit generator turns w(k) and the
// sample index j into h_{k,j} = h_{w(k),j}. Only the M selected rows are ever
// produced. Programming port (we, k, row_idx) writes the LuT; the encoding
// port (k, j) gives h combinationally from the registered LuT contents.
module had_block #(
  parameter int unsigned N = lbcs_pkg::N_DEF,
  parameter int unsigned M = lbcs_pkg::M_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  pr_en,    // LuT write enable (from the FSM)
  input  logic [$clog2(N)-1:0]  row_idx,  // learnt row index to store
  input  logic [$clog2(M)-1:0]  k,        // LuT address: write and read
  input  logic [$clog2(N)-1:0]  j,        // column index = sample index in window
  output logic                  h         // h_{k,j}, 1 = subtract
);
  logic [$clog2(N)-1:0] w_k;

  row_index_lut #(.N(N), .M(M)) u_lut (
    .clk, .rst_n,
    .we(pr_en), .waddr(k), .wdata(row_idx),
    .raddr(k), .rdata(w_k)
  );

  had_bit_gen #(.N(N)) u_gen (.row(w_k), .col(j), .h);
endmodule
