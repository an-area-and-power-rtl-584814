// row_index_lut: Row-Index look-up table of the Had-block.
//
// Holds the M learnt Hadamard row indices w(k), k = 0..M-1, that form the
// subsampling map of the LBCS encoder. It is a small register file: one write
// port used during calibration (we, waddr = k, wdata = RowIDX) and one
// asynchronous read port addressed by the output index k during encoding.
// Entries reset to zero; an index written in a cycle is readable from the next
// cycle on. Using flip-flops rather than a memory macro, and the reset value,
// are this design's choices.
module row_index_lut #(
  parameter int unsigned N = lbcs_pkg::N_DEF,
  parameter int unsigned M = lbcs_pkg::M_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  we,     // program enable from the FSM
  input  logic [$clog2(M)-1:0]  waddr,  // k during programming
  input  logic [$clog2(N)-1:0]  wdata,  // RowIDX
  input  logic [$clog2(M)-1:0]  raddr,  // k during encoding
  output logic [$clog2(N)-1:0]  rdata   // w(k)
);
  logic [$clog2(N)-1:0] mem [M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(M); i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb rdata = mem[raddr];
endmodule
