// lbcs_encoder: one-channel Hadamard LBCS encoder with on-the-fly coefficients.
//
// Compresses a neuronal signal by Learning-Based Compressive Subsampling:
// every window of N ADC samples x_j is projected onto M = N/CR learnt rows of
// the N x N Walsh-Hadamard matrix, y_k = sum_j h_{w(k),j} x_j. The rows are
// never stored; only their indices w(k) are, in the Row-Index LuT, and each
// entry h is computed from w(k) and j by an AND/XOR parity.
//
// Structure: lbcs_fsm (calibration and sequencing) -> had_block (LuT and
// Hadamard bit generator) -> lbcs_dsp (add/subtract unit and M accumulators).
// The sampling clock is M times slower than clk: each sample takes M cycles.
//
// Interface:
//   pr_en, row_idx      calibration: with pr_en high, one row index per cycle,
//                       for k = 0..M-1; programmed goes high after M of them.
//   x, x_valid, x_ready signed B_I-bit samples, accepted when both are high;
//                       back-to-back every M cycles at most.
//   y[M], y_valid       the M signed B_O-bit coefficients; valid in the cycle
//                       y_valid is high, M+1 cycles after the window's last
//                       accepted sample, and held until the first sample of
//                       the next window is processed.
// N = 64 and CR = 8 are the main configuration; B_I and the handshake are
// this design's choices (see lbcs_pkg and lbcs_fsm).
module lbcs_encoder #(
  parameter int unsigned N   = lbcs_pkg::N_DEF,
  parameter int unsigned CR  = lbcs_pkg::CR_DEF,
  parameter int unsigned B_I = lbcs_pkg::B_I_DEF,
  parameter int unsigned B_O = B_I + $clog2(N),
  localparam int unsigned M  = N / CR
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  pr_en,
  input  logic [$clog2(N)-1:0]  row_idx,
  output logic                  programmed,
  input  logic signed [B_I-1:0] x,
  input  logic                  x_valid,
  output logic                  x_ready,
  output logic signed [B_O-1:0] y [M],
  output logic                  y_valid
);
  logic                 lut_we, x_load, enable, clear, h;
  logic [$clog2(N)-1:0] lut_row_idx, j;
  logic [$clog2(M)-1:0] k_fsm, k_dsp;

  lbcs_fsm #(.N(N), .M(M)) u_fsm (
    .clk, .rst_n,
    .pr_en, .row_idx,
    .x_valid, .x_ready, .x_load,
    .lut_we, .lut_row_idx, .k(k_fsm), .j,
    .enable, .clear,
    .programmed, .y_valid
  );

  had_block #(.N(N), .M(M)) u_had (
    .clk, .rst_n,
    .pr_en(lut_we), .row_idx(lut_row_idx), .k(k_fsm), .j, .h
  );

  lbcs_dsp #(.M(M), .B_I(B_I), .B_O(B_O)) u_dsp (
    .clk, .rst_n,
    .x, .x_load, .enable, .clear, .h,
    .k(k_dsp), .y
  );

  // The FSM's k (LuT address) and the DSP's own counter stay in step.
  a_k_sync: assert property (@(posedge clk) disable iff (!rst_n)
    enable |-> k_fsm == k_dsp);
endmodule
