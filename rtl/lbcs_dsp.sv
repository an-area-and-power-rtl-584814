// lbcs_dsp: LBCS compression datapath (one channel).
//
// Computes y_k = sum_j h_{k,j} x_j for k = 0..M-1 over a window of N samples,
// with h_{k,j} = +1 or -1 given as one bit (0 = add, 1 = subtract). One
// signed add/subtract unit is shared by M accumulator registers of B_O bits:
// a counter walks k = 0..M-1 while enable is high, the multiplexer feeds
// accumulator k back to the adder (y_k) and the demultiplexer writes the
// result y'_k into accumulator k, so each sample is applied to all M
// accumulators in M consecutive cycles.
//
// Interface: x is the signed B_I-bit ADC sample, latched on x_load (the latch
// is this design's choice so the ADC need not hold its output during the
// burst). enable marks burst cycles; clear (the FSM's reset command, high
// during the first sample of a window) forces the fed-back value to zero so
// each window restarts from zero while the previous window's results stay
// readable on y until overwritten. k is the counter value, exported for
// observation. Timing: accumulator k changes at the end of the cycle in which
// the counter equals k.
module lbcs_dsp #(
  parameter int unsigned M   = lbcs_pkg::M_DEF,
  parameter int unsigned B_I = lbcs_pkg::B_I_DEF,
  parameter int unsigned B_O = lbcs_pkg::B_O_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [B_I-1:0] x,
  input  logic                  x_load,
  input  logic                  enable,
  input  logic                  clear,
  input  logic                  h,
  output logic [$clog2(M)-1:0]  k,
  output logic signed [B_O-1:0] y [M]
);
  localparam int unsigned KW = $clog2(M);

  logic signed [B_I-1:0] x_q;
  logic [KW-1:0]         cnt_q;
  logic signed [B_O-1:0] acc_q [M];
  logic signed [B_O-1:0] y_fb;     // accumulator k fed back (y_k)
  logic signed [B_O-1:0] x_ext;
  logic signed [B_O-1:0] y_new;    // adder output (y'_k)

  // Counter of the output index k.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         cnt_q <= '0;
    else if (!enable)                   cnt_q <= '0;
    else if (cnt_q == KW'(M - 1))       cnt_q <= '0;
    else                                cnt_q <= cnt_q + 1'b1;
  end

  // Input sample register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      x_q <= '0;
    else if (x_load) x_q <= x;
  end

  // Multiplexer, add/subtract unit.
  always_comb begin
    y_fb  = clear ? '0 : acc_q[cnt_q];
    x_ext = B_O'(x_q);  // sign extension
    y_new = h ? (y_fb - x_ext) : (y_fb + x_ext);
  end

  // Demultiplexer into the M accumulators.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(M); i++) acc_q[i] <= '0;
    end else if (enable) begin
      acc_q[cnt_q] <= y_new;
    end
  end

  assign k = cnt_q;
  always_comb for (int i = 0; i < int'(M); i++) y[i] = acc_q[i];
endmodule
