// lbcs_fsm: controller of the Hadamard LBCS encoder.
//
// Two jobs. Calibration: while pr_en is high the FSM takes one learnt row index
// from row_idx per clock and writes it into the Row-Index LuT at address
// k = 0, 1, ..., M-1 (lut_we, lut_row_idx, k). After M writes the encoder is
// programmed; further cycles of pr_en are ignored, and dropping pr_en ends
// calibration. Dropping pr_en before M writes leaves the encoder unprogrammed.
// The row index reaches the LuT through the FSM (lut_row_idx is row_idx
// passed straight through), as in the encoder's block diagram.
//
// Encoding: the encoder clock runs M times faster than the sample rate. Each
// accepted sample (x_valid while x_ready) is latched by the DSP (x_load) and
// processed in a burst of M cycles with enable high and k = 0..M-1, one
// accumulator per cycle, with j the sample's index in the window of N. During
// the bursts of sample j = 0 the DSP reset command (clear) is high: the
// accumulators restart from zero instead of adding to last window's result.
// y_valid pulses for one cycle right after the last burst of a window, when all
// M accumulators hold the finished coefficients.
//
// Timing: x_ready is high, once programmed, when idle and in the last cycle
// of a burst (never while pr_en is high), so
// samples may arrive back to back every M cycles. A sample accepted at cycle t
// is processed in cycles t+1..t+M; the window's y_valid comes at cycle t+M+1
// after its last sample. Raising pr_en aborts any window and restarts at j = 0.
// The handshake, the one-index-per-cycle calibration protocol and the
// zero-restart form of the reset are this design's own choices.
module lbcs_fsm #(
  parameter int unsigned N = lbcs_pkg::N_DEF,
  parameter int unsigned M = lbcs_pkg::M_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // calibration input
  input  logic                  pr_en,        // program enable
  input  logic [$clog2(N)-1:0]  row_idx,      // learnt Hadamard row index
  // sample handshake with the ADC
  input  logic                  x_valid,
  output logic                  x_ready,
  output logic                  x_load,       // DSP input register load
  // Had-block control
  output logic                  lut_we,
  output logic [$clog2(N)-1:0]  lut_row_idx,
  output logic [$clog2(M)-1:0]  k,
  output logic [$clog2(N)-1:0]  j,
  // DSP control
  output logic                  enable,
  output logic                  clear,        // accumulator reset command
  // status
  output logic                  programmed,
  output logic                  y_valid
);
  typedef enum logic [1:0] {
    ST_IDLE,   // waiting for a sample (or for calibration)
    ST_PROG,   // calibration
    ST_BURST   // processing one sample over M cycles
  } state_e;

  localparam int unsigned KW = $clog2(M);
  localparam int unsigned JW = $clog2(N);

  state_e        state_q;
  logic [KW:0]   prog_cnt_q;  // one bit wider than k to count up to M
  logic [KW-1:0] k_q;
  logic [JW-1:0] j_q;
  logic          last_k;

  assign last_k      = (k_q == KW'(M - 1));
  assign lut_we      = pr_en && (prog_cnt_q < (KW + 1)'(M));
  assign lut_row_idx = row_idx;
  assign k           = pr_en ? prog_cnt_q[KW-1:0] : k_q;
  assign j           = j_q;
  assign x_ready     = !pr_en && programmed && (state_q != ST_BURST || last_k);
  assign x_load      = x_valid && x_ready;
  assign enable      = (state_q == ST_BURST) && !pr_en;
  assign clear       = enable && (j_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= ST_IDLE;
      prog_cnt_q <= '0;
      k_q        <= '0;
      j_q        <= '0;
      programmed <= 1'b0;
      y_valid    <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (pr_en) begin
        state_q <= ST_PROG;
        k_q     <= '0;
        j_q     <= '0;
        if (lut_we) begin
          prog_cnt_q <= prog_cnt_q + 1'b1;
          programmed <= (prog_cnt_q == (KW + 1)'(M - 1));
        end
      end else begin
        prog_cnt_q <= '0;
        unique case (state_q)
          ST_IDLE, ST_PROG: state_q <= x_load ? ST_BURST : ST_IDLE;
          ST_BURST: begin
            if (last_k) begin
              k_q     <= '0;
              j_q     <= (j_q == JW'(N - 1)) ? '0 : j_q + 1'b1;
              y_valid <= (j_q == JW'(N - 1));
              if (!x_load) state_q <= ST_IDLE;
            end else begin
              k_q <= k_q + 1'b1;
            end
          end
          default: state_q <= ST_IDLE;
        endcase
      end
    end
  end

  // A burst never starts on an unprogrammed encoder.
  a_burst_programmed: assert property (@(posedge clk) disable iff (!rst_n)
    enable |-> programmed);
  // The LuT is written only during calibration.
  a_we_only_prog: assert property (@(posedge clk) disable iff (!rst_n)
    lut_we |-> pr_en && !enable);
endmodule
