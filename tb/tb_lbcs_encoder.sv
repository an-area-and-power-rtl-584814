// tb_lbcs_encoder: end-to-end test of the one-channel LBCS encoder at its
// default size (N = 64, CR = 8, M = 8, 10-bit samples, 16-bit coefficients).
//
// The reference is computed independently of the design: the Hadamard matrix
// is built by the Kronecker recursion, and for every window the coefficients
// y_k = sum_j H[w(k)][j] x_j are summed in integers from the samples the
// encoder accepted. The test calibrates a random subsampling map, streams
// several windows of random samples (back to back and with gaps), checks the
// M coefficients and the latency of y_valid (M+1 cycles after the window's
// last sample) and the throughput (one sample per M cycles when streamed
// back to back), then recalibrates in the middle of a window and repeats.
// It counts how often each mechanism happened and fails if one never did:
// calibration, over-long calibration ignored, incomplete calibration refused,
// window restart (accumulator reset), back-to-back samples, idle gaps,
// samples held off while busy, and a window aborted by recalibration.
module tb_lbcs_encoder;
  localparam int unsigned N   = lbcs_pkg::N_DEF;
  localparam int unsigned M   = lbcs_pkg::M_DEF;
  localparam int unsigned B_I = lbcs_pkg::B_I_DEF;
  localparam int unsigned B_O = lbcs_pkg::B_O_DEF;
  localparam int unsigned WN  = $clog2(N);

  logic                  clk = 0, rst_n = 0;
  logic                  pr_en = 0, x_valid = 0;
  logic [WN-1:0]         row_idx = '0;
  logic signed [B_I-1:0] x = '0;
  logic                  programmed, x_ready, y_valid;
  logic signed [B_O-1:0] y [M];

  int checks = 0, failures = 0;
  int hm [N][N];
  int w [M];                  // current subsampling map
  int samples [$];            // samples accepted in the current window
  int cyc = 0, last_accept_cyc = 0, prev_accept_cyc = -1;
  int n_prog = 0, n_overlong = 0, n_short = 0, n_windows = 0, n_b2b = 0;
  int n_gap = 0, n_held = 0, n_abort = 0;

  lbcs_encoder dut (
    .clk, .rst_n, .pr_en, .row_idx, .programmed,
    .x, .x_valid, .x_ready, .y, .y_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("cycle %0d %s: got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  // Calibrate with `len` cycles of pr_en; the first M indices form the map.
  task automatic calibrate(int len, bit distinct);
    int cand [$];
    int nm [M];
    for (int r = 0; r < int'(N); r++) cand.push_back(r);
    cand.shuffle();
    for (int c = 0; c < len; c++) begin
      @(negedge clk);
      pr_en = 1;
      row_idx = WN'(distinct ? cand[c % N] : $urandom_range(0, N - 1));
      if (c < int'(M)) nm[c] = int'(row_idx);
    end
    @(negedge clk);
    pr_en = 0;
    samples.delete();
    if (len >= int'(M)) begin
      w = nm;
      n_prog++;
      if (len > int'(M)) n_overlong++;
    end
    expect_eq("programmed", int'(programmed), int'(len >= int'(M)));
  endtask

  // Offer one sample; wait until it is accepted. gap: idle cycles first.
  task automatic send(int xv, int gap);
    for (int g = 0; g < gap; g++) @(negedge clk);
    x_valid = 1; x = B_I'(xv);
    #1;
    while (!x_ready) begin
      n_held++;
      @(negedge clk); #1;
    end
    @(posedge clk);
    if (prev_accept_cyc >= 0 && samples.size() > 0) begin
      if (cyc - prev_accept_cyc == int'(M)) n_b2b++;
      if (cyc - prev_accept_cyc > int'(M)) n_gap++;
    end
    prev_accept_cyc = cyc;
    last_accept_cyc = cyc;
    samples.push_back(xv);
    @(negedge clk);
    x_valid = 0;
  endtask

  // Compare the encoder output with the reference for the collected window.
  task automatic check_window();
    for (int kk = 0; kk < int'(M); kk++) begin
      int acc;
      acc = 0;
      for (int jj = 0; jj < int'(N); jj++) acc += hm[w[kk]][jj] * samples[jj];
      expect_eq($sformatf("y[%0d]", kk), int'(y[kk]), acc);
    end
  endtask

  // Wait for y_valid after the window's last sample and check it.
  task automatic finish_window();
    int t0;
    t0 = last_accept_cyc;
    while (!y_valid) begin
      @(posedge clk); #1;
      if (cyc - t0 > int'(M) + 4) break;
    end
    expect_eq("y_valid latency", cyc - t0, int'(M) + 1);
    check_window();
    n_windows++;
    samples.delete();
  endtask

  function automatic int rnd_sample();
    return int'($urandom_range(0, (1 << B_I) - 1)) - (1 << (B_I - 1));
  endfunction

  // Stream one window; mode 0 back to back, 1 random gaps, 2 extreme values.
  task automatic window(int mode);
    int t_first;
    for (int jj = 0; jj < int'(N); jj++) begin
      int xv;
      xv = (mode == 2) ? ((jj % 3 == 0) ? (1 << (B_I - 1)) - 1 : -(1 << (B_I - 1)))
                       : rnd_sample();
      // in back-to-back mode the sample is offered early, while busy
      send(xv, (mode == 1) ? int'($urandom_range(0, 2 * M)) : 0);
      if (jj == 0) t_first = cyc;
      if (jj < int'(N) - 1 && mode != 1) begin
        // offer the next sample right away: it is held off until x_ready
        @(negedge clk);
      end
    end
    if (mode == 0) expect_eq("back-to-back window length", cyc - t_first, (int'(N) - 1) * int'(M));
    finish_window();
  endtask

  initial begin
    hm[0][0] = 1;
    for (int s = 1; s < int'(N); s *= 2)
      for (int r = 0; r < s; r++)
        for (int c = 0; c < s; c++) begin
          hm[r][c + s]     =  hm[r][c];
          hm[r + s][c]     =  hm[r][c];
          hm[r + s][c + s] = -hm[r][c];
        end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq("ready before calibration", int'(x_ready), 0);

    calibrate(int'(M), 1);
    window(0);
    window(1);
    window(2);
    // recalibrate with extra cycles of pr_en, in the middle of a window
    for (int jj = 0; jj < int'(N) / 2; jj++) send(rnd_sample(), 0);
    calibrate(int'(M) + 5, 0);
    n_abort++;
    window(0);
    window(1);
    // an incomplete calibration leaves the encoder refusing samples
    calibrate(int'(M) - 3, 1);
    @(negedge clk);
    x_valid = 1;
    repeat (3 * M) begin
      @(negedge clk);
      expect_eq("refused while unprogrammed", int'(x_ready), 0);
    end
    x_valid = 0;
    n_short++;
    calibrate(int'(M), 1);
    window(0);

    expect_eq("calibrations seen", int'(n_prog > 0), 1);
    expect_eq("over-long calibration seen", int'(n_overlong > 0), 1);
    expect_eq("incomplete calibration seen", int'(n_short > 0), 1);
    expect_eq("window restarts seen", int'(n_windows > 1), 1);
    expect_eq("back-to-back samples seen", int'(n_b2b > 0), 1);
    expect_eq("idle gaps seen", int'(n_gap > 0), 1);
    expect_eq("samples held off seen", int'(n_held > 0), 1);
    expect_eq("aborted window seen", int'(n_abort > 0), 1);
    $display("mechanisms: calibrations=%0d overlong=%0d incomplete=%0d windows=%0d back_to_back=%0d gaps=%0d held=%0d aborts=%0d",
             n_prog, n_overlong, n_short, n_windows, n_b2b, n_gap, n_held, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
