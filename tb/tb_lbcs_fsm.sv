// tb_lbcs_fsm: cycle-by-cycle check of the encoder controller.
//
// A behavioural model of the controller's contract runs beside it:
//  - calibration: while pr_en is high, the first M cycles write the LuT at
//    k = 0..M-1 with the row index on the input; later cycles write nothing;
//    programmed is high once M indices are written;
//  - encoding: an accepted sample starts, in the next cycle, a burst of M
//    enable cycles with k = 0..M-1; j counts samples modulo N; clear is high in
//    the bursts of j = 0; x_ready is high when programmed and not busy or in
//    the last burst cycle; y_valid follows the last burst of every window.
// The stimulus mixes idle gaps, back-to-back samples, over-long and too short
// calibrations, and a calibration that aborts a window.
module tb_lbcs_fsm;
  localparam int unsigned N  = 16;
  localparam int unsigned M  = 4;
  localparam int unsigned WN = $clog2(N);
  localparam int unsigned WM = $clog2(M);

  logic          clk = 0, rst_n = 0;
  logic          pr_en = 0, x_valid = 0;
  logic [WN-1:0] row_idx = '0;
  logic          x_ready, x_load, lut_we, enable, clear, programmed, y_valid;
  logic [WN-1:0] lut_row_idx, j;
  logic [WM-1:0] k;

  int checks = 0, failures = 0;
  // model state
  int  burst_rem = 0, sample_idx = 0, pcnt = 0, windows = 0;
  bit  prog_m = 0, yv_m = 0;

  lbcs_fsm #(.N(N), .M(M)) dut (
    .clk, .rst_n, .pr_en, .row_idx, .x_valid, .x_ready, .x_load,
    .lut_we, .lut_row_idx, .k, .j, .enable, .clear, .programmed, .y_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // One clock cycle: apply inputs, compare outputs with the model, advance it.
  task automatic cycle(bit p, bit v);
    bit en_m, rdy_m, we_m, load_m;
    @(negedge clk);
    pr_en = p; x_valid = v; row_idx = WN'($urandom);
    #1;
    en_m   = !p && burst_rem > 0;
    rdy_m  = !p && prog_m && (burst_rem <= 1);
    we_m   = p && pcnt < int'(M);
    load_m = v && rdy_m;
    expect_eq("enable", int'(enable), int'(en_m));
    expect_eq("x_ready", int'(x_ready), int'(rdy_m));
    expect_eq("x_load", int'(x_load), int'(load_m));
    expect_eq("lut_we", int'(lut_we), int'(we_m));
    expect_eq("programmed", int'(programmed), int'(prog_m));
    expect_eq("y_valid", int'(y_valid), int'(yv_m));
    if (we_m) begin
      expect_eq("k (prog)", int'(k), pcnt);
      expect_eq("lut_row_idx", int'(lut_row_idx), int'(row_idx));
    end
    if (en_m) begin
      expect_eq("k", int'(k), int'(M) - burst_rem);
      expect_eq("j", int'(j), sample_idx);
      expect_eq("clear", int'(clear), int'(sample_idx == 0));
    end else begin
      expect_eq("clear idle", int'(clear), 0);
    end
    // advance the model
    yv_m = en_m && burst_rem == 1 && sample_idx == int'(N) - 1;
    if (yv_m) windows++;
    if (p) begin
      burst_rem = 0; sample_idx = 0;
      if (we_m) begin
        prog_m = (pcnt == int'(M) - 1);
        pcnt++;
      end
    end else begin
      pcnt = 0;
      if (en_m) begin
        burst_rem--;
        if (burst_rem == 0) sample_idx = (sample_idx + 1) % int'(N);
      end
      if (load_m) burst_rem = M;
    end
  endtask

  task automatic run(int cycles, int p_valid_pct);
    for (int c = 0; c < cycles; c++)
      cycle(0, $urandom_range(0, 99) < p_valid_pct);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(10, 100);                      // unprogrammed: nothing accepted
    repeat (M + 3) cycle(1, 0);        // over-long calibration
    run(N * M * 2, 100);               // back to back
    run(N * M * 3, 40);                // with gaps
    repeat (M) cycle(1, 1);            // calibration aborts the window
    run(N * M * 2, 70);
    repeat (M - 2) cycle(1, 0);        // too short: unprogrammed
    run(20, 100);
    repeat (M) cycle(1, 0);
    run(N * M * 3, 90);
    expect_eq("windows completed > 4", int'(windows > 4), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
