// tb_lbcs_dsp: check of the LBCS add/subtract-and-accumulate datapath.
//
// Drives bursts of M enable cycles with a random sign bit h per cycle, as the
// FSM would, and keeps its own model of the M accumulators:
// acc[k] = (clear ? 0 : acc[k]) + (h ? -x : x), with x the last loaded sample.
// Samples are loaded either in an idle cycle before a burst or in the last
// cycle of the previous burst (back to back). Every accumulator is compared
// after every burst, the counter output k in every burst cycle, and the
// extreme sums of a window (all samples at the negative and positive limits)
// are checked for the absence of overflow.
module tb_lbcs_dsp;
  localparam int unsigned N   = 64;
  localparam int unsigned M   = 8;
  localparam int unsigned B_I = 10;
  localparam int unsigned B_O = B_I + $clog2(N);
  localparam int unsigned KW  = $clog2(M);

  logic                  clk = 0, rst_n = 0;
  logic signed [B_I-1:0] x = '0;
  logic                  x_load = 0, enable = 0, clear = 0, h = 0;
  logic [KW-1:0]         k;
  logic signed [B_O-1:0] y [M];

  int checks = 0, failures = 0;
  int model [M];
  int cur_x;

  lbcs_dsp #(.M(M), .B_I(B_I), .B_O(B_O)) dut (
    .clk, .rst_n, .x, .x_load, .enable, .clear, .h, .k, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_y(string what);
    for (int i = 0; i < int'(M); i++) begin
      checks++;
      if (int'(y[i]) != model[i]) begin
        failures++;
        if (failures < 10) $display("%s: y[%0d]=%0d expected %0d", what, i, y[i], model[i]);
      end
    end
  endtask

  // Load a sample in an idle cycle.
  task automatic load_idle(int xv);
    @(negedge clk);
    enable = 0; clear = 0; x_load = 1; x = B_I'(xv);
    @(posedge clk);
    cur_x = xv;
    @(negedge clk);
    x_load = 0;
  endtask

  // One burst; hmode: 0 random, 1 all add, 2 all subtract. If nxt_valid, the
  // next sample is loaded in the last cycle.
  task automatic burst(bit clr, int hmode, bit nxt_valid, int nxt);
    for (int c = 0; c < int'(M); c++) begin
      if (c != 0) @(negedge clk);
      enable = 1; clear = clr;
      h = (hmode == 0) ? 1'($urandom) : (hmode == 2);
      x_load = (c == int'(M) - 1) && nxt_valid;
      x = B_I'(nxt);
      #1;
      checks++;
      if (int'(k) != c) begin
        failures++;
        $display("counter k=%0d expected %0d", k, c);
      end
      @(posedge clk);
      model[c] = (clr ? 0 : model[c]) + (h ? -cur_x : cur_x);
      if (x_load) cur_x = nxt;
    end
    @(negedge clk);
    enable = 0; clear = 0; x_load = 0;
    #1 check_y("after burst");
  endtask

  initial begin
    for (int i = 0; i < int'(M); i++) model[i] = 0;
    cur_x = 0;
    repeat (2) @(posedge clk);
    #1 check_y("reset");
    rst_n = 1;
    // random windows, mixing idle loads and back-to-back loads
    for (int w = 0; w < 4; w++) begin
      int xv;
      xv = int'($urandom_range(0, (1 << B_I) - 1)) - (1 << (B_I - 1));
      load_idle(xv);
      for (int jj = 0; jj < int'(N); jj++) begin
        int nx;
        bit b2b;
        nx  = int'($urandom_range(0, (1 << B_I) - 1)) - (1 << (B_I - 1));
        b2b = (jj < int'(N) - 1) && ($urandom_range(0, 1) == 1);
        burst(jj == 0, 0, b2b, nx);
        if (!b2b && jj < int'(N) - 1) begin
          repeat ($urandom_range(0, 3)) @(negedge clk);
          load_idle(nx);
        end
      end
    end
    // extremes of a Hadamard row sum: N samples of the most negative value
    // all added (row 0), and a half-add/half-subtract row fed the value of
    // largest positive contribution in every cycle
    begin
      int lo = -(1 << (B_I - 1));
      int hi = (1 << (B_I - 1)) - 1;
      load_idle(lo);
      for (int jj = 0; jj < int'(N); jj++) burst(jj == 0, 1, jj < int'(N) - 1, lo);
      checks++;
      if (int'(y[0]) != lo * int'(N)) begin
        failures++;
        $display("all-add extreme %0d", y[0]);
      end
      load_idle(hi);
      for (int jj = 0; jj < int'(N); jj++)
        burst(jj == 0, (jj % 2) ? 2 : 1, jj < int'(N) - 1, (jj % 2) ? hi : lo);
      checks++;
      if (int'(y[3]) != (int'(N) / 2) * (hi - lo)) begin
        failures++;
        $display("half-add extreme %0d", y[3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
