// lbcs_workload: test driver for one encoder configuration (N, CR), used by
// tb_lbcs_workloads.
//
// Runs the whole LBCS flow on synthetic neural-like signals (a few
// low-frequency sinusoids plus noise, generated here):
//  1. learning: for a training set of unit-norm windows, the average energy
//     of every Hadamard coefficient is computed and the M = N/CR rows with the
//     largest energy form the subsampling map (the argmax rule of LBCS);
//  2. calibration of the encoder with that map;
//  3. encoding of test windows quantised to B_I bits, each coefficient
//     compared exactly with an integer reference;
//  4. linear decoding x_hat = (1/N) H^T P^T y; the reconstruction SNR and the
//     captured energy are printed, and the captured energy must beat the M/N
//     fraction a map without learning would get on average.
// The Hadamard matrix is built by the Kronecker recursion, independently of
// the design. Results are returned on checks, failures and done.
module lbcs_workload #(
  parameter int unsigned N       = 64,
  parameter int unsigned CR      = 8,
  parameter int unsigned B_I     = 10,
  parameter int unsigned TRAIN   = 24,
  parameter int unsigned WINDOWS = 3
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned M   = N / CR;
  localparam int unsigned B_O = B_I + $clog2(N);
  localparam int unsigned WN  = $clog2(N);
  localparam real         PI  = 3.14159265358979;

  logic                  rst_n = 0, pr_en = 0, x_valid = 0;
  logic [WN-1:0]         row_idx = '0;
  logic signed [B_I-1:0] x = '0;
  logic                  programmed, x_ready, y_valid;
  logic signed [B_O-1:0] y [M];

  int  hm [N][N];
  int  w [M];
  real energy [N];
  real sig [N];
  int  xs [N];

  lbcs_encoder #(.N(N), .CR(CR), .B_I(B_I)) dut (
    .clk, .rst_n, .pr_en, .row_idx, .programmed,
    .x, .x_valid, .x_ready, .y, .y_valid);

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("N=%0d CR=%0d %s: got %0d expected %0d", N, CR, what, got, exp);
    end
  endtask

  // One synthetic window: three sinusoids of 0.2 to 4 cycles per window,
  // random phase and amplitude, plus 5% uniform noise.
  task automatic make_signal();
    real f [3], ph [3], a [3];
    for (int s = 0; s < 3; s++) begin
      f[s]  = 0.2 + 3.8 * real'($urandom_range(0, 1000)) / 1000.0;
      ph[s] = 2.0 * PI * real'($urandom_range(0, 1000)) / 1000.0;
      a[s]  = 0.3 + 0.7 * real'($urandom_range(0, 1000)) / 1000.0;
    end
    for (int jj = 0; jj < int'(N); jj++) begin
      sig[jj] = 0.0;
      for (int s = 0; s < 3; s++)
        sig[jj] += a[s] * $sin(2.0 * PI * f[s] * real'(jj) / real'(N) + ph[s]);
      sig[jj] += 0.05 * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
    end
  endtask

  initial begin
    real norm, cap, tot, err, sp;
    int  best;
    bit  used [N];
    int  t_last;
    checks = 0; failures = 0; done = 0;
    hm[0][0] = 1;
    for (int s = 1; s < int'(N); s *= 2)
      for (int r = 0; r < s; r++)
        for (int c = 0; c < s; c++) begin
          hm[r][c + s]     =  hm[r][c];
          hm[r + s][c]     =  hm[r][c];
          hm[r + s][c + s] = -hm[r][c];
        end
    // 1. learning of the subsampling map
    for (int i = 0; i < int'(N); i++) begin energy[i] = 0.0; used[i] = 0; end
    for (int t = 0; t < int'(TRAIN); t++) begin
      make_signal();
      norm = 0.0;
      for (int jj = 0; jj < int'(N); jj++) norm += sig[jj] * sig[jj];
      for (int i = 0; i < int'(N); i++) begin
        real c;
        c = 0.0;
        for (int jj = 0; jj < int'(N); jj++) c += real'(hm[i][jj]) * sig[jj];
        energy[i] += c * c / (norm * real'(N)) / real'(TRAIN);
      end
    end
    for (int kk = 0; kk < int'(M); kk++) begin
      best = -1;
      for (int i = 0; i < int'(N); i++)
        if (!used[i] && (best < 0 || energy[i] > energy[best])) best = i;
      used[best] = 1;
      w[kk] = best;
    end
    // 2. calibration
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int kk = 0; kk < int'(M); kk++) begin
      @(negedge clk);
      pr_en = 1; row_idx = WN'(w[kk]);
    end
    @(negedge clk);
    pr_en = 0;
    expect_eq("programmed", int'(programmed), 1);
    // 3. and 4. encoding and decoding
    for (int win = 0; win < int'(WINDOWS); win++) begin
      make_signal();
      for (int jj = 0; jj < int'(N); jj++) begin
        real v;
        v = sig[jj] / 2.2 * real'((1 << (B_I - 1)) - 1);
        xs[jj] = $rtoi(v);
        if (xs[jj] > (1 << (B_I - 1)) - 1) xs[jj] = (1 << (B_I - 1)) - 1;
        if (xs[jj] < -(1 << (B_I - 1))) xs[jj] = -(1 << (B_I - 1));
      end
      for (int jj = 0; jj < int'(N); jj++) begin
        @(negedge clk);
        x_valid = 1; x = B_I'(xs[jj]);
        #1;
        while (!x_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        t_last = 0;
        @(negedge clk);
        x_valid = 0;
      end
      while (!y_valid) begin
        @(posedge clk); #1;
        t_last++;
      end
      expect_eq("y_valid latency after last sample", t_last + 1, int'(M) + 1);
      cap = 0.0; tot = 0.0;
      for (int kk = 0; kk < int'(M); kk++) begin
        int acc;
        acc = 0;
        for (int jj = 0; jj < int'(N); jj++) acc += hm[w[kk]][jj] * xs[jj];
        expect_eq($sformatf("y[%0d]", kk), int'(y[kk]), acc);
        cap += real'(acc) * real'(acc);
      end
      err = 0.0; sp = 0.0;
      for (int jj = 0; jj < int'(N); jj++) begin
        real xh;
        xh = 0.0;
        for (int kk = 0; kk < int'(M); kk++) xh += real'(hm[w[kk]][jj]) * real'(y[kk]);
        xh /= real'(N);
        err += (xh - real'(xs[jj])) ** 2;
        sp  += real'(xs[jj]) ** 2;
      end
      tot = sp * real'(N);  // Parseval: sum of all squared coefficients
      $display("N=%0d CR=%0d window %0d: captured energy %0.1f%%, reconstruction SNR %0.1f dB",
               N, CR, win, 100.0 * cap / tot, 10.0 * $log10(sp / err));
      checks++;
      if (cap / tot <= real'(M) / real'(N)) begin
        failures++;
        $display("N=%0d CR=%0d: learnt map captures no more than an average map", N, CR);
      end
    end
    done = 1;
  end
endmodule
