// tb_lbcs_workloads: the encoder configurations of interest, run side by side
// on synthetic signals with a learnt subsampling map (see lbcs_workload):
//   N = 64,  CR = 8   the main configuration (M = 8)
//   N = 64,  CR = 16  M = 4
//   N = 256, CR = 16  the long-window configuration (M = 16)
module tb_lbcs_workloads;
  logic clk = 0;
  int   c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;
  int   checks, failures;

  always #5 clk = ~clk;

  lbcs_workload #(.N(64),  .CR(8))  u_main  (.clk, .checks(c0), .failures(f0), .done(d0));
  lbcs_workload #(.N(64),  .CR(16)) u_cr16  (.clk, .checks(c1), .failures(f1), .done(d1));
  lbcs_workload #(.N(256), .CR(16)) u_n256  (.clk, .checks(c2), .failures(f2), .done(d2));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
