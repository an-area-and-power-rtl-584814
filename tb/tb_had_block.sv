// tb_had_block: check of the Had-block (LuT plus bit generator).
//
// Programs M random row indices through the write port, then for every output
// index k and column j compares h with the entry of a reference Hadamard
// matrix built by the Kronecker recursion. Repeated with several random maps.
module tb_had_block;
  localparam int unsigned N  = 64;
  localparam int unsigned M  = 8;
  localparam int unsigned WN = $clog2(N);
  localparam int unsigned WM = $clog2(M);

  logic          clk = 0, rst_n = 0, pr_en = 0, h;
  logic [WN-1:0] row_idx = '0, j = '0;
  logic [WM-1:0] k = '0;
  int            hm [N][N];
  int            rows [M];
  int            checks = 0, failures = 0;

  had_block #(.N(N), .M(M)) dut (.clk, .rst_n, .pr_en, .row_idx, .k, .j, .h);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hm[0][0] = 1;
    for (int s = 1; s < int'(N); s *= 2)
      for (int r = 0; r < s; r++)
        for (int c = 0; c < s; c++) begin
          hm[r][c + s]     =  hm[r][c];
          hm[r + s][c]     =  hm[r][c];
          hm[r + s][c + s] = -hm[r][c];
        end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int map = 0; map < 6; map++) begin
      for (int kk = 0; kk < int'(M); kk++) begin
        @(negedge clk);
        rows[kk] = (map == 0) ? (N - 1 - kk) : int'($urandom_range(0, N - 1));
        pr_en = 1; k = WM'(kk); row_idx = WN'(rows[kk]);
      end
      @(negedge clk);
      pr_en = 0;
      for (int kk = 0; kk < int'(M); kk++)
        for (int jj = 0; jj < int'(N); jj++) begin
          k = WM'(kk); j = WN'(jj);
          #1;
          checks++;
          if ((h ? -1 : 1) != hm[rows[kk]][jj]) begin
            failures++;
            if (failures < 10) $display("k %0d (row %0d) j %0d: h=%0b", kk, rows[kk], jj, h);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
