// tb_row_index_lut: check of the Row-Index look-up table.
//
// Checks the reset value, then random writes against a reference array, with
// reads of every address after each write. A write is expected to be visible
// from the cycle after it.
module tb_row_index_lut;
  localparam int unsigned N  = 64;
  localparam int unsigned M  = 8;
  localparam int unsigned WN = $clog2(N);
  localparam int unsigned WM = $clog2(M);

  logic          clk = 0, rst_n = 0, we = 0;
  logic [WM-1:0] waddr = '0, raddr = '0;
  logic [WN-1:0] wdata = '0, rdata;
  logic [WN-1:0] ref_mem [M];
  int            checks = 0, failures = 0;

  row_index_lut #(.N(N), .M(M)) dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < int'(M); a++) begin
      raddr = WM'(a);
      #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("addr %0d: got %0d expected %0d", a, rdata, ref_mem[a]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < int'(M); a++) ref_mem[a] = '0;
    repeat (2) @(posedge clk);
    check_all();
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 3) != 0);
      waddr = WM'($urandom);
      wdata = WN'($urandom);
      raddr = waddr;
      #1;
      // not yet written: old value on the read port
      checks++;
      if (rdata !== ref_mem[waddr]) begin
        failures++;
        $display("write-through seen at addr %0d", waddr);
      end
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      @(negedge clk);
      we = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
