// tb_had_bit_gen: exhaustive check of the Hadamard entry generator.
//
// Builds the natural-order Hadamard matrix by the Kronecker recursion
// H_n = [[H_{n-1}, H_{n-1}], [H_{n-1}, -H_{n-1}]] (no bit tricks), then
// compares every (row, column) entry with the generator's output bit
// (0 = +1, 1 = -1). Also checks that distinct rows are orthogonal.
module tb_had_bit_gen;
  localparam int unsigned N = 64;
  localparam int unsigned W = $clog2(N);

  logic [W-1:0] row, col;
  logic         h;
  int           checks = 0, failures = 0;
  int           hm [N][N];

  had_bit_gen #(.N(N)) dut (.row, .col, .h);

  initial begin
    #100000;
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
    for (int r = 0; r < int'(N); r++)
      for (int c = 0; c < int'(N); c++) begin
        row = W'(r); col = W'(c);
        #1;
        checks++;
        if ((h ? -1 : 1) != hm[r][c]) begin
          failures++;
          if (failures < 10) $display("mismatch row %0d col %0d: h=%0b expected %0d", r, c, h, hm[r][c]);
        end
      end
    // orthogonality of the generated rows
    for (int a = 0; a < int'(N); a += 7)
      for (int b = 0; b < int'(N); b += 5) begin
        int dot;
        dot = 0;
        for (int c = 0; c < int'(N); c++) begin
          int ha, hb;
          row = W'(a); col = W'(c); #1; ha = h ? -1 : 1;
          row = W'(b); #1; hb = h ? -1 : 1;
          dot += ha * hb;
        end
        checks++;
        if (dot != ((a == b) ? int'(N) : 0)) begin
          failures++;
          $display("rows %0d,%0d dot %0d", a, b, dot);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
