// tb_lpc_line_buffer: feeds random 256-pixel rows group by group, as the
// coder does, and checks for every group that the neighbours A, B, C, E of
// every lane are the right pixels of the previous and the current row
// (except the ones the border predictors ignore: A and B of the first
// column, E of the last column, and everything above row 0).
module tb_lpc_line_buffer;
  timeunit 1ns;
  timeprecision 1ps;
  import lpc_pkg::*;

  localparam int W = 256, L = 4, H = 12;

  logic clk = 0, rst_n = 0, commit = 0;
  logic [5:0] grp = '0;
  pixel_t [L-1:0] cur = '0, a, b, c, e;
  byte unsigned img[H][W];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lpc_line_buffer dut (.clk, .rst_n, .grp, .cur, .commit, .a, .b, .c, .e);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (img[y, x]) img[y][x] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++)
      for (int g = 0; g < W / L; g++) begin
        grp = 6'(g);
        for (int i = 0; i < L; i++) cur[i] = img[y][g * L + i];
        @(negedge clk);
        for (int i = 0; i < L; i++) begin
          int x;
          x = g * L + i;
          if (x > 0) check(b[i] == img[y][x-1], $sformatf("B y=%0d x=%0d", y, x));
          if (y > 0) begin
            check(c[i] == img[y-1][x], $sformatf("C y=%0d x=%0d", y, x));
            if (x > 0) check(a[i] == img[y-1][x-1], $sformatf("A y=%0d x=%0d", y, x));
            if (x < W - 1) check(e[i] == img[y-1][x+1], $sformatf("E y=%0d x=%0d", y, x));
          end
        end
        commit = 1;
        @(negedge clk);
        commit = 0;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
