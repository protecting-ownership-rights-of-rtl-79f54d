// tb_huff_table: loads all 256 entries with random codes and lengths,
// reads them back in random order, overwrites some entries and reads again.
module tb_huff_table;
  timeunit 1ns;
  timeprecision 1ps;
  import lpc_pkg::*;

  logic clk = 0, wr_en = 0;
  pixel_t wr_sym = '0, sym = '0;
  huff_code_t wr_code = '0, code;
  huff_code_t ref_tbl[256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  huff_table dut (.clk, .wr_en, .wr_sym, .wr_code, .sym, .code);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int s);
    @(negedge clk);
    wr_en = 1;
    wr_sym = 8'(s);
    wr_code.len = LEN_W'($urandom_range(1, MAX_CODE));
    wr_code.code = MAX_CODE'($urandom);
    ref_tbl[s] = wr_code;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic read_all();
    for (int k = 0; k < 512; k++) begin
      int s;
      s = $urandom_range(0, 255);
      sym = 8'(s);
      #1;
      checks++;
      if (code != ref_tbl[s]) begin
        failures++;
        if (failures < 10) $display("FAIL sym %0d: %h vs %h", s, code, ref_tbl[s]);
      end
    end
  endtask

  initial begin
    for (int s = 0; s < 256; s++) write(s);
    read_all();
    for (int k = 0; k < 64; k++) write($urandom_range(0, 255));
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
