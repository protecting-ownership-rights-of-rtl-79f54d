// tb_huff_bit_packer: pushes random codes of 1..20 bits (back to back and
// with gaps), flushes, and checks that the words, read most significant
// bit first and cut to out_bits in the last word, give exactly the pushed
// bit sequence. Covers a flush that leaves a partial word, one that leaves
// nothing, and several streams in a row.
module tb_huff_bit_packer;
  timeunit 1ns;
  timeprecision 1ps;
  import lpc_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, flush = 0;
  huff_code_t in_code = '0;
  logic out_valid, out_last;
  logic [31:0] out_word;
  logic [5:0] out_bits;
  bit exp_q[$], got_q[$];
  int checks = 0, failures = 0, lasts = 0, words = 0;

  always #5 clk = ~clk;

  huff_bit_packer dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    if (!out_last) begin
      check(out_bits == 6'd32, "full word count");
      words++;
    end
    for (int i = 31; i > 31 - int'(out_bits); i--) got_q.push_back(out_word[i]);
    if (out_last) lasts++;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 40; s++) begin
      int n, total;
      n = $urandom_range(1, 300);
      total = 0;
      for (int k = 0; k < n; k++) begin
        int l;
        l = $urandom_range(1, MAX_CODE);
        if (s == 5) l = 16;  // 32 bits after 2 codes, flush with nothing left
        in_code.len = LEN_W'(l);
        in_code.code = MAX_CODE'($urandom) & MAX_CODE'((1 << l) - 1);
        for (int i = l - 1; i >= 0; i--) exp_q.push_back(in_code.code[i]);
        total += l;
        in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
      if (s == 5 && total % 32 != 0) begin
        in_code.len = 5'd16;
        in_code.code = '0;
        for (int i = 0; i < 16; i++) exp_q.push_back(1'b0);
        in_valid = 1;
        @(negedge clk);
        in_valid = 0;
      end
      flush = 1;
      @(negedge clk);
      flush = 0;
      @(negedge clk);
      check(lasts == s + 1, "one last word per flush");
      check(got_q.size() == exp_q.size(), $sformatf("stream %0d length %0d vs %0d", s, got_q.size(), exp_q.size()));
      while (got_q.size() > 0 && exp_q.size() > 0) begin
        bit g, x;
        g = got_q.pop_front();
        x = exp_q.pop_front();
        check(g == x, $sformatf("stream %0d bit", s));
      end
      got_q.delete();
      exp_q.delete();
    end
    check(words > 0, "full words seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
