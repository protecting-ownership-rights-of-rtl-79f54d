// tb_lpc_coder_wm_table: codes the same 256 x 256 image three times, with
// the plain Huffman table and with tables carrying a 36-bit (four 9-bit
// fields) and a 72-bit (eight fields) signature, reloading the table
// between images. The fields are {rank, bit} = (116,0) (3,1) (160,1) (0,1)
// (208,0) (2,1) (7,0) (30,0); (0,1) and (2,1) are skipped by the
// embedding rule, so 3 and 6 fields are embedded. For each run it checks
// every output bit against the reference encoder with that table, that the
// stream decodes back to the image, and that the signature can be read
// back from the table (the lengthened codes end in the signature bit). It
// prints the coded size and the cost of each signature against the plain
// table.
module tb_lpc_coder_wm_table;
  timeunit 1ns;
  timeprecision 1ps;
  import lpc_pkg::*;
  import lpc_tb_pkg::*;

  localparam int W = 256, H = 256, L = 4, NRUN = 3;
  localparam logic [7:0] XF = 8'b10101010;

  logic clk = 0, rst_n = 0;
  logic tbl_wr_en = 0;
  pixel_t tbl_wr_sym = '0;
  huff_code_t tbl_wr_code = '0;
  logic in_valid = 0, in_ready;
  pixel_t [L-1:0] in_pix = '0;
  logic out_valid, out_last;
  logic [31:0] out_word;
  logic [5:0] out_bits;
  logic [4:0] state;
  logic [3:0] jump_sig;

  int checks = 0, failures = 0;
  int tcode[NRUN][256], tlen[NRUN][256];
  byte unsigned img[H][W];
  bit exp_bits[NRUN][$], got_bits[NRUN][$];
  int run_out = 0;

  lpc_coder_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int predict(int y, int x, int lane);
    if (y == 0) return img[y][x-1];
    if (x == 0 || x == W - 1) return img[y-1][x];
    return ref_model(img[y-1][x-1], img[y][x-1], img[y-1][x], img[y-1][x+1],
                     XF[2*(L-1-lane)+1], XF[2*(L-1-lane)]);
  endfunction

  function automatic void encode(int r);
    for (int i = 7; i >= 0; i--) exp_bits[r].push_back(img[0][0][i]);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int er;
        if (x == 0 && y == 0) continue;
        er = (int'(img[y][x]) - predict(y, x, x % L)) & 255;
        for (int i = tlen[r][er] - 1; i >= 0; i--) exp_bits[r].push_back(tcode[r][er][i]);
      end
  endfunction

  // Decodes run r's received stream; returns the number of wrong pixels.
  function automatic int decode(int r);
    int pos = 8, bad = 0;
    byte unsigned rec[H][W];
    int rev[int];
    for (int s = 0; s < 256; s++) rev[(tlen[r][s] << 24) | tcode[r][s]] = s;
    for (int i = 0; i < 8; i++) rec[0][0][7-i] = got_bits[r][i];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int er, v, m;
        if (x == 0 && y == 0) continue;
        er = -1;
        v = 0;
        for (int l = 1; l <= MAX_CODE && er < 0 && pos < got_bits[r].size(); l++) begin
          v = (v << 1) | got_bits[r][pos++];
          if (rev.exists((l << 24) | v)) er = rev[(l << 24) | v];
        end
        if (er < 0) return W * H;
        if (y == 0) m = rec[y][x-1];
        else if (x == 0 || x == W - 1) m = rec[y-1][x];
        else m = ref_model(rec[y-1][x-1], rec[y][x-1], rec[y-1][x], rec[y-1][x+1],
                           XF[2*(L-1-(x%L))+1], XF[2*(L-1-(x%L))]);
        rec[y][x] = 8'((m + er) & 255);
        if (rec[y][x] != img[y][x]) bad++;
      end
    return bad;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    if (run_out < NRUN) begin
      for (int i = 31; i > 31 - int'(out_bits); i--) got_bits[run_out].push_back(out_word[i]);
      if (out_last) run_out++;
    end else check(1'b0, "output after the last run");
  end

  initial begin
    #40_000_000;  // 4 M cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sig36[] = '{116*2+0, 3*2+1, 160*2+1, 0*2+1};
    int sig72[] = '{116*2+0, 3*2+1, 160*2+1, 0*2+1, 208*2+0, 2*2+1, 7*2+0, 30*2+0};
    bit done36[], done72[];
    int n36, n72, order[256];

    foreach (img[y, x]) img[y][x] = 8'((x / 2 + y / 3 + 40) + int'($urandom_range(0, 6)));
    make_table(tcode[0], tlen[0]);
    tcode[1] = tcode[0]; tlen[1] = tlen[0];
    tcode[2] = tcode[0]; tlen[2] = tlen[0];
    n36 = watermark_table(tcode[1], tlen[1], sig36, done36);
    n72 = watermark_table(tcode[2], tlen[2], sig72, done72);
    check(n36 == 3, $sformatf("36-bit signature: %0d fields embedded, expected 3", n36));
    check(n72 == 6, $sformatf("72-bit signature: %0d fields embedded, expected 6", n72));
    // Read the signature back: at every embedded field whose swapped codes
    // had equal lengths, the code at that rank grew by the signature bit.
    rank_order(order);
    foreach (sig72[i]) if (done72[i]) begin
      int loc, b, s_now;
      loc = sig72[i] >> 1;
      b = sig72[i] & 1;
      s_now = (b == 0) ? order[loc + 1] : order[loc];
      if (tlen[2][s_now] == tlen[0][order[loc]] + 1)
        check(tcode[2][s_now][0] == 1'(b), $sformatf("signature bit at rank %0d", loc));
    end
    for (int r = 0; r < NRUN; r++) encode(r);

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < NRUN; r++) begin
      for (int s = 0; s < 256; s++) begin
        @(negedge clk);
        tbl_wr_en = 1;
        tbl_wr_sym = 8'(s);
        tbl_wr_code.len = LEN_W'(tlen[r][s]);
        tbl_wr_code.code = MAX_CODE'(tcode[r][s]);
      end
      @(negedge clk);
      tbl_wr_en = 0;
      for (int y = 0; y < H; y++)
        for (int g = 0; g < W / L; g++) begin
          for (int i = 0; i < L; i++) in_pix[i] = img[y][g * L + i];
          in_valid = 1;
          do @(posedge clk); while (!in_ready);
          @(negedge clk);
          in_valid = 0;
        end
      wait (run_out == r + 1);
      @(negedge clk);
    end

    for (int r = 0; r < NRUN; r++) begin
      int mism = 0;
      check(got_bits[r].size() == exp_bits[r].size(), $sformatf("run %0d stream length", r));
      for (int i = 0; i < exp_bits[r].size() && i < got_bits[r].size(); i++)
        if (exp_bits[r][i] != got_bits[r][i]) mism++;
      check(mism == 0, $sformatf("run %0d: %0d stream bits differ", r, mism));
      check(decode(r) == 0, $sformatf("run %0d does not decode losslessly", r));
      $display("%s: %0d bits, %.3f %% of the plain-table size",
               r == 0 ? "plain table     " : r == 1 ? "36-bit signature" : "72-bit signature",
               got_bits[r].size(), 100.0 * real'(got_bits[r].size()) / real'(got_bits[0].size()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
