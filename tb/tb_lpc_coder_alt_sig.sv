// tb_lpc_coder_alt_sig: the end-to-end test of tb_lpc_coder_top on a
// 32 x 16 image with every signature parameter changed: predictor forms
// 01100011 (all four form combinations), no delayed lane (so PREDICT takes
// 4 cycles and a group 10), other state codes and other transition labels.
// Checks the same things: the bitstream bit for bit against the reference
// encoder with these forms, lossless decode, cycle counts, the state ring
// and labels, and that every mechanism happened.
module tb_lpc_coder_alt_sig;
  timeunit 1ns;
  timeprecision 1ps;
  import lpc_pkg::*;
  import lpc_tb_pkg::*;

  localparam int W = 32, H = 16, L = 4, NIMG = 2;
  localparam logic [7:0] XF = 8'b01100011;
  localparam logic [4:0] C1 = 5'b00011, C2 = 5'b11100, C3 = 5'b01010, C4 = 5'b10001;
  localparam logic [3:0] J1 = 4'b1010, J2 = 4'b0101, J3 = 4'b0011, J4 = 4'b1100;

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
  int cyc = 0;

  lpc_coder_top #(
    .XFORM_SIG(XF), .LANE_DELAY(4'b0000), .IMG_W(W), .IMG_H(H),
    .ST1(C1), .ST2(C2), .ST3(C3), .ST4(C4),
    .JMP12(J1), .JMP23(J2), .JMP34(J3), .JMP41(J4)
  ) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  int tcode[256], tlen[256];
  byte unsigned img[NIMG][H][W];
  bit exp_bits[NIMG][$];
  bit got_bits[NIMG][$];
  int img_out = 0;

  int n_raw = 0, n_left = 0, n_above_first = 0, n_above_last = 0, n_full = 0;
  int n_stall = 0, n_word = 0, n_flush = 0, n_wrap = 0, n_pred4 = 0, n_grp10 = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic void push_bits(int n, int v, int k);
    for (int i = v - 1; i >= 0; i--) exp_bits[n].push_back(k[i]);
  endfunction

  // Reference encoder.
  function automatic void encode(int n);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int d = img[n][y][x], m, er, lane;
        lane = x % L;
        if (x == 0 && y == 0) begin
          push_bits(n, 8, d);
          continue;
        end
        if (y == 0) m = img[n][y][x-1];
        else if (x == 0 || x == W - 1) m = img[n][y-1][x];
        else m = ref_model(img[n][y-1][x-1], img[n][y][x-1], img[n][y-1][x],
                           img[n][y-1][x+1], XF[2*(L-1-lane)+1], XF[2*(L-1-lane)]);
        er = (d - m) & 255;
        push_bits(n, tlen[er], tcode[er]);
      end
  endfunction

  // Decoder: rebuild the image from the received stream.
  function automatic int decode_errors(int n);
    int pos = 0, bad = 0;
    byte unsigned rec[H][W];
    int rev[int];
    foreach (tcode[s]) rev[(tlen[s] << 24) | tcode[s]] = s;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int m, er = -1, v = 0, lane = x % L;
        if (x == 0 && y == 0) begin
          for (int i = 0; i < 8; i++) v = (v << 1) | got_bits[n][pos++];
          rec[0][0] = 8'(v);
        end else begin
          for (int l = 1; l <= MAX_CODE && er < 0; l++) begin
            if (pos >= got_bits[n].size()) break;
            v = (v << 1) | got_bits[n][pos++];
            if (rev.exists((l << 24) | v)) er = rev[(l << 24) | v];
          end
          if (er < 0) return -1;
          if (y == 0) m = rec[y][x-1];
          else if (x == 0 || x == W - 1) m = rec[y-1][x];
          else m = ref_model(rec[y-1][x-1], rec[y][x-1], rec[y-1][x], rec[y-1][x+1],
                             XF[2*(L-1-lane)+1], XF[2*(L-1-lane)]);
          rec[y][x] = 8'((m + er) & 255);
        end
        if (rec[y][x] != img[n][y][x]) bad++;
      end
    return bad;
  endfunction

  // Output monitor.
  always @(posedge clk) if (rst_n && out_valid) begin
    if (img_out < NIMG) begin
      for (int i = 31; i > 31 - int'(out_bits); i--) got_bits[img_out].push_back(out_word[i]);
      if (out_last) begin
        n_flush++;
        check(got_bits[img_out].size() == exp_bits[img_out].size(), "stream length");
        check(out_bits == 6'(exp_bits[img_out].size() % 32), "last word bit count");
        img_out++;
      end else begin
        n_word++;
        check(out_bits == 6'd32, "full word bit count");
      end
    end else check(1'b0, "output after the last image");
  end

  // Controller ring, labels and cycle budget.
  logic [4:0] prev_state = C1;
  int pred_len = 0, last_accept = -1;
  always @(posedge clk) if (rst_n) begin
    check(state inside {C1, C2, C3, C4}, "state code");
    if (state != prev_state) begin
      case (prev_state)
        C1: check(state == C2, "FETCH -> PREDICT");
        C2: check(state == C3, "PREDICT -> CODE");
        C3: check(state == C4, "CODE -> UPDATE");
        default:  check(state == C1, "UPDATE -> FETCH");
      endcase
    end
    if (state == C2) pred_len++;
    else if (pred_len != 0) begin
      check(pred_len == 4, "PREDICT takes 4 cycles");
      if (pred_len == 4) n_pred4++;
      pred_len = 0;
    end
    if (in_valid && in_ready) begin
      if (last_accept >= 0 && cyc - last_accept == 10) n_grp10++;
      last_accept = cyc;
    end
    prev_state <= state;
  end
  // Label check one cycle after each transition (jump_sig is registered
  // alongside the state).
  logic [4:0] st_d = C1;
  always @(posedge clk) if (rst_n) begin
    if (state != st_d)
      case (state)
        C2: check(jump_sig == J1, "label FETCH->PREDICT");
        C3: check(jump_sig == J2, "label PREDICT->CODE");
        C4: check(jump_sig == J3, "label CODE->UPDATE");
        C1: check(jump_sig == J4, "label UPDATE->FETCH");
        default: ;
      endcase
    st_d <= state;
  end

  initial begin
    #1_000_000;  // 100 k cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    make_table(tcode, tlen);
    for (int n = 0; n < NIMG; n++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          int v;
          if (n == 0) v = (x / 2 + y / 3 + 40) + int'($urandom_range(0, 6));
          else if (x > 64 && x < 128 && y > 100 && y < 180) v = 200;
          else v = ((x * y) >> 6) + int'($urandom_range(0, 40));
          img[n][y][x] = 8'(v);
        end
    for (int n = 0; n < NIMG; n++) encode(n);

    repeat (3) @(negedge clk);
    rst_n = 1;
    // Load the table.
    for (int s = 0; s < 256; s++) begin
      @(negedge clk);
      tbl_wr_en = 1;
      tbl_wr_sym = 8'(s);
      tbl_wr_code.len = LEN_W'(tlen[s]);
      tbl_wr_code.code = MAX_CODE'(tcode[s]);
    end
    @(negedge clk);
    tbl_wr_en = 0;

    // Stream the images.
    for (int n = 0; n < NIMG; n++) begin
      if (n > 0) n_wrap++;
      for (int y = 0; y < H; y++)
        for (int g = 0; g < W / L; g++) begin
          if ($urandom_range(0, 7) == 0) begin
            in_valid = 0;
            n_stall++;
            repeat (int'($urandom_range(1, 15))) @(negedge clk);
          end
          for (int i = 0; i < L; i++) begin
            int x;
            x = g * L + i;
            in_pix[i] = img[n][y][x];
            if (x == 0 && y == 0) n_raw++;
            else if (y == 0) n_left++;
            else if (x == 0) n_above_first++;
            else if (x == W - 1) n_above_last++;
            else n_full++;
          end
          in_valid = 1;
          do @(posedge clk); while (!in_ready);
          @(negedge clk);
          in_valid = 0;
        end
    end
    repeat (40) @(negedge clk);

    check(img_out == NIMG, "all images ended with a last word");
    for (int n = 0; n < NIMG; n++) begin
      int mism = 0;
      for (int i = 0; i < exp_bits[n].size() && i < got_bits[n].size(); i++)
        if (exp_bits[n][i] != got_bits[n][i]) mism++;
      check(mism == 0, $sformatf("image %0d: %0d stream bits differ", n, mism));
      check(decode_errors(n) == 0, $sformatf("image %0d does not decode losslessly", n));
      $display("image %0d: %0d pixels in %0d coded bits (%.3f bits/pixel)", n, W * H,
               got_bits[n].size(), real'(got_bits[n].size()) / (W * H));
    end
    $display("raw=%0d left=%0d above_first=%0d above_last=%0d full=%0d stall=%0d words=%0d flush=%0d wrap=%0d pred4=%0d grp10=%0d",
             n_raw, n_left, n_above_first, n_above_last, n_full, n_stall, n_word, n_flush,
             n_wrap, n_pred4, n_grp10);
    check(n_raw > 0, "raw first pixel never coded");
    check(n_left > 0, "left predictor never used");
    check(n_above_first > 0, "first-column predictor never used");
    check(n_above_last > 0, "last-column predictor never used");
    check(n_full > 0, "full predictor never used");
    check(n_stall > 0, "no input stall");
    check(n_word > 0, "no full word");
    check(n_flush == NIMG, "flush count");
    check(n_wrap > 0, "no second image");
    check(n_pred4 > 0, "no 4-cycle schedule observed");
    check(n_grp10 > 0, "no 10-cycle group");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
