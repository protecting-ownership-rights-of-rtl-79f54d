// tb_lpc_ctrl_fsm: runs the controller over three small images (8 x 3
// pixels, two groups per row) with random input gaps and random prediction
// lengths. Checks the state codes and their ring order, the transition
// labels, the outputs of each state (in_ready, pred_run, code_push with the
// lane count, commit), the position counters, the predictor mode of every
// lane and that flush comes once, in the update of the last group.
module tb_lpc_ctrl_fsm;
  timeunit 1ns;
  timeprecision 1ps;
  import lpc_pkg::*;

  localparam int L = 4, W = 8, H = 3;
  localparam logic [4:0] S1 = 5'b11001, S2 = 5'b10101, S3 = 5'b00110, S4 = 5'b01101;

  logic clk = 0, rst_n = 0, in_valid = 0, pred_done = 0;
  logic in_ready, latch, pred_run, code_push, commit, flush;
  logic [1:0] code_lane, row;
  logic [0:0] grp;
  pred_mode_e [L-1:0] mode;
  logic [4:0] state;
  logic [3:0] jump_sig;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lpc_ctrl_fsm #(.LANES(L), .IMG_W(W), .IMG_H(H)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Random stimulus.
  always @(negedge clk) begin
    in_valid  <= rst_n && ($urandom_range(0, 2) != 0);
    pred_done <= (state == S2) && ($urandom_range(0, 2) == 0);
  end

  // Reference model of the ring.
  logic [4:0] exp_st = S1;
  int exp_lane = 0, exp_grp = 0, exp_row = 0, flushes = 0, groups = 0;
  always @(posedge clk) if (rst_n) begin
    check(state == exp_st, $sformatf("state %b expected %b", state, exp_st));
    check(in_ready == (state == S1), "in_ready");
    check(pred_run == (state == S2), "pred_run");
    check(code_push == (state == S3), "code_push");
    check(commit == (state == S4), "commit");
    check(latch == (state == S1 && in_valid), "latch");
    check(int'(grp) == exp_grp && int'(row) == exp_row, "position");
    for (int i = 0; i < L; i++) begin
      int x;
      pred_mode_e m;
      x = exp_grp * L + i;
      if (exp_row == 0 && x == 0) m = PM_RAW;
      else if (exp_row == 0) m = PM_LEFT;
      else if (x == 0 || x == W - 1) m = PM_ABOVE;
      else m = PM_FULL;
      check(mode[i] == m, $sformatf("mode lane %0d at x=%0d y=%0d", i, x, exp_row));
    end
    check(flush == (state == S4 && exp_grp == W / L - 1 && exp_row == H - 1), "flush");
    if (flush) flushes++;
    case (exp_st)
      S1: if (in_valid) exp_st = S2;
      S2: if (pred_done) exp_st = S3;
      S3: begin
        check(int'(code_lane) == exp_lane, "code lane");
        exp_lane++;
        if (exp_lane == L) begin exp_lane = 0; exp_st = S4; end
      end
      default: begin
        exp_st = S1;
        groups++;
        exp_grp++;
        if (exp_grp == W / L) begin
          exp_grp = 0;
          exp_row = (exp_row + 1) % H;
        end
      end
    endcase
  end

  // Labels, one cycle after each state change.
  logic [4:0] st_d = S1;
  always @(posedge clk) if (rst_n) begin
    if (state != st_d)
      case (state)
        S2: check(jump_sig == 4'b0111, "label 0111");
        S3: check(jump_sig == 4'b1001, "label 1001");
        S4: check(jump_sig == 4'b1101, "label 1101");
        default: check(jump_sig == 4'b0110, "label 0110");
      endcase
    st_d <= state;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (groups == 3 * H * W / L);
    @(negedge clk);
    check(flushes == 3, $sformatf("%0d flushes for 3 images", flushes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
