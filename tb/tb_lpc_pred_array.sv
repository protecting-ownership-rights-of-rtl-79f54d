// tb_lpc_pred_array: checks the four-lane predictor with its default
// signatures (transformations 10101010, lane delays 1010) and a copy with
// no delayed lane. For random neighbours and modes it checks every lane's
// model and error, that done comes in the 5th cycle of run (4th without
// delays), that delayed lanes do nothing in step 0 and non-delayed lanes
// nothing in step 4.
module tb_lpc_pred_array;
  timeunit 1ns;
  timeprecision 1ps;
  import lpc_pkg::*;
  import lpc_tb_pkg::*;

  localparam logic [7:0] XF = 8'b10101010;
  localparam logic [3:0] DL = 4'b1010;

  logic clk = 0, rst_n = 0, run = 0;
  pred_mode_e [3:0] mode;
  pixel_t [3:0] a, b, c, d, e, model0, err0, model1, err1;
  logic done0, done1;
  logic [2:0] step0, step1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lpc_pred_array dut (
    .clk, .rst_n, .run, .mode, .a, .b, .c, .d, .e,
    .done(done0), .step(step0), .model(model0), .err(err0));

  lpc_pred_array #(.LANE_DELAY(4'b0000)) dut_nodelay (
    .clk, .rst_n, .run, .mode, .a, .b, .c, .d, .e,
    .done(done1), .step(step1), .model(model1), .err(err1));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Lane activity against the schedule.
  always @(posedge clk) if (rst_n && run) begin
    for (int i = 0; i < 4; i++) begin
      logic en_i;
      case (i)
        0: en_i = dut.g_lane[0].en;
        1: en_i = dut.g_lane[1].en;
        2: en_i = dut.g_lane[2].en;
        default: en_i = dut.g_lane[3].en;
      endcase
      if (step0 == 3'd0) check(en_i == !DL[i], "step 0 activity");
      if (step0 == 3'd4) check(en_i == DL[i], "step 4 activity");
    end
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = '{default: PM_FULL};
    a = '0; b = '0; c = '0; d = '0; e = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      int n, first0, first1;
      n = 0; first0 = -1; first1 = -1;
      for (int i = 0; i < 4; i++) begin
        a[i] = 8'($urandom); b[i] = 8'($urandom); c[i] = 8'($urandom);
        d[i] = 8'($urandom); e[i] = 8'($urandom);
        mode[i] = pred_mode_e'($urandom_range(0, 3));
        if (t % 3 != 0) mode[i] = PM_FULL;
      end
      @(negedge clk);
      run = 1;
      while (n < 8 && first0 < 0) begin
        @(posedge clk);
        if (done1 && first1 < 0) first1 = n;
        if (done0) first0 = n;
        n++;
        @(negedge clk);
      end
      run = 0;
      check(first0 == 4, $sformatf("done after %0d cycles, expected 5", first0 + 1));
      check(first1 == 3, $sformatf("no-delay done after %0d cycles, expected 4", first1 + 1));
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        int m;
        case (mode[i])
          PM_FULL:  m = ref_model(a[i], b[i], c[i], e[i], XF[2*(3-i)+1], XF[2*(3-i)]);
          PM_LEFT:  m = b[i];
          PM_ABOVE: m = c[i];
          default:  m = 0;
        endcase
        check(model0[i] == 8'(m), $sformatf("lane %0d model", i));
        check(err0[i] == 8'((int'(d[i]) - m) & 255), $sformatf("lane %0d err", i));
        check(err1[i] == err0[i], $sformatf("lane %0d err, no-delay copy", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
