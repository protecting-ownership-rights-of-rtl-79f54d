// tb_lpc_pred_lane: checks one prediction lane in all four combinations of
// its two transformation bits and all four predictor modes. Each trial
// applies random neighbours, runs the four levels (with idle cycles in
// between, which must not disturb the result) and compares model and err
// with the reference formulas. One more check: op_en low must freeze err.
module tb_lpc_pred_lane;
  timeunit 1ns;
  timeprecision 1ps;
  import lpc_pkg::*;
  import lpc_tb_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic [1:0] lvl = '0;
  pred_mode_e mode = PM_FULL;
  pixel_t a = '0, b = '0, c = '0, d = '0, e = '0;
  pixel_t model[4], err[4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar k = 0; k < 4; k++) begin : g_dut
    lpc_pred_lane #(.XF_AB(k[1]), .XF_CE(k[0])) dut (
      .clk, .rst_n, .op_en(en), .op_level(lvl), .mode, .a, .b, .c, .d, .e,
      .model(model[k]), .err(err[k]));
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
    for (int t = 0; t < 2000; t++) begin
      int m[4];
      pixel_t held[4];
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      d = 8'($urandom); e = 8'($urandom);
      if (t < 16) begin a = 8'hff; b = 8'hff; c = 8'hff; e = 8'hff; end
      mode = pred_mode_e'(t % 4);
      for (int l = 0; l < 4; l++) begin
        @(negedge clk);
        en = 1; lvl = 2'(l);
        @(negedge clk);
        en = 0;
        if ($urandom_range(0, 1) == 1) @(negedge clk);
      end
      for (int k = 0; k < 4; k++) begin
        case (mode)
          PM_FULL:  m[k] = ref_model(a, b, c, e, k[1], k[0]);
          PM_LEFT:  m[k] = b;
          PM_ABOVE: m[k] = c;
          default:  m[k] = 0;
        endcase
        checks += 2;
        if (model[k] != 8'(m[k]) || err[k] != 8'((int'(d) - m[k]) & 255)) begin
          failures++;
          if (failures < 10)
            $display("FAIL k=%0d mode=%0d a=%0d b=%0d c=%0d d=%0d e=%0d: model %0d/%0d err %0d",
                     k, mode, a, b, c, d, e, model[k], m[k], err[k]);
        end
        held[k] = err[k];
      end
      // Changing inputs without op_en must not change the result.
      d = ~d;
      repeat (2) @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (err[k] != held[k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
