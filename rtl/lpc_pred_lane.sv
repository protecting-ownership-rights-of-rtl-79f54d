// lpc_pred_lane: one lane of the linear predictor.
//
// Computes, for one pixel D with neighbours A, B, C, E,
//   model = A/4 + B/4 + C/4 + E/4   and   err = D - model (mod 256).
// The work is spread over four operation levels that all share one 9-bit
// adder/subtractor; a level runs in the cycle in which op_en is high and
// op_level names it:
//   level 0  AB term : (A + B) >> 2   or  (A >> 2) + (B >> 2)
//   level 1  CE term : (C + E) >> 2   or  (C >> 2) + (E >> 2)
//   level 2  model   = AB term + CE term (or the border predictor)
//   level 3  err     = D - model
// The shifts are wiring, so each level needs one pass through the adder.
//
// Watermark: the two pair sums can be built shift-then-add or
// add-then-shift. XF_AB and XF_CE choose the form; add-then-shift marks a
// '1', shift-then-add a '0'. Both forms give a model within the 8-bit
// range; they differ only in how the dropped low bits round, so every
// lane's form must be known to a decoder.
//
// Border pixels (mode) replace the model at level 2: PM_LEFT uses B,
// PM_ABOVE uses C, PM_RAW uses 0 so that err is the pixel itself.
// The predictor formula, the neighbour map and the two sum forms follow the
// source description; the single shared adder, the level order and the
// raw-literal handling of the first pixel are this design's choices.
//
// Timing: model and err are registers, err is valid the cycle after the
// level-3 op_en. Inputs must be held stable while the four levels run.
module lpc_pred_lane
  import lpc_pkg::*;
#(
  parameter bit XF_AB = 1'b1,  // 1: (A+B)>>2, 0: A>>2 + B>>2
  parameter bit XF_CE = 1'b0   // 1: (C+E)>>2, 0: C>>2 + E>>2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       op_en,
  input  logic [1:0] op_level,
  input  pred_mode_e mode,
  input  pixel_t     a,
  input  pixel_t     b,
  input  pixel_t     c,
  input  pixel_t     d,
  input  pixel_t     e,
  output pixel_t     model,
  output pixel_t     err
);

  pixel_t     ab_term, ce_term;
  logic [8:0] opx, opy, alu;
  logic       sub;

  // Operand selection for the shared adder.
  always_comb begin
    opx = '0;
    opy = '0;
    sub = 1'b0;
    unique case (op_level)
      2'd0: begin
        opx = XF_AB ? {1'b0, a} : {3'b0, a[7:2]};
        opy = XF_AB ? {1'b0, b} : {3'b0, b[7:2]};
      end
      2'd1: begin
        opx = XF_CE ? {1'b0, c} : {3'b0, c[7:2]};
        opy = XF_CE ? {1'b0, e} : {3'b0, e[7:2]};
      end
      2'd2: begin
        opx = {1'b0, ab_term};
        opy = {1'b0, ce_term};
      end
      2'd3: begin
        opx = {1'b0, d};
        opy = {1'b0, model};
        sub = 1'b1;
      end
    endcase
    alu = sub ? (opx - opy) : (opx + opy);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ab_term <= '0;
      ce_term <= '0;
      model   <= '0;
      err     <= '0;
    end else if (op_en) begin
      unique case (op_level)
        2'd0: ab_term <= XF_AB ? 8'(alu >> 2) : alu[7:0];
        2'd1: ce_term <= XF_CE ? 8'(alu >> 2) : alu[7:0];
        2'd2: begin
          unique case (mode)
            PM_FULL:  model <= alu[7:0];
            PM_LEFT:  model <= b;
            PM_ABOVE: model <= c;
            PM_RAW:   model <= '0;
          endcase
        end
        2'd3: err <= alu[7:0];
      endcase
    end
  end

endmodule
