// lpc_ctrl_fsm: controller of the image coder, and the carrier of the
// state-machine watermark.
//
// Four states run in a fixed ring for every group of LANES pixels:
//   FETCH  (11001)  wait for a group, latch it           -> PREDICT
//   PREDICT(10101)  run the lane schedule until done      -> CODE
//   CODE   (00110)  send one lane's code per cycle         -> UPDATE
//   UPDATE (01101)  commit the group to the line buffer,
//                   advance the position, flush at the end -> FETCH
// The state numbers are free to choose, so they are a signature: with the
// defaults the register walks 11001 -> 10101 -> 00110 -> 01101, as in the
// source's state diagram. Each transition also carries a 4-bit label from
// the same diagram (0111, 1001, 1101, 0110 in ring order); the label of the
// transition last taken is kept in jump_sig, a second, readable signature.
// Which job each state does, and the use of the labels as a register, are
// this design's choices: the source gives only the codes and the ring.
//
// The controller also keeps the position (group grp in row row) and gives
// each lane its predictor: the upper-left pixel is sent raw, the rest of
// the first row is predicted from the left, the first and the last column
// from above, everything else from the four-neighbour model.
//
// Timing: a group costs 1 + NSTEPS + LANES + 1 cycles when the input is
// ready at once (11 with the defaults). flush is high in the UPDATE cycle
// of the last group of the image; the position then wraps for the next
// image.
module lpc_ctrl_fsm
  import lpc_pkg::*;
#(
  parameter int unsigned LANES   = 4,
  parameter int unsigned IMG_W   = 256,
  parameter int unsigned IMG_H   = 256,
  parameter logic [4:0]  ST1     = 5'b11001,  // FETCH
  parameter logic [4:0]  ST2     = 5'b10101,  // PREDICT
  parameter logic [4:0]  ST3     = 5'b00110,  // CODE
  parameter logic [4:0]  ST4     = 5'b01101,  // UPDATE
  parameter logic [3:0]  JMP12   = 4'b0111,
  parameter logic [3:0]  JMP23   = 4'b1001,
  parameter logic [3:0]  JMP34   = 4'b1101,
  parameter logic [3:0]  JMP41   = 4'b0110,
  localparam int unsigned WORDS  = IMG_W / LANES,
  localparam int unsigned GW     = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned RW     = (IMG_H > 1) ? $clog2(IMG_H) : 1,
  localparam int unsigned LW     = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic                   pred_done,
  output logic                   latch,
  output logic                   pred_run,
  output logic                   code_push,
  output logic [LW-1:0]          code_lane,
  output logic                   commit,
  output logic                   flush,
  output logic [GW-1:0]          grp,
  output logic [RW-1:0]          row,
  output pred_mode_e [LANES-1:0] mode,
  output logic [4:0]             state,
  output logic [3:0]             jump_sig
);

  typedef enum logic [4:0] {
    S_FETCH   = ST1,
    S_PREDICT = ST2,
    S_CODE    = ST3,
    S_UPDATE  = ST4
  } state_e;

  state_e st, st_nxt;
  logic   last_lane, last_grp, last_row;

  assign last_lane = (code_lane == LW'(LANES - 1));
  assign last_grp  = (grp == GW'(WORDS - 1));
  assign last_row  = (row == RW'(IMG_H - 1));

  always_comb begin
    st_nxt = st;
    unique case (st)
      S_FETCH:   if (in_valid)  st_nxt = S_PREDICT;
      S_PREDICT: if (pred_done) st_nxt = S_CODE;
      S_CODE:    if (last_lane) st_nxt = S_UPDATE;
      S_UPDATE:                 st_nxt = S_FETCH;
      default:                  st_nxt = S_FETCH;
    endcase
  end

  assign in_ready  = (st == S_FETCH);
  assign latch     = (st == S_FETCH) && in_valid;
  assign pred_run  = (st == S_PREDICT);
  assign code_push = (st == S_CODE);
  assign commit    = (st == S_UPDATE);
  assign flush     = (st == S_UPDATE) && last_grp && last_row;
  assign state     = st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_FETCH;
      code_lane <= '0;
      grp       <= '0;
      row       <= '0;
      jump_sig  <= '0;
    end else begin
      st <= st_nxt;
      if (st_nxt != st) begin
        unique case (st)
          S_FETCH:   jump_sig <= JMP12;
          S_PREDICT: jump_sig <= JMP23;
          S_CODE:    jump_sig <= JMP34;
          S_UPDATE:  jump_sig <= JMP41;
          default:   jump_sig <= '0;
        endcase
      end
      if (st == S_CODE) code_lane <= last_lane ? '0 : code_lane + 1'b1;
      if (st == S_UPDATE) begin
        grp <= last_grp ? '0 : grp + 1'b1;
        if (last_grp) row <= last_row ? '0 : row + 1'b1;
      end
    end
  end

  // Border handling, per lane, from the current position.
  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      int unsigned x;
      x = int'(grp) * LANES + i;
      if (row == '0 && x == 0)             mode[i] = PM_RAW;
      else if (row == '0)                  mode[i] = PM_LEFT;
      else if (x == 0 || x == IMG_W - 1)   mode[i] = PM_ABOVE;
      else                                 mode[i] = PM_FULL;
    end
  end

  // The state register only ever holds one of the four signature codes.
  a_legal_state: assert property (@(posedge clk) disable iff (!rst_n)
    st inside {S_FETCH, S_PREDICT, S_CODE, S_UPDATE});

endmodule
