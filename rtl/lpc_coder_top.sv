// lpc_coder_top: lossless linear-predictive image coder carrying several
// layers of ownership watermark.
//
// An 8-bit gray-scale image (IMG_W x IMG_H, 256 x 256 by default) enters in
// raster order, LANES (4) adjacent pixels of a row per transfer. Every pixel
// D is predicted from its neighbours above-left A, left B, above C and
// above-right E as (A + B + C + E) / 4; the prediction error D - model
// (mod 256) is Huffman coded through a loaded table and the codes are packed
// into 32-bit output words. The first pixel of the image is sent as a raw
// 8-bit literal; the rest of the first row is predicted from the left
// neighbour, the first and the last column from the pixel above.
//
// Watermarks built into the hardware (parameters, defaults as in the
// source's examples):
//   XFORM_SIG   8 bits, two per lane: each pair sum is shift-then-add (0)
//               or add-then-shift (1)                       -> lpc_pred_lane
//   LANE_DELAY  1 bit per lane: a lane whose first-level operations are
//               held back one step without need (1)         -> lpc_pred_array
//   ST1..ST4    5-bit state codes of the controller, JMP* the 4-bit
//               transition labels                           -> lpc_ctrl_fsm
// The Huffman table itself, with its own signature, is computed offline and
// loaded through the tbl_* port before coding (huff_table).
//
// Block flow per group: lpc_ctrl_fsm latches the group (FETCH),
// lpc_line_buffer supplies the neighbours, lpc_pred_array runs the lanes
// (PREDICT, 4 or 5 cycles), huff_table and huff_bit_packer code one lane
// per cycle (CODE), and the group is written to the line buffer (UPDATE).
// A group takes 1 + 5 + 4 + 1 = 11 cycles with the defaults; a 256 x 256
// image 16384 groups, about 180k cycles, 7.2 ms at the 25 MHz the source
// reports for its FPGA version.
//
// Interface: in_valid/in_ready handshake on in_pix (lane i = column x+i).
// out_valid pulses once per 32-bit word (first bit in bit 31); no
// backpressure. The last word of an image has out_last set, out_bits real
// bits and zero padding below them. state and jump_sig expose the
// controller's signature registers.
module lpc_coder_top
  import lpc_pkg::*;
#(
  parameter int unsigned         LANES      = 4,
  parameter int unsigned         IMG_W      = 256,
  parameter int unsigned         IMG_H      = 256,
  parameter logic [2*LANES-1:0]  XFORM_SIG  = 8'b10101010,
  parameter logic [LANES-1:0]    LANE_DELAY = 4'b1010,
  parameter logic [4:0]          ST1        = 5'b11001,
  parameter logic [4:0]          ST2        = 5'b10101,
  parameter logic [4:0]          ST3        = 5'b00110,
  parameter logic [4:0]          ST4        = 5'b01101,
  parameter logic [3:0]          JMP12      = 4'b0111,
  parameter logic [3:0]          JMP23      = 4'b1001,
  parameter logic [3:0]          JMP34      = 4'b1101,
  parameter logic [3:0]          JMP41      = 4'b0110
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // Huffman table load
  input  logic                   tbl_wr_en,
  input  pixel_t                 tbl_wr_sym,
  input  huff_code_t             tbl_wr_code,
  // pixel input
  input  logic                   in_valid,
  output logic                   in_ready,
  input  pixel_t     [LANES-1:0] in_pix,
  // coded output
  output logic                   out_valid,
  output logic [31:0]            out_word,
  output logic                   out_last,
  output logic [5:0]             out_bits,
  // signature registers
  output logic [4:0]             state,
  output logic [3:0]             jump_sig
);

  localparam int unsigned WORDS = IMG_W / LANES;
  localparam int unsigned GW    = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned LW    = (LANES > 1) ? $clog2(LANES) : 1;

  logic                   latch, pred_run, pred_done, code_push, commit, flush;
  logic [LW-1:0]          code_lane;
  logic [GW-1:0]          grp;
  pred_mode_e [LANES-1:0] mode;
  pixel_t     [LANES-1:0] cur, a, b, c, e, err;
  huff_code_t             tbl_code, push_code;

  lpc_ctrl_fsm #(
    .LANES(LANES), .IMG_W(IMG_W), .IMG_H(IMG_H),
    .ST1(ST1), .ST2(ST2), .ST3(ST3), .ST4(ST4),
    .JMP12(JMP12), .JMP23(JMP23), .JMP34(JMP34), .JMP41(JMP41)
  ) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .pred_done, .latch, .pred_run,
    .code_push, .code_lane, .commit, .flush, .grp, .row(), .mode,
    .state, .jump_sig
  );

  // Current group register (the D pixels).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cur <= '0;
    else if (latch) cur <= in_pix;
  end

  lpc_line_buffer #(.LANES(LANES), .IMG_W(IMG_W)) u_lbuf (
    .clk, .rst_n, .grp, .cur, .commit, .a, .b, .c, .e
  );

  lpc_pred_array #(
    .LANES(LANES), .XFORM_SIG(XFORM_SIG), .LANE_DELAY(LANE_DELAY)
  ) u_pred (
    .clk, .rst_n, .run(pred_run), .mode, .a, .b, .c, .d(cur), .e,
    .done(pred_done), .step(), .model(), .err
  );

  huff_table u_tbl (
    .clk, .wr_en(tbl_wr_en), .wr_sym(tbl_wr_sym), .wr_code(tbl_wr_code),
    .sym(err[code_lane]), .code(tbl_code)
  );

  // The upper-left pixel goes out as an 8-bit literal, all else through
  // the table.
  always_comb begin
    if (mode[code_lane] == PM_RAW) begin
      push_code.len  = LEN_W'(PIX_W);
      push_code.code = MAX_CODE'(err[code_lane]);
    end else begin
      push_code = tbl_code;
    end
  end

  huff_bit_packer u_pack (
    .clk, .rst_n, .in_valid(code_push), .in_code(push_code), .flush,
    .out_valid, .out_word, .out_last, .out_bits
  );

endmodule
