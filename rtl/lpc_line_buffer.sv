// lpc_line_buffer: neighbour supply for the raster-scan predictor.
//
// Pixels arrive row by row in groups of LANES adjacent pixels. To predict a
// group at columns x..x+LANES-1 of row y the lanes need, from row y-1, the
// pixels x-1 .. x+LANES (A, C and E of every lane) and, from row y, the
// pixel x-1 (B of the first lane; the other lanes take B from the group
// itself). The buffer keeps one image row in a memory of IMG_W/LANES words
// of LANES pixels, so each pixel of the image is read from outside once
// and re-used for the row below.
//
// Word grp of the memory still holds row y-1 until the group is committed;
// word grp+1 is read through a second read port for the E of the last
// lane. On commit the current group overwrites word grp, and two registers
// keep what the overwrite would lose: the last pixel of the old word (the A
// of the next group's first lane) and the last pixel of the current group
// (its B).
//
// Interface: a, b, c, e are combinational from grp, cur and the stored
// state; commit is one cycle. At the start of a row (grp = 0) the first
// lane's A and B, and at the end of a row the last lane's E, refer to the
// wrong row; the border predictors never use them. The memory is not reset:
// row 0 predicts from the left only. Keeping one row and reading two words
// per group is this design's choice; the source only says the neighbour set
// was chosen so that pixels can be re-used during the raster scan.
module lpc_line_buffer
  import lpc_pkg::*;
#(
  parameter int unsigned LANES = 4,
  parameter int unsigned IMG_W = 256,
  localparam int unsigned WORDS = IMG_W / LANES,
  localparam int unsigned GW    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [GW-1:0]          grp,
  input  pixel_t     [LANES-1:0] cur,
  input  logic                   commit,
  output pixel_t     [LANES-1:0] a,
  output pixel_t     [LANES-1:0] b,
  output pixel_t     [LANES-1:0] c,
  output pixel_t     [LANES-1:0] e
);

  pixel_t [LANES-1:0] mem [WORDS];
  pixel_t             above_left;  // row y-1, column x-1
  pixel_t             left;        // row y,   column x-1
  pixel_t [LANES-1:0] above;
  pixel_t             above_next0;  // row y-1, column x+LANES
  logic   [GW-1:0]    grp_next;

  assign grp_next   = (grp == GW'(WORDS - 1)) ? '0 : grp + 1'b1;
  assign above      = mem[grp];
  assign above_next0 = mem[grp_next][0];

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      c[i] = above[i];
      a[i] = (i == 0) ? above_left : above[(i == 0) ? 0 : i - 1];
      b[i] = (i == 0) ? left       : cur[(i == 0) ? 0 : i - 1];
      e[i] = (i == LANES - 1) ? above_next0 : above[(i == LANES - 1) ? 0 : i + 1];
    end
  end

  always_ff @(posedge clk) begin
    if (commit) mem[grp] <= cur;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      above_left <= '0;
      left       <= '0;
    end else if (commit) begin
      above_left <= above[LANES-1];
      left       <= cur[LANES-1];
    end
  end

endmodule
