// lpc_pred_array: LANES prediction lanes working on one group of adjacent
// pixels of a row, plus the step sequencer that schedules them.
//
// Each lane (lpc_pred_lane) needs four operation levels on its shared adder.
// The sequencer counts steps while run is high. Lane i runs level
// (step - LANE_DELAY[i]), so a lane whose delay bit is 0 follows the normal
// schedule (levels in steps 0..3) and a lane whose delay bit is 1 has its
// first-level operations held back one step although nothing forces it to
// wait (levels in steps 1..4). Such an artificial dependency marks a '1' in
// the schedule, a normal one a '0'. With any delayed lane the prediction
// phase takes NSTEPS = 5 cycles instead of 4: that is the price of the
// schedule watermark (one step in five, 20 %).
//
// XFORM_SIG carries two transformation bits per lane, most significant pair
// for lane 0: {AB form, CE form}, 1 = add-then-shift, 0 = shift-then-add.
// The default 8'b10101010 gives every lane (A+B)>>2 and C>>2 + E>>2, as in
// the source's four-lane datapath example. LANE_DELAY bit i is lane i; the
// default 4'b1010 repeats the source's two-lane schedule example (first lane
// normal, second lane's three first-level operations delayed, "000111") over
// the two lane pairs, which is this design's choice for four lanes.
//
// Interface: hold run high from the first step; done is high in the last
// step (step NSTEPS-1). model and err are valid from the cycle after done until the
// next run. Inputs must stay stable while run is high. The counter clears
// when run is low.
module lpc_pred_array
  import lpc_pkg::*;
#(
  parameter int unsigned         LANES      = 4,
  parameter logic [2*LANES-1:0]  XFORM_SIG  = 8'b10101010,
  parameter logic [LANES-1:0]    LANE_DELAY = 4'b1010
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   run,
  input  pred_mode_e [LANES-1:0] mode,
  input  pixel_t     [LANES-1:0] a,
  input  pixel_t     [LANES-1:0] b,
  input  pixel_t     [LANES-1:0] c,
  input  pixel_t     [LANES-1:0] d,
  input  pixel_t     [LANES-1:0] e,
  output logic                   done,
  output logic [2:0]             step,
  output pixel_t     [LANES-1:0] model,
  output pixel_t     [LANES-1:0] err
);

  localparam int unsigned NSTEPS = 4 + ((|LANE_DELAY) ? 1 : 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           step <= '0;
    else if (!run || step == 3'(NSTEPS - 1)) step <= '0;
    else                                  step <= step + 3'd1;
  end

  assign done = run && (step == 3'(NSTEPS - 1));

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    localparam logic [2:0] DLY = {2'b0, LANE_DELAY[i]};
    logic       en;
    logic [2:0] lvl;

    assign lvl = step - DLY;
    assign en  = run && (lvl <= 3'd3);  // lvl wraps above 3 before the lane starts

    lpc_pred_lane #(
      .XF_AB(XFORM_SIG[2*(LANES-1-i)+1]),
      .XF_CE(XFORM_SIG[2*(LANES-1-i)])
    ) u_lane (
      .clk     (clk),
      .rst_n   (rst_n),
      .op_en   (en),
      .op_level(lvl[1:0]),
      .mode    (mode[i]),
      .a       (a[i]),
      .b       (b[i]),
      .c       (c[i]),
      .d       (d[i]),
      .e       (e[i]),
      .model   (model[i]),
      .err     (err[i])
    );
  end

endmodule
