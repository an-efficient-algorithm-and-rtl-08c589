// dst4_ctrl: sequencer of the DST-IV engine.
//
// A frame is accepted when start and ready are both 1 (load = 1 that cycle; the
// pre-processing registers capture the samples). The frame then runs for
// n = 0..9 cycles, tracked by a one-hot token shift register act[n], and this
// block produces the streams and strobes shared by the six arrays:
//
//   n = 0..2  x_valid, x_idx = n         feed vector element n to every array
//   n = 2     tc                         load tag
//   n = 1..5  c_valid, c_idx = n-1       feed coefficient h[n-1]
//   n = 4..6  row  = n-4                 row whose sign bits the PEs use
//   n = 4     hold                       post-processing latches x_p(0), T_a(0)
//   n = 5..7  cap[n-5]                   post-processing captures array row n-5
//   n = 8     out_en                     post-processing registers Y
//   n = 9     out_valid                  Y available
//
// ready is 1 when no frame is at n = 0..3, so frames may overlap: a new frame
// can start every 5 cycles (throughput N samples per 5 cycles, latency 10
// cycles from the load cycle to out_valid). The use of control tags follows the
// architecture description; the cycle numbers are this design's schedule.
module dst4_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       ready,
  output logic       load,
  output logic       x_valid,
  output logic [1:0] x_idx,
  output logic       tc,
  output logic       c_valid,
  output logic [2:0] c_idx,
  output logic [1:0] row,
  output logic       hold,
  output logic [2:0] cap,
  output logic       out_en,
  output logic       out_valid
);

  localparam int STEPS = 10;
  logic [STEPS-1:0] act;

  assign ready = ~|act[3:0];
  assign load  = start & ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) act <= '0;
    else        act <= {act[STEPS-2:0], load};
  end

  always_comb begin
    x_valid = |act[2:0];
    x_idx   = act[2] ? 2'd2 : (act[1] ? 2'd1 : 2'd0);
    tc      = act[2];
    c_valid = |act[5:1];
    c_idx   = act[5] ? 3'd4 : act[4] ? 3'd3 : act[3] ? 3'd2 : act[2] ? 3'd1 : 3'd0;
    row     = act[6] ? 2'd2 : (act[5] ? 2'd1 : 2'd0);
    hold    = act[4];
    cap     = act[7:5];
    out_en  = act[8];
    out_valid = act[9];
  end

  // at most one frame may be in its feeding phase (n = 0..4)
  a_one_feeding: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(act[4:0]));

endmodule
