// dst4_top: 13-point type IV discrete sine transform (DST-IV) engine built from
// six short quasi-band correlation systolic arrays with key-controlled
// obfuscation of the PE sign bits.
//
//   Y(k) = sqrt(2/N) * sum_{i=0}^{N-1} x(i) sin((2i+1)(2k+1)pi/(4N)),  N = 13
//
// Datapath: dst4_preproc (suffix sums x_p, weighting x_C, folding into the six
// input vectors) -> six qbc_array instances, each with its own obf_control
// (arrays 0..2 give the even output indices, 3..5 the odd ones) ->
// dst4_postproc (recombination into T(k), the T_a recursion, output rotation
// and sqrt(2/N) scaling). dst4_ctrl sequences the shared data, tag and
// coefficient streams.
//
// Interface: present x[0..12] with start; the frame is taken in the cycle where
// start and ready are both 1. y[0..12] is valid while out_valid is 1, ten cycles
// later, and is held until the next result. A new frame can be accepted every 5
// cycles. key[3j+p] is the key bit of PE p+1 of array j; with key = KEY_OK the
// output is the DST-IV, with any other key it is wrong.
//
// The six arrays of three PEs, the obfuscation controls with a 3-bit key each,
// and the pre/post-processing split follow the architecture description; the
// key is 18 bits (K[0..17]). The I/O format, widths and schedule are this
// design's own.
module dst4_top
  import dst4_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  sample_t           x   [N],
  input  logic [KEY_W-1:0]  key,
  output logic              ready,
  output logic              out_valid,
  output result_t           y   [N]
);

  logic       load, x_valid, tc, c_valid, hold, out_en;
  logic [1:0] x_idx, row;
  logic [2:0] c_idx, cap;
  data_t      vec     [NARR][PES];
  xp_t        xp0;
  wide_t      ta0;
  acc_t       rows    [NARR];

  dst4_ctrl u_ctrl (
    .clk, .rst_n, .start, .ready, .load, .x_valid, .x_idx, .tc,
    .c_valid, .c_idx, .row, .hold, .cap, .out_en, .out_valid
  );

  dst4_preproc u_pre (
    .clk, .rst_n, .load, .x, .vec, .xp0, .ta0
  );

  for (genvar j = 0; j < NARR; j++) begin : g_arr
    seqset_t seq;
    data_t xin;
    coef_t cin;

    obf_control #(
      .PES    (PES),
      .SEQ    (SEQ[j]),
      .KEY_OK (KEY_OK[PES*j +: PES])
    ) u_obf (
      .key (key[PES*j +: PES]),
      .seq (seq)
    );

    assign xin = x_valid ? vec[j][x_idx] : '0;
    assign cin = c_valid ? H[j][c_idx]   : '0;

    qbc_array u_arr (
      .clk, .rst_n,
      .x_in    (xin),
      .x2_in   ('0),
      .tc_in   (tc),
      .c_in    (cin),
      .c2_in   ('0),
      .tc1_in  (1'b1),
      .sub_seq (seq),
      .row     (row),
      .xsel    (1'b0),
      .y_out   (rows[j])
    );
  end

  dst4_postproc u_post (
    .clk, .rst_n, .hold, .cap, .out_en,
    .rows_in (rows), .xp0, .ta0, .y
  );

endmodule
