// qbc_array: linear systolic array of PES processing elements that computes one
// short quasi-band correlation, i.e. the product of a PES x PES Hankel matrix
// M[r][c] = (+/-) h[r+c] with a PES-element vector x.
//
// Data, tags and coefficients enter at PE 1 and travel towards PE PES; the
// partial sum starts at 0 in PE 1 and leaves PE PES. Schedule (n = cycle of a
// frame, PES = 3):
//
//   n = 0..2    x_in = x[0], x[1], x[2]; tc_in = 1 only at n = 2
//   n = 1..5    c_in = h[0] .. h[4]                      (tc1_in = 1)
//   n = 4..6    row = 0, 1, 2: each PE adds +/- x*c into the partial sum
//   n = 5..7    y_out = row 0, 1, 2 of M*x               (registered)
//
// The data link has two register stages per PE (the PE's own link register plus
// one register between PEs) while the tag and coefficient links have one, so the
// single tc pulse meets x[2] in PE 1, x[1] in PE 2 and x[0] in PE 3: PE p holds
// x[PES-p]. The coefficient register in each PE adds a cycle, so in row r every
// PE sees h[r+col] for the column it holds, and the combinational partial-sum
// chain delivers a full row per cycle. A new frame may start every 5 cycles.
//
// The number of PEs per array, the PE function and the direction of the links
// follow the architecture description. The link delays, the combinational
// partial-sum chain and the output register are this design's timing, chosen so
// that the listed schedule computes the product; the description does not give
// cycle-level timing. The sign of PE p in row r is {sub_seq[p][row], xsel}.
module qbc_array #(
  parameter int PES = dst4_pkg::PES,
  parameter int W_D = dst4_pkg::W_D,
  parameter int W_C = dst4_pkg::W_C,
  parameter int W_Y = dst4_pkg::W_Y
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic signed [W_D-1:0]          x_in,
  input  logic signed [W_D-1:0]          x2_in,
  input  logic                           tc_in,
  input  logic signed [W_C-1:0]          c_in,
  input  logic signed [W_C-1:0]          c2_in,
  input  logic                           tc1_in,
  input  logic [PES-1:0][PES-1:0]        sub_seq,   // [PE][row]
  input  logic [$clog2(PES)-1:0]         row,
  input  logic                           xsel,
  output logic signed [W_Y-1:0]          y_out
);

  logic signed [W_D-1:0] xe1 [PES+1];
  logic signed [W_D-1:0] xe2 [PES+1];
  logic signed [W_D-1:0] xo1 [PES];
  logic signed [W_D-1:0] xo2 [PES];
  logic signed [W_C-1:0] c1  [PES+1];
  logic signed [W_C-1:0] c2  [PES+1];
  logic                  tc  [PES+1];
  logic                  tc1 [PES+1];
  logic signed [W_Y-1:0] y   [PES+1];

  assign xe1[0] = x_in;
  assign xe2[0] = x2_in;
  assign c1[0]  = c_in;
  assign c2[0]  = c2_in;
  assign tc[0]  = tc_in;
  assign tc1[0] = tc1_in;
  assign y[0]   = '0;

  for (genvar p = 0; p < PES; p++) begin : g_pe
    dst4_pe #(.W_D(W_D), .W_C(W_C), .W_Y(W_Y)) u_pe (
      .clk    (clk),
      .rst_n  (rst_n),
      .x_e1   (xe1[p]),
      .x_e2   (xe2[p]),
      .c1     (c1[p]),
      .c2     (c2[p]),
      .tc     (tc[p]),
      .tc1    (tc1[p]),
      .sign   ({sub_seq[p][row], xsel}),
      .y      (y[p]),
      .x_e1_o (xo1[p]),
      .x_e2_o (xo2[p]),
      .c1_o   (c1[p+1]),
      .c2_o   (c2[p+1]),
      .tc_o   (tc[p+1]),
      .tc1_o  (tc1[p+1]),
      .y_o    (y[p+1])
    );

    // second register stage on the data links between neighbouring PEs
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xe1[p+1] <= '0;
        xe2[p+1] <= '0;
      end else begin
        xe1[p+1] <= xo1[p];
        xe2[p+1] <= xo2[p];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_out <= '0;
    else        y_out <= y[PES];
  end

endmodule
