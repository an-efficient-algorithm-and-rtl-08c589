// dst4_pe: processing element of the quasi-band correlation systolic arrays.
//
// Each PE has one multiplier and one adder/subtractor. It passes two data links
// (x_e1, x_e2), two coefficient links (c1, c2) and two tag bits (tc, tc1) on to
// its neighbour through one register each. When the load tag tc is 1 it stores
// the data present on x_e1/x_e2 in its internal registers x_i1/x_i2; otherwise
// the stored values are kept. Every cycle the coefficient register c takes c1
// when tc1 is 1, else c2. The partial-sum output is
//
//     y_o = y +/- x * c
//
// where sign[1] selects subtraction, sign[0] selects the second operand (x_2
// instead of x_1), and x is the link value x_e when tc = 1 (the word being
// loaded this cycle) or the stored value x_i when tc = 0.
//
// All of the above is the PE function given for this architecture. Word widths
// are this design's choice. The partial-sum path y -> y_o is combinational: the
// function specifies the registered links with "<=" but gives y' only as a
// value, and the arrays built from this PE (qbc_array) rely on it.
module dst4_pe #(
  parameter int W_D = dst4_pkg::W_D,
  parameter int W_C = dst4_pkg::W_C,
  parameter int W_Y = dst4_pkg::W_Y
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [W_D-1:0] x_e1,
  input  logic signed [W_D-1:0] x_e2,
  input  logic signed [W_C-1:0] c1,
  input  logic signed [W_C-1:0] c2,
  input  logic                  tc,
  input  logic                  tc1,
  input  logic        [1:0]     sign,
  input  logic signed [W_Y-1:0] y,
  output logic signed [W_D-1:0] x_e1_o,
  output logic signed [W_D-1:0] x_e2_o,
  output logic signed [W_C-1:0] c1_o,
  output logic signed [W_C-1:0] c2_o,
  output logic                  tc_o,
  output logic                  tc1_o,
  output logic signed [W_Y-1:0] y_o
);

  logic signed [W_D-1:0] x_i1, x_i2;   // stored data
  logic signed [W_C-1:0] c;            // coefficient register
  logic signed [W_D-1:0] op;           // selected data operand
  logic signed [W_D+W_C-1:0] prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_e1_o <= '0;
      x_e2_o <= '0;
      c1_o   <= '0;
      c2_o   <= '0;
      tc_o   <= 1'b0;
      tc1_o  <= 1'b0;
      x_i1   <= '0;
      x_i2   <= '0;
      c      <= '0;
    end else begin
      x_e1_o <= x_e1;
      x_e2_o <= x_e2;
      c1_o   <= c1;
      c2_o   <= c2;
      tc_o   <= tc;
      tc1_o  <= tc1;
      if (tc) begin
        x_i1 <= x_e1;
        x_i2 <= x_e2;
      end
      c <= tc1 ? c1 : c2;
    end
  end

  always_comb begin
    unique case ({tc, sign[0]})
      2'b00:   op = x_i1;
      2'b01:   op = x_i2;
      2'b10:   op = x_e1;
      default: op = x_e2;
    endcase
    prod = op * c;
    if (sign[1]) y_o = y - W_Y'(prod);
    else         y_o = y + W_Y'(prod);
  end

endmodule
