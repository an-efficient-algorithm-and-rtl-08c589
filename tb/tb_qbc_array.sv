// tb_qbc_array: checks one 3-PE quasi-band correlation array.
//
// For random data vectors x[0..2], random coefficient streams h[0..4] and random
// sign sequences, the array must return y[r] = sum_c (-1)^s(c,r) h[r+c] x[c] in
// output cycles n = 5, 6, 7 of the frame, where s(c,r) is the sign bit of the PE
// holding column c (PE 3-c) in row r. Frames are issued every 5 cycles, the
// array's maximum rate, so consecutive frames overlap. The second data link
// (xsel = 1) is exercised too.
module tb_qbc_array;
  import dst4_pkg::*;

  localparam int FRAMES = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  data_t x_in, x2_in;
  coef_t c_in, c2_in;
  logic tc_in, tc1_in, xsel;
  logic [PES-1:0][PES-1:0] sub_seq;
  logic [1:0] row;
  acc_t y_out;

  int checks = 0, failures = 0;

  qbc_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (FRAMES*5 + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  data_t xv [FRAMES][PES];
  data_t xv2 [FRAMES][PES];
  coef_t hv [FRAMES][5];
  logic [PES-1:0][PES-1:0] sv [FRAMES];
  logic sel [FRAMES];

  function automatic acc_t expect_row(int f, int r);
    acc_t acc = '0;
    for (int c = 0; c < PES; c++) begin
      acc_t term = acc_t'(sel[f] ? xv2[f][c] : xv[f][c]) * acc_t'(hv[f][r+c]);
      if (sv[f][PES-1-c][r]) acc -= term;
      else                   acc += term;
    end
    return acc;
  endfunction

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      for (int c = 0; c < PES; c++) begin
        xv[f][c]  = data_t'($urandom) >>> 2;
        xv2[f][c] = data_t'($urandom) >>> 2;
      end
      for (int j = 0; j < 5; j++) hv[f][j] = coef_t'($urandom);
      sv[f]  = (PES*PES)'($urandom);
      sel[f] = (f % 4 == 3);
    end
    x_in = '0; x2_in = '0; c_in = '0; c2_in = coef_t'(12345); tc_in = 1'b0; tc1_in = 1'b1;
    xsel = 1'b0; sub_seq = '0; row = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // cycle t = 5*f + n drives frame f step n; several frames overlap
    for (int t = 0; t < FRAMES*5 + 10; t++) begin
      @(negedge clk);
      x_in = '0; x2_in = '0; tc_in = 1'b0; c_in = '0;
      for (int f = 0; f < FRAMES; f++) begin
        automatic int n = t - 5*f;
        if (n >= 0 && n <= 2) begin x_in = xv[f][n]; x2_in = xv2[f][n]; end
        if (n == 2) tc_in = 1'b1;
        if (n >= 1 && n <= 5) c_in = hv[f][n-1];
        if (n >= 4 && n <= 6) begin row = 2'(n-4); sub_seq = sv[f]; xsel = sel[f]; end
      end
      @(posedge clk);
      #1;
      for (int f = 0; f < FRAMES; f++) begin
        automatic int n = t - 5*f;
        if (n >= 4 && n <= 6) begin
          checks++;
          if (y_out !== expect_row(f, n-4)) begin
            failures++;
            if (failures < 10) $display("FAIL frame %0d row %0d: got %0d want %0d", f, n-4, y_out, expect_row(f, n-4));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
