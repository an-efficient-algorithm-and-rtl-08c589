// tb_dst4_ctrl: checks the sequencer's schedule.
//
// start is driven with a random pattern (often held high, so frames follow one
// another at the maximum rate). The test records every cycle in which a frame
// was accepted (load = 1) and predicts from those cycles alone, for every later
// cycle, the values of x_valid/x_idx, tc, c_valid/c_idx, row, hold, cap,
// out_en and out_valid given in the schedule (n = cycles after the load cycle
// minus 1). It also checks that ready is 1 exactly when no frame is at
// n = 0..3, i.e. that loads are at least 5 cycles apart and no faster.
module tb_dst4_ctrl;

  localparam int CYCLES = 2000;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic ready, load, x_valid, tc, c_valid, hold, out_en, out_valid;
  logic [1:0] x_idx, row;
  logic [2:0] c_idx, cap;

  int checks = 0, failures = 0, loads = 0, min_gap = 1000;

  dst4_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what, input int t);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: %s", t, what);
    end
  endtask

  initial begin
    int last = -1000;
    logic [CYCLES+20:0] ld = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < CYCLES; t++) begin
      logic busy;
      logic e_xv, e_tc, e_cv, e_hold, e_oe, e_ov;
      logic [1:0] e_xi, e_row;
      logic [2:0] e_ci, e_cap;
      @(negedge clk);
      start = ($urandom_range(0, 3) != 0);
      #1;
      // predicted outputs from earlier loads: frame loaded at cycle L is at n = t-L-1
      busy = 1'b0;
      e_xv = 0; e_xi = 0; e_tc = 0; e_cv = 0; e_ci = 0; e_row = 0;
      e_hold = 0; e_cap = 0; e_oe = 0; e_ov = 0;
      for (int n = 0; n <= 9; n++) begin
        if (t - n - 1 >= 0 && ld[t - n - 1]) begin
          if (n <= 3) busy = 1'b1;
          if (n <= 2) begin e_xv = 1; e_xi = 2'(n); end
          if (n == 2) e_tc = 1;
          if (n >= 1 && n <= 5) begin e_cv = 1; e_ci = 3'(n - 1); end
          if (n >= 4 && n <= 6) e_row = 2'(n - 4);
          if (n == 4) e_hold = 1;
          if (n >= 5 && n <= 7) e_cap[n-5] = 1'b1;
          if (n == 8) e_oe = 1;
          if (n == 9) e_ov = 1;
        end
      end
      check(ready == !busy, "ready", t);
      check(load == (start && ready), "load", t);
      check(x_valid == e_xv && (!e_xv || x_idx == e_xi), "x stream", t);
      check(tc == e_tc, "tc", t);
      check(c_valid == e_cv && (!e_cv || c_idx == e_ci), "c stream", t);
      check(row == e_row, "row", t);
      check(hold == e_hold && cap == e_cap && out_en == e_oe && out_valid == e_ov, "strobes", t);
      if (load) begin
        ld[t] = 1'b1;
        loads++;
        if (t - last < min_gap) min_gap = t - last;
        last = t;
      end
    end
    check(loads > 100, "enough frames", CYCLES);
    check(min_gap == 5, "minimum spacing of 5 cycles reached", CYCLES);
    $display("loads=%0d min_gap=%0d", loads, min_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
