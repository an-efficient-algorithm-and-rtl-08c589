// tb_dst4_preproc: checks the input stage against a floating-point model.
//
// For random frames (and a full-scale frame) the test computes, independently
// of the RTL, x_p(i) = sum_{j>=i} (-1)^j x(j), x_C(i) = x_p(i) cos(i pi/26),
// the folded pairs, the six array input vectors and T_a(0), all scaled by
// 2^GUARD, and compares them with the registered outputs (tolerance 2 LSB for
// the truncation plus the rounding of the 18-bit constants; exact for x_p(0)). It also checks that the outputs hold
// while load is 0.
module tb_dst4_preproc;
  import dst4_pkg::*;

  localparam int FRAMES = 200;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  sample_t x [N];
  data_t vec [NARR][PES];
  xp_t xp0;
  wide_t ta0;

  int checks = 0, failures = 0;

  dst4_preproc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4*FRAMES + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(input real got, input real want, input real tol, input string what);
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %f want %f", what, got, want);
    end
  endtask

  initial begin
    real xpr [N];
    real xc [N];
    real u [7], d [7];
    real ev [NARR][PES];
    real t0, mag;
    real g;
    g = real'(1 << GUARD);
    for (int i = 0; i < N; i++) x[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++)
        x[i] = (f == 0) ? ((i % 2 == 0) ? 16'sd32767 : -16'sd32768) : sample_t'($urandom);
      load = 1'b1;
      // reference
      for (int i = N-1; i >= 0; i--) begin
        real term;
        term = (i % 2 == 0) ? real'(x[i]) : -real'(x[i]);
        xpr[i] = term + ((i == N-1) ? 0.0 : xpr[i+1]);
      end
      t0 = 0.0;
      for (int i = 0; i < N; i++) begin
        xc[i] = xpr[i] * $cos(PI * i / (2.0*N)) * g;
        t0 += ((i % 2 == 0) ? 1.0 : -1.0) * xpr[i] * $sin(PI * i / (2.0*N)) * g;
      end
      for (int i = 1; i <= 6; i++) begin
        u[i] = xc[i] + xc[N-i];
        d[i] = xc[i] - xc[N-i];
      end
      ev[0] = '{u[4], u[3], u[1]};
      ev[2] = '{u[2], -u[5], u[6]};
      ev[3] = '{d[4], d[3], d[1]};
      ev[5] = '{d[2], -d[5], -d[6]};
      for (int m = 0; m < PES; m++) begin
        ev[1][m] = ev[2][m] - ev[0][m];
        ev[4][m] = ev[5][m] - ev[3][m];
      end
      @(negedge clk);
      load = 1'b0;
      for (int i = 0; i < N; i++) x[i] = sample_t'($urandom);   // must not matter
      repeat ($urandom_range(0, 2)) @(negedge clk);
      checks++;
      if (real'(xp0) != xpr[0]) begin
        failures++;
        $display("FAIL xp0 got %0d want %f", xp0, xpr[0]);
      end
      // tolerance: truncation (2 LSB) plus constant rounding (2^-19 relative per term)
      mag = 0.0;
      for (int i = 0; i < N; i++) mag += (xpr[i] < 0 ? -xpr[i] : xpr[i]) * g;
      near(real'(ta0), t0, 2.0 + mag / real'(1 << 18), "T_a(0)");
      for (int j = 0; j < NARR; j++)
        for (int m = 0; m < PES; m++)
          near(real'(vec[j][m]), ev[j][m], 4.0 + mag / real'(1 << 17), $sformatf("vec[%0d][%0d]", j, m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
