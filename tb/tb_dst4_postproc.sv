// tb_dst4_postproc: checks the output stage with array results built from the
// transform definition.
//
// For a random frame the test computes in floating point x_p, x_C and the
// auxiliary outputs T(k) = sum_i (-1)^i x_C(i) 2 sin(i k pi/13) and T_a(0).
// It then splits each combined row into an arbitrary B part and the remaining
// A or C part (scaled like the array accumulators, 2^(FRAC+GUARD)), drives them
// through the capture strobes, and compares Y with the DST-IV of the frame
// evaluated directly from its definition (tolerance 2 LSB). It also checks that
// Y only changes on out_en.
module tb_dst4_postproc;
  import dst4_pkg::*;

  localparam int FRAMES = 100;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, hold = 1'b0, out_en = 1'b0;
  logic [PES-1:0] cap = '0;
  acc_t rows_in [NARR];
  xp_t xp0;
  wide_t ta0;
  result_t y [N];

  int checks = 0, failures = 0;

  dst4_postproc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20*FRAMES + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x [N];
    real xp [N], xc [N], t [N];
    real oa [2][PES], oc [2][PES], rb;
    real acc, t0, sc, ref_y;
    result_t prev [N];
    sc = real'(longint'(1) << (FRAC + GUARD));
    for (int j = 0; j < NARR; j++) rows_in[j] = '0;
    xp0 = '0; ta0 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int i = 0; i < N; i++) x[i] = int'(sample_t'($urandom));
      for (int i = N-1; i >= 0; i--)
        xp[i] = ((i % 2 == 0) ? real'(x[i]) : -real'(x[i])) + ((i == N-1) ? 0.0 : xp[i+1]);
      t0 = 0.0;
      for (int i = 0; i < N; i++) begin
        xc[i] = xp[i] * $cos(PI * i / (2.0*N));
        t0 += ((i % 2 == 0) ? 1.0 : -1.0) * xp[i] * $sin(PI * i / (2.0*N));
      end
      for (int k = 0; k < N; k++) begin
        t[k] = 0.0;
        for (int i = 1; i < N; i++)
          t[k] += ((i % 2 == 0) ? 1.0 : -1.0) * xc[i] * 2.0 * $sin(PI * i * k / N);
      end
      oa[0] = '{t[4], t[10], t[12]};  oc[0] = '{-t[2], t[8], -t[6]};
      oa[1] = '{t[9], t[3],  t[1]};   oc[1] = '{-t[11], t[5], -t[7]};

      @(negedge clk);
      xp0 = xp_t'(longint'(xp[0]));
      ta0 = wide_t'(longint'(t0 * real'(1 << GUARD)));
      hold = 1'b1;
      @(negedge clk);
      hold = 1'b0;
      xp0 = '0; ta0 = '0;
      for (int r = 0; r < PES; r++) begin
        for (int h = 0; h < 2; h++) begin
          rb = real'($urandom_range(0, 2000000)) - 1000000.0;
          rows_in[3*h+1] = acc_t'(longint'(rb * sc));
          rows_in[3*h]   = acc_t'(longint'((oa[h][r] - rb) * sc));
          rows_in[3*h+2] = acc_t'(longint'((oc[h][r] - rb) * sc));
        end
        cap = 3'(1 << r);
        @(negedge clk);
        cap = '0;
      end
      for (int j = 0; j < NARR; j++) rows_in[j] = acc_t'({$urandom, $urandom});
      prev = y;
      @(negedge clk);
      checks++;
      if (y != prev) begin failures++; $display("FAIL y changed without out_en"); end
      out_en = 1'b1;
      @(negedge clk);
      out_en = 1'b0;
      for (int k = 0; k < N; k++) begin
        acc = 0.0;
        for (int i = 0; i < N; i++) acc += real'(x[i]) * $sin(PI * real'((2*i+1)*(2*k+1)) / real'(4*N));
        ref_y = acc * $sqrt(2.0 / N);
        checks++;
        if (real'(y[k]) - ref_y > 2.0 || ref_y - real'(y[k]) > 2.0) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d Y(%0d) got %0d want %f", f, k, y[k], ref_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
