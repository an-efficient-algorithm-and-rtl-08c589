// tb_dst4_top: end-to-end test of the DST-IV engine at its default parameters.
//
// Random 13-sample frames are transformed and compared with the DST-IV computed
// here in floating point from its definition. The test exercises and counts:
//   - isolated frames (latency of exactly 10 cycles from the load cycle),
//   - back-to-back frames at the maximum rate of one frame per 5 cycles,
//   - start requests while the engine is not ready (they must be ignored),
//   - full-scale inputs (+/-32767 patterns),
//   - wrong obfuscation keys (every single-bit error must corrupt the output).
module tb_dst4_top;
  import dst4_pkg::*;

  localparam int TOL = 3;           // allowed error in output LSBs
  localparam int WATCHDOG = 20000;  // cycles

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  sample_t x [N];
  logic [KEY_W-1:0] key;
  logic ready, out_valid;
  result_t y [N];

  int checks = 0, failures = 0;
  int n_isolated = 0, n_b2b = 0, n_busy = 0, n_fullscale = 0, n_badkey = 0;
  int maxerr = 0;

  dst4_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real dst4_ref(input sample_t xs [N], input int k);
    real acc = 0.0;
    real pi = 3.14159265358979323846;
    for (int i = 0; i < N; i++)
      acc += real'(xs[i]) * $sin(pi * real'((2*i+1)*(2*k+1)) / real'(4*N));
    return acc * $sqrt(2.0 / real'(N));
  endfunction

  // compare y with the reference of xs; returns the largest error
  function automatic int max_error(input sample_t xs [N]);
    int m = 0;
    for (int k = 0; k < N; k++) begin
      real e = real'(y[k]) - dst4_ref(xs, k);
      int ie = int'(e < 0 ? -e : e);
      if (ie > m) m = ie;
    end
    return m;
  endfunction

  function automatic void check_frame(input sample_t xs [N], input string what);
    int m = max_error(xs);
    checks++;
    if (m > maxerr) maxerr = m;
    if (m > TOL) begin
      failures++;
      $display("FAIL %s: error %0d", what, m);
      for (int k = 0; k < N; k++) $display("  x=%0d y=%0d ref=%f", xs[k], y[k], dst4_ref(xs, k));
    end
  endfunction

  task automatic rand_frame(output sample_t xs [N], input int mode);
    for (int i = 0; i < N; i++)
      case (mode)
        1:       xs[i] = (($urandom & 1) != 0) ? 16'sd32767 : -16'sd32767;
        2:       xs[i] = sample_t'($urandom_range(0, 200)) - 16'sd100;
        default: xs[i] = sample_t'($urandom);
      endcase
  endtask

  // frames in flight and the time of their load edge
  localparam int MAXF = 256;
  sample_t fr [MAXF][N];       // frames in flight, by issue order
  int n_issued = 0, n_done = 0;
  logic key_test = 1'b0;        // checker ignores results while set
  time load_t [$];

  // issue one frame: hold start until ready, return after the load edge
  task automatic issue(input sample_t xs [N]);
    @(negedge clk);
    x = xs;
    start = 1'b1;
    while (!ready) begin
      n_busy++;
      @(negedge clk);
    end
    @(posedge clk);
    fr[n_issued % MAXF] = xs;
    n_issued++;
    load_t.push_back($time);
    @(negedge clk);
    start = 1'b0;
  endtask

  // checker: every out_valid belongs to the oldest outstanding frame
  always @(posedge clk) begin
    if (rst_n && out_valid && !key_test) begin
      sample_t cur [N];
      time lat;
      cur = fr[n_done % MAXF];
      n_done++;
      lat = ($time - load_t.pop_front()) / 10;
      check_frame(cur, "frame");
      checks++;
      if (lat != 10) begin
        failures++;
        $display("FAIL latency %0d", lat);
      end
    end
  end

  initial begin
    sample_t xs [N];
    key = KEY_OK;
    for (int i = 0; i < N; i++) x[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // isolated frames, including full-scale and small inputs
    for (int f = 0; f < 20; f++) begin
      rand_frame(xs, f % 3);
      if (f % 3 == 1) n_fullscale++;
      issue(xs);
      repeat (14) @(posedge clk);
      n_isolated++;
    end

    // back-to-back frames: start held high, a frame must be taken every 5 cycles
    begin
      time first;
      for (int f = 0; f < 30; f++) begin
        rand_frame(xs, 0);
        issue(xs);
        if (f == 0) first = load_t[$];
        n_b2b++;
      end
      checks++;
      if ((load_t[$] - first) / 10 != 29*5) begin
        failures++;
        $display("FAIL back-to-back period: %0d cycles for 29 intervals", (load_t[$] - first) / 10);
      end
      repeat (20) @(posedge clk);
    end

    // wrong keys: every single-bit error must change the result
    key_test = 1'b1;
    for (int b = 0; b < KEY_W; b++) begin
      rand_frame(xs, 0);
      @(negedge clk);
      key = KEY_OK ^ (KEY_W'(1) << b);
      x = xs;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!out_valid) @(negedge clk);
      checks++;
      n_badkey++;
      if (max_error(xs) <= TOL) begin
        failures++;
        $display("FAIL key bit %0d flipped but output still correct", b);
      end
      @(posedge clk);
    end
    @(negedge clk);
    key = KEY_OK;
    key_test = 1'b0;

    // correct key again after the wrong ones
    rand_frame(xs, 0);
    issue(xs);
    repeat (14) @(posedge clk);

    checks++;
    if (n_done != n_issued) begin failures++; $display("FAIL %0d frames never returned", n_issued - n_done); end
    if (n_isolated == 0 || n_b2b == 0 || n_busy == 0 || n_fullscale == 0 || n_badkey == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("isolated=%0d back_to_back=%0d busy_cycles=%0d fullscale=%0d wrong_keys=%0d max_error=%0d",
             n_isolated, n_b2b, n_busy, n_fullscale, n_badkey, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
