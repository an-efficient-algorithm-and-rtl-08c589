// tb_dst4_pe: checks the processing element against its function table.
//
// Random link values, tags and sign codes are applied every cycle. The test
// keeps its own copy of the PE state (stored x_i1/x_i2, coefficient register)
// and checks, every cycle:
//   - the six link outputs are the inputs of the previous cycle,
//   - y_o = y +/- x*c for all four sign codes, with x taken from the links when
//     tc = 1 and from the stored words when tc = 0,
//   - the coefficient register follows c1 when tc1 = 1 and c2 otherwise.
module tb_dst4_pe;
  import dst4_pkg::*;

  localparam int CYCLES = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  data_t x_e1, x_e2, x_e1_o, x_e2_o;
  coef_t c1, c2, c1_o, c2_o;
  logic tc, tc1, tc_o, tc1_o;
  logic [1:0] sign;
  acc_t y, y_o;

  int checks = 0, failures = 0;
  int seen_code [8];

  dst4_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    data_t m_x1 = '0, m_x2 = '0, p_e1, p_e2, opnd;
    coef_t m_c = '0, p_c1, p_c2;
    logic  p_tc, p_tc1;
    acc_t  want;
    x_e1 = '0; x_e2 = '0; c1 = '0; c2 = '0; tc = 0; tc1 = 0; sign = '0; y = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < CYCLES; t++) begin
      @(negedge clk);
      x_e1 = data_t'($urandom); x_e2 = data_t'($urandom);
      c1 = coef_t'($urandom);   c2 = coef_t'($urandom);
      tc = ($urandom_range(0, 3) == 0); tc1 = $urandom_range(0, 1);
      sign = 2'($urandom); y = acc_t'({$urandom, $urandom});
      #1;
      // combinational output with the current state
      opnd = tc ? (sign[0] ? x_e2 : x_e1) : (sign[0] ? m_x2 : m_x1);
      want = sign[1] ? y - acc_t'(opnd) * acc_t'(m_c) : y + acc_t'(opnd) * acc_t'(m_c);
      check(y_o == want, $sformatf("y_o sign=%b tc=%b got %0d want %0d", sign, tc, y_o, want));
      seen_code[{tc, sign}]++;
      p_e1 = x_e1; p_e2 = x_e2; p_c1 = c1; p_c2 = c2; p_tc = tc; p_tc1 = tc1;
      @(posedge clk);
      #1;
      if (p_tc) begin m_x1 = p_e1; m_x2 = p_e2; end
      m_c = p_tc1 ? p_c1 : p_c2;
      check(x_e1_o == p_e1 && x_e2_o == p_e2, "x links");
      check(c1_o == p_c1 && c2_o == p_c2, "c links");
      check(tc_o == p_tc && tc1_o == p_tc1, "tag links");
    end
    for (int i = 0; i < 8; i++) check(seen_code[i] > 0, "every tc/sign code applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
