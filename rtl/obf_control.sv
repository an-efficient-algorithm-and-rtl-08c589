// obf_control: sign-bit obfuscation for one 3-PE systolic array.
//
// Each PE of an array needs a 3-bit sign sequence (one subtract bit per output
// row). For every PE this block holds the correct sequence C and an altered one
// C' (C with its lowest 1 bit cleared). Two AND gates form C AND C (= C) and
// C AND C' (= C'); a 2:1 multiplexer steered by that PE's key bit passes one of
// them. Which multiplexer input carries the correct sequence is fixed by the
// correct key bit (KEY_OK), so only the correct key reproduces the sequences the
// array needs; a wrong bit makes that PE add where it must subtract, and the
// transform output is wrong. Purely combinational. Sequence bits that are 0 in
// both C and C' are constant outputs by construction.
//
// The gate/multiplexer structure, one key bit per PE and the correct key 0,1,0
// of the first array follow the architecture description. The rule for C'
// (clear the lowest set bit) is this design's choice: the description only says
// that a 1 is changed to 0.
module obf_control #(
  parameter int                       PES    = dst4_pkg::PES,
  parameter logic [PES-1:0][PES-1:0]  SEQ    = {3'b100, 3'b010, 3'b001},   // [PE] -> seq
  parameter logic [PES-1:0]           KEY_OK = 3'b010
) (
  input  logic [PES-1:0]           key,
  output logic [PES-1:0][PES-1:0]  seq      // seq[p][r]: subtract bit of PE p+1, row r
);

  for (genvar p = 0; p < PES; p++) begin : g_pe
    logic [PES-1:0] c_ok, c_alt, gate_ok, gate_alt, in0, in1;
    assign c_ok     = SEQ[p];
    assign c_alt    = SEQ[p] & (SEQ[p] - 1'b1);   // lowest 1 cleared
    assign gate_ok  = c_ok & c_ok;
    assign gate_alt = c_ok & c_alt;
    assign in0      = KEY_OK[p] ? gate_alt : gate_ok;
    assign in1      = KEY_OK[p] ? gate_ok  : gate_alt;
    assign seq[p]   = key[p] ? in1 : in0;
  end

endmodule
