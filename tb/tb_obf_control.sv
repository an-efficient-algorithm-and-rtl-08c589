// tb_obf_control: checks the key-controlled sign selection of one array.
//
// For the sign sequences and correct key bits of each of the six arrays of the
// engine, all 8 keys are applied. For every PE the output must equal the
// correct sequence when its key bit is right, and the sequence with its lowest
// 1 cleared when it is wrong. The expected values are worked out here from the
// sequences bit by bit.
module tb_obf_control;
  import dst4_pkg::*;

  int checks = 0, failures = 0;

  logic [PES-1:0] key;
  logic [PES-1:0][PES-1:0] seq [NARR];

  for (genvar j = 0; j < NARR; j++) begin : g
    obf_control #(
      .PES(PES),
      .SEQ(SEQ[j]),
      .KEY_OK(KEY_OK[PES*j +: PES])
    ) dut (.key(key), .seq(seq[j]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      key = 3'(k);
      #1;
      for (int j = 0; j < NARR; j++)
        for (int p = 0; p < PES; p++) begin
          logic [PES-1:0] want;
          logic cleared;
          want = SEQ[j][p];
          if (key[p] != KEY_OK[PES*j+p]) begin
            cleared = 1'b0;
            for (int r = 0; r < PES; r++)
              if (!cleared && want[r]) begin want[r] = 1'b0; cleared = 1'b1; end
          end
          checks++;
          if (seq[j][p] !== want) begin
            failures++;
            $display("FAIL array %0d PE %0d key %b: got %b want %b", j, p+1, key, seq[j][p], want);
          end
        end
    end
    // the key of the first array must be 0,1,0 for K[0], K[1], K[2]
    checks++;
    if (KEY_OK[2:0] != 3'b010) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
