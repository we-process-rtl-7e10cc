// tb_hex7seg: all sixteen digits against the segment sets of the usual hex
// digit shapes, listed here as strings of lit segment letters.
module tb_hex7seg;
  logic [3:0] hex;
  logic [6:0] seg;
  int checks = 0, failures = 0;
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  hex7seg dut (.hex, .seg);

  initial begin
    logic [6:0] ex;
    for (int i = 0; i < 16; i++) begin
      hex = 4'(i);
      ex  = 7'h7F;
      for (int k = 0; k < lit[i].len(); k++) ex[lit[i][k] - "a"] = 1'b0;
      #1;
      checks++;
      if (seg != ex) begin
        failures++;
        $display("FAIL: %h -> %07b expected %07b", hex, seg, ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
