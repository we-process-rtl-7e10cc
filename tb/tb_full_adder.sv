// tb_full_adder: all eight input combinations; {c, s} must equal the count
// of ones among x, y and z.
module tb_full_adder;
  logic x, y, z, s, c;
  int checks = 0, failures = 0;

  full_adder dut (.x, .y, .z, .s, .c);

  initial begin
    for (int i = 0; i < 8; i++) begin
      {x, y, z} = 3'(i);
      #1;
      checks++;
      if (int'({c, s}) != $countones(3'(i))) begin
        failures++;
        $display("FAIL: %03b -> c=%0d s=%0d", 3'(i), c, s);
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
