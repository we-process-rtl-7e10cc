// tb_csa: random 16-bit words; checks x + y + z == s + 2*c (in 18 bits) and
// that each bit position is an independent full adder (s and c depend only
// on the three bits of that position).
module tb_csa;
  logic [15:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa #(.W(16)) dut (.x, .y, .z, .s, .c);

  initial begin
    for (int i = 0; i < 500; i++) begin
      x = 16'($urandom);
      y = 16'($urandom);
      z = 16'($urandom);
      #1;
      checks++;
      if (18'(x) + 18'(y) + 18'(z) != 18'(s) + (18'(c) << 1)) begin
        failures++;
        $display("FAIL: sum x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
      end
      for (int b = 0; b < 16; b++) begin
        checks++;
        if (s[b] != (x[b] ^ y[b] ^ z[b]) ||
            c[b] != ((x[b] + y[b] + z[b]) >= 2)) begin
          failures++;
          $display("FAIL: bit %0d", b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
