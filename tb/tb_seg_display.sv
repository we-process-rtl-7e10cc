// tb_seg_display: with a 4-bit refresh counter, checks that exactly one
// digit is enabled at a time, that each is enabled for 8 cycles in turn,
// and that the segments show the low nibble on an[0] and the high nibble
// on an[1], for random values. The expected patterns come from hex7seg,
// tested on its own.
module tb_seg_display;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] value = 8'h00;
  logic [6:0] seg, seg_lo, seg_hi;
  logic [1:0] an, an_prev;
  int checks = 0, failures = 0;

  seg_display #(.REFRESH_BITS(4)) dut (.clk, .rst_n, .value, .seg, .an);
  hex7seg ref_lo (.hex(value[3:0]), .seg(seg_lo));
  hex7seg ref_hi (.hex(value[7:4]), .seg(seg_hi));

  always #5 clk = ~clk;

  initial begin
    int run;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    run = 0;
    an_prev = 2'b10;
    for (int i = 0; i < 400; i++) begin
      if (i % 16 == 0) value = 8'($urandom);
      @(posedge clk);
      #1;
      checks++;
      case (an)
        2'b10: if (seg != seg_lo) begin failures++; $display("FAIL: low digit"); end
        2'b01: if (seg != seg_hi) begin failures++; $display("FAIL: high digit"); end
        default: begin failures++; $display("FAIL: an=%b", an); end
      endcase
      if (an == an_prev) run++;
      else begin
        checks++;
        if (i > 8 && run != 8) begin
          failures++;
          $display("FAIL: digit lit %0d cycles", run);
        end
        run = 1;
      end
      an_prev = an;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
