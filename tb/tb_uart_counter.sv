// tb_uart_counter: checks the two-bit byte counter against a reference
// count (advance on ec, wrap 3 -> 0, clear on reset) over random enables.
module tb_uart_counter;
  logic clk = 1'b0, rst_n = 1'b0, ec = 1'b0;
  logic [1:0] zt;
  int checks = 0, failures = 0;
  int ref_cnt = 0;

  uart_counter dut (.clk, .rst_n, .ec, .zt);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (zt != 2'd0) failures++;
    rst_n <= 1'b1;
    for (int i = 0; i < 200; i++) begin
      ec = 1'($urandom);
      @(posedge clk);
      if (ec) ref_cnt = (ref_cnt + 1) % 4;
      #1;
      checks++;
      if (zt != 2'(ref_cnt)) begin
        failures++;
        $display("FAIL: zt=%0d expected %0d", zt, ref_cnt);
      end
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
