// tb_uart_fsm: checks the UART controller cycle by cycle.
//
// The testbench plays the receiver (rx_done) and the byte counter (a 2-bit
// count advanced by ec). For a series of bytes it checks: er in the first
// state, nothing while waiting, the byte going to RA (e1, s=0) when the
// counter reads 01 and to RB (e2, s=1) when it reads 10, the extra counter
// steps from 11 through 00, the one-cycle done pulse, and the number of
// cycles from rx_done to done (2, or 4 when two extra steps are needed).
module tb_uart_fsm;
  logic clk = 1'b0, rst_n = 1'b0, rx_done = 1'b0;
  logic [1:0] zt;
  logic er, ec, e1, e2, s, done;
  int checks = 0, failures = 0;

  uart_fsm dut (.clk, .rst_n, .rx_done, .zt, .er, .ec, .e1, .e2, .s, .done);

  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) zt <= 2'd0;
    else if (ec) zt <= zt + 2'd1;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t) er=%b ec=%b e1=%b e2=%b done=%b zt=%b", what, $time, er, ec, e1, e2, done, zt);
    end
  endtask

  initial begin
    int lat;
    logic saw_e1, saw_e2;
    int nec;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    #1;
    for (int byte_no = 1; byte_no <= 6; byte_no++) begin
      // S1
      check(er && !ec && !e1 && !e2 && !done, "S1 outputs");
      @(posedge clk);
      #1;
      // S2 waiting
      for (int w = 0; w < 3; w++) begin
        check(!er && !ec && !e1 && !e2 && !done, "S2 idle outputs");
        @(posedge clk);
        #1;
      end
      rx_done = 1'b1;
      #1;
      check(ec && !e1 && !e2, "S2 Ec on rx_done");
      lat = 0;
      saw_e1 = 0;
      saw_e2 = 0;
      nec = 0;
      while (!done && lat < 20) begin
        @(posedge clk);
        #1;
        rx_done = 1'b0;
        #1;
        lat++;
        if (e1) begin
          saw_e1 = 1;
          check(s == 1'b0 && zt == 2'b01, "E1 with S=0 at Zt=01");
        end
        if (e2) begin
          saw_e2 = 1;
          check(s == 1'b1 && zt == 2'b10, "E2 with S=1 at Zt=10");
        end
        if (ec && !done) begin
          nec++;
          check(zt == 2'b00 || zt == 2'b11, "Ec in S3 only at 00/11");
        end
      end
      // odd bytes -> RA, even bytes -> RB
      check(saw_e1 == (byte_no % 2 == 1), $sformatf("byte %0d RA load", byte_no));
      check(saw_e2 == (byte_no % 2 == 0), $sformatf("byte %0d RB load", byte_no));
      check(lat == 2 + nec, $sformatf("byte %0d latency %0d", byte_no, lat));
      check(nec == ((byte_no >= 3 && byte_no % 2 == 1) ? 2 : 0), $sformatf("byte %0d extra steps %0d", byte_no, nec));
      @(posedge clk);
      #1;
      check(!done, "done lasts one cycle");
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
